// Self-checking test of the memory selector at its ports: captured words
// must be written to the RAM that is not the healthy holder (and to the ROM
// only until it is locked), with consecutive addresses from 0; commit must
// swap the holder; the restore address must run 0,1,2.. one clock ahead and
// the restored data must come from the healthy RAM or the ROM as chosen.
module tb_memory_selector;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap_start, cap_valid, cap_last, commit, drop, rst_start, rst_advance, use_rom;
  logic [31:0] cap_data, restored_data;
  logic checkpoint_valid, healthy_sel, rom_locked;
  logic ram_we [2];
  logic [31:0] ram_waddr, ram_wdata, ram_raddr;
  logic [31:0] ram_rdata [2];
  logic rom_we, rom_lock, rom_is_locked;
  logic [31:0] rom_rdata;
  int unsigned checks = 0, failures = 0;

  memory_selector dut (.clk, .rst_n, .cap_start, .cap_valid, .cap_last, .cap_data, .commit, .drop,
    .rst_start, .rst_advance, .use_rom, .restored_data, .checkpoint_valid, .healthy_sel, .rom_locked,
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata, .rom_we, .rom_lock, .rom_is_locked, .rom_rdata);

  // the memories: data = tag | address, registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rom_is_locked <= 1'b0;
    else if (rom_lock) rom_is_locked <= 1'b1;
  end
  always_ff @(posedge clk) begin
    ram_rdata[0] <= 32'hA000_0000 | ram_raddr;
    ram_rdata[1] <= 32'hB000_0000 | ram_raddr;
    rom_rdata    <= 32'hC000_0000 | ram_raddr;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(input int n);
    bit h;
    h = healthy_sel;
    @(negedge clk) cap_start = 1;
    @(negedge clk) cap_start = 0;
    for (int i = 0; i < n; i++) begin
      cap_valid = 1; cap_data = $urandom; cap_last = (i == n - 1);
      #1;
      check(ram_we[!h] && !ram_we[h], "write goes to the non-healthy RAM");
      check(ram_waddr == i && ram_wdata == cap_data, "capture address and data");
      check(rom_we == !rom_is_locked, "ROM written only before lock");
      @(negedge clk);
    end
    cap_valid = 0; cap_last = 0;
    #1 check(!ram_we[0] && !ram_we[1] && !rom_we, "no write without valid");
  endtask

  task automatic restore(input bit rom, input int n);
    logic [31:0] tag;
    @(negedge clk) rst_start = 1; use_rom = rom;
    #1 check(ram_raddr == 0, "restore starts at address 0");
    tag = rom ? 32'hC000_0000 : (healthy_sel ? 32'hB000_0000 : 32'hA000_0000);
    @(negedge clk) rst_start = 0; use_rom = 0;
    for (int i = 0; i < n; i++) begin
      check(restored_data == (tag | i), $sformatf("restored word %0d source and address", i));
      rst_advance = 1;
      @(negedge clk);
      rst_advance = 0;
      if ($urandom_range(1)) @(negedge clk);
    end
  endtask

  initial begin
    bit h0;
    cap_start = 0; cap_valid = 0; cap_last = 0; cap_data = 0; commit = 0; drop = 0;
    rst_start = 0; rst_advance = 0; use_rom = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    capture(20);
    check(rom_locked, "ROM locked at end of first pass");
    h0 = healthy_sel;
    @(negedge clk) commit = 1;
    @(negedge clk) commit = 0;
    check(healthy_sel == !h0 && checkpoint_valid, "commit swaps healthy RAM");
    capture(20);
    restore(1'b0, 20);
    restore(1'b1, 20);
    @(negedge clk) commit = 1;
    @(negedge clk) commit = 0;
    check(healthy_sel == h0, "second commit swaps back");
    restore(1'b0, 12);
    @(negedge clk) drop = 1;
    @(negedge clk) drop = 0;
    check(!checkpoint_valid, "drop clears checkpoint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
