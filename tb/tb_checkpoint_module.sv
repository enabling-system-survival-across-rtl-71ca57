// Self-checking test of the checkpoint module: the first captured pass
// becomes the ROM image; a committed pass becomes the healthy RAM image; a
// later uncommitted pass must not disturb it; restores stream the healthy
// RAM image or the ROM image word by word (one clock read latency, with
// random pauses), and `drop` clears the checkpoint-valid flag.
// Expected images are kept in the testbench, independent of the RTL; the
// image contents are random and this test's own.
module tb_checkpoint_module;
  import hm_pkg::*;
  localparam int D = 64, N = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap_start, cap_valid, cap_last, commit, drop, rst_start, rst_advance, use_rom;
  logic [31:0] cap_data, restored_data;
  logic checkpoint_valid, healthy_sel, rom_locked;
  logic [31:0] img [4][N];
  int unsigned checks = 0, failures = 0;

  checkpoint_module #(.DEPTH(D)) dut (.clk, .rst_n, .cap_start, .cap_valid, .cap_last, .cap_data,
    .commit, .drop, .rst_start, .rst_advance, .use_rom, .restored_data, .checkpoint_valid,
    .healthy_sel, .rom_locked);

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

  task automatic capture(input int k);
    @(negedge clk) cap_start = 1;
    @(negedge clk) cap_start = 0;
    for (int i = 0; i < N; i++) begin
      while ($urandom_range(3) == 0) begin cap_valid = 0; cap_last = 0; @(negedge clk); end
      cap_valid = 1; cap_data = img[k][i]; cap_last = (i == N - 1);
      @(negedge clk);
    end
    cap_valid = 0; cap_last = 0;
  endtask

  task automatic restore(input bit rom, input int k, input string what);
    int bad = 0;
    @(negedge clk) rst_start = 1; use_rom = rom;
    @(negedge clk) rst_start = 0; use_rom = 0;
    for (int i = 0; i < N; i++) begin
      if (restored_data != img[k][i]) bad++;
      rst_advance = ($urandom_range(2) != 0);
      while (!rst_advance) begin
        @(negedge clk);
        if (restored_data != img[k][i]) bad++;
        rst_advance = ($urandom_range(2) != 0);
      end
      @(negedge clk);
      rst_advance = 0;
    end
    check(bad == 0, what);
  endtask

  initial begin
    cap_start = 0; cap_valid = 0; cap_last = 0; cap_data = 0; commit = 0; drop = 0;
    rst_start = 0; rst_advance = 0; use_rom = 0;
    foreach (img[k, i]) img[k][i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!checkpoint_valid && !rom_locked, "empty after reset");
    capture(0);                      // boot pass
    check(rom_locked, "ROM recorded by first pass");
    @(negedge clk) commit = 1;
    @(negedge clk) commit = 0;
    check(checkpoint_valid, "commit makes a checkpoint");
    capture(1);                      // next pass, confirmed
    @(negedge clk) commit = 1;
    @(negedge clk) commit = 0;
    capture(2);                      // pass that is never confirmed
    restore(1'b0, 1, "RAM restore gives last committed image");
    restore(1'b1, 0, "ROM restore gives the first image");
    capture(3);
    @(negedge clk) commit = 1;
    @(negedge clk) commit = 0;
    restore(1'b0, 3, "rotation: newest committed image restored");
    restore(1'b1, 0, "ROM unchanged by later passes");
    @(negedge clk) drop = 1;
    @(negedge clk) drop = 0;
    check(!checkpoint_valid, "drop clears checkpoint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
