// Self-checking test of the ROM image: it records an image while unlocked,
// refuses every write after `lock`, and reads back the recorded image.
// Expected contents are kept in the testbench; the data is random and this
// test's own.
module tb_rom_image;
  import hm_pkg::*;
  localparam int D = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we, lock, locked;
  logic [31:0] waddr, wdata, raddr, rdata;
  logic [31:0] img [D];
  int unsigned checks = 0, failures = 0;

  rom_image #(.DEPTH(D)) dut (.clk, .rst_n, .we, .lock, .waddr, .wdata, .raddr, .rdata, .locked);

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

  initial begin
    we = 0; lock = 0; waddr = 0; wdata = 0; raddr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!locked, "unlocked after reset");
    for (int i = 0; i < D; i++) begin
      @(negedge clk) we = 1; waddr = i; wdata = $urandom; img[i] = wdata;
    end
    @(negedge clk) we = 0; lock = 1;
    @(negedge clk) lock = 0;
    check(locked, "locked after lock");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk) we = 1; waddr = $urandom_range(D - 1); wdata = $urandom;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk) raddr = i;
      @(negedge clk) check(rdata == img[i], $sformatf("ROM word %0d kept", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
