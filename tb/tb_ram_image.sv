// Self-checking test of a checkpoint RAM: random writes and reads against a
// reference array, registered read data one clock after the address, and
// writes beyond DEPTH ignored (out-of-range reads give 0).
// Expected contents are kept in a testbench array; the access pattern is
// random and this test's own.
module tb_ram_image;
  import hm_pkg::*;
  localparam int D = 300;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [31:0] waddr, wdata, raddr, rdata, exp_q;
  logic [31:0] ref_mem [D];
  int unsigned checks = 0, failures = 0;

  ram_image #(.DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk) we = 1; waddr = i; wdata = $urandom; ref_mem[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(1);
      waddr = $urandom_range(D + 20);
      wdata = $urandom;
      raddr = $urandom_range(D + 5);
      exp_q = (raddr < D) ? ref_mem[raddr] : 32'd0;
      if (we && waddr < D) ref_mem[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin failures++; $display("FAIL read %0d", raddr); end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
