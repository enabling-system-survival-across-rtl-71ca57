// Self-checking test of the 128-bit key register: store, hold, clear and
// clear-over-store priority, with random keys.
// Expected contents are tracked in the testbench; the stimulus is random
// and this test's own.
module tb_hash_keys;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, store;
  logic [127:0] key_in, key_q, expect_q;
  int unsigned checks = 0, failures = 0;

  hash_keys dut (.clk, .rst_n, .clear, .store, .key_in, .key_q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; store = 0; key_in = '0; expect_q = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (key_q !== expect_q) begin failures++; $display("FAIL step %0d", i); end
      key_in = {$urandom, $urandom, $urandom, $urandom};
      store  = ($urandom_range(2) == 0);
      clear  = ($urandom_range(9) == 0);
      if (clear)      expect_q = '0;
      else if (store) expect_q = key_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
