// Self-checking test of the hash comparator: combinational equality on
// equal, one-bit-different and random keys, and the registered match bit
// (written only while enabled, cleared by clear).
// Expected results are computed in the testbench; the key patterns are
// this test's own.
module tb_hash_comparator;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en, clear, keys_equal, hash_match, exp_match;
  logic [127:0] a, b;
  int unsigned checks = 0, failures = 0;

  hash_comparator dut (.clk, .rst_n, .en, .clear, .key_a(a), .key_b(b), .keys_equal, .hash_match);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clear = 0; a = '0; b = '0; exp_match = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (hash_match !== exp_match) begin failures++; $display("FAIL match bit step %0d", i); end
      a = {$urandom, $urandom, $urandom, $urandom};
      case ($urandom_range(2))
        0: b = a;
        1: begin b = a; b[$urandom_range(127)] ^= 1'b1; end
        default: b = {$urandom, $urandom, $urandom, $urandom};
      endcase
      en = $urandom_range(1);
      clear = ($urandom_range(7) == 0);
      #1;
      checks++;
      if (keys_equal !== (a == b)) begin failures++; $display("FAIL equality step %0d", i); end
      if (clear)   exp_match = 1'b0;
      else if (en) exp_match = (a == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
