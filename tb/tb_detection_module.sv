// Self-checking test of the detection module: hash a memory image, store
// the first key, hash it again and compare (must match), then hash an image
// with one corrupted word (must not match). The reference key is FNV-1 per
// byte lane, computed here.
// Expected keys come from a reference model in the testbench; the streams
// are this test's own.
module tb_detection_module;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, hash_init, hash_en, key_store, cmp_en, keys_equal, hash_match;
  logic [31:0] data;
  logic [127:0] key, saved_key;
  int unsigned checks = 0, failures = 0;
  logic [31:0] img [100];

  detection_module dut (.clk, .rst_n, .clear, .hash_init, .hash_en, .data, .key_store, .cmp_en,
                        .keys_equal, .hash_match, .key, .saved_key);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_key();
    logic [31:0] h [4];
    for (int l = 0; l < 4; l++) h[l] = 32'h811c9dc5;
    foreach (img[i]) for (int l = 0; l < 4; l++) h[l] = (h[l] * 32'd16777619) ^ 32'(img[i][8*l +: 8]);
    return {h[3], h[2], h[1], h[0]};
  endfunction

  task automatic pass();
    @(negedge clk) hash_init = 1'b1;
    @(negedge clk) hash_init = 1'b0;
    foreach (img[i]) begin
      hash_en = 1'b1; data = img[i];
      @(negedge clk);
    end
    hash_en = 1'b0;
  endtask

  initial begin
    clear = 0; hash_init = 0; hash_en = 0; key_store = 0; cmp_en = 0; data = '0;
    foreach (img[i]) img[i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    pass();
    check(key == ref_key(), "first key equals reference");
    key_store = 1'b1;
    @(negedge clk) key_store = 1'b0;
    check(saved_key == ref_key(), "first key stored");
    pass();
    cmp_en = 1'b1; #1;
    check(keys_equal, "unchanged memory: keys match");
    @(negedge clk) cmp_en = 1'b0;
    check(hash_match, "hash match bit set");
    img[57] ^= 32'h0000_0100;
    pass();
    check(key == ref_key(), "second key equals reference");
    cmp_en = 1'b1; #1;
    check(!keys_equal, "corrupted word: keys differ");
    @(negedge clk) cmp_en = 1'b0;
    check(!hash_match, "hash match bit cleared by mismatch");
    clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(saved_key == '0 && !hash_match, "clear empties key and match bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
