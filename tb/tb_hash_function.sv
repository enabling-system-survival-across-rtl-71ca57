// Self-checking test of the 128-bit hash function for every byte-wide
// algorithm. Reference values are computed here from the algorithms'
// definitions (CRC32 through a 256-entry table built as in the classic
// table generator, unlike the bit-serial RTL), plus published check values:
// FNV-1("a") = 0x050c5d7e, FNV-1a("a") = 0xe40c292c, and the unreflected
// CRC-32 with no final XOR of "123456789" = 0x0376e6e7. One word per clock
// is fed with no bubbles, so the key must be ready one clock after the last.
// The check values are the algorithms' standard ones; the random streams
// are this test's own.
module tb_hash_function;
  import hm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        init, en;
  logic [31:0] data;
  logic [127:0] key [5];

  hash_function #(.ALGO(HASH_FNV1))  u0 (.clk, .rst_n, .init, .en, .data, .key(key[0]));
  hash_function #(.ALGO(HASH_FNV1A)) u1 (.clk, .rst_n, .init, .en, .data, .key(key[1]));
  hash_function #(.ALGO(HASH_SDBM))  u2 (.clk, .rst_n, .init, .en, .data, .key(key[2]));
  hash_function #(.ALGO(HASH_DJB2))  u3 (.clk, .rst_n, .init, .en, .data, .key(key[3]));
  hash_function #(.ALGO(HASH_CRC32)) u4 (.clk, .rst_n, .init, .en, .data, .key(key[4]));

  int unsigned checks = 0, failures = 0;
  logic [31:0] crc_tab [256];

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

  function automatic logic [31:0] ref_step(int a, logic [31:0] h, logic [7:0] b);
    case (a)
      0: return (h * 32'd16777619) ^ 32'(b);
      1: return (h ^ 32'(b)) * 32'd16777619;
      2: return 32'(b) + (h << 6) + (h << 16) - h;
      3: return h * 32'd33 + 32'(b);
      default: return (h << 8) ^ crc_tab[(h >> 24) ^ 32'(b)];
    endcase
  endfunction

  function automatic logic [31:0] ref_start(int a);
    case (a)
      0, 1: return 32'h811c9dc5;
      2: return 32'd0;
      3: return 32'd5381;
      default: return 32'hFFFFFFFF;
    endcase
  endfunction

  // Runs one stream of words through all DUTs and checks the keys.
  task automatic run(input logic [31:0] words [], input string name);
    logic [31:0] h [5][4];
    for (int a = 0; a < 5; a++) for (int l = 0; l < 4; l++) h[a][l] = ref_start(a);
    @(negedge clk); init = 1'b1; en = 1'b0;
    @(negedge clk); init = 1'b0;
    foreach (words[i]) begin
      en = 1'b1; data = words[i];
      for (int a = 0; a < 5; a++) for (int l = 0; l < 4; l++) h[a][l] = ref_step(a, h[a][l], words[i][8*l +: 8]);
      @(negedge clk);
    end
    en = 1'b0;
    for (int a = 0; a < 5; a++)
      check(key[a] == {h[a][3], h[a][2], h[a][1], h[a][0]}, $sformatf("%s algo %0d", name, a));
  endtask

  initial begin
    logic [31:0] w [];
    logic [31:0] c;
    for (int i = 0; i < 256; i++) begin
      c = 32'(i) << 24;
      for (int j = 0; j < 8; j++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
      crc_tab[i] = c;
    end
    init = 1'b0; en = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // reset value is the start value
    check(key[0] == {4{32'h811c9dc5}}, "reset loads FNV offset basis");
    // published check values on lane 0
    w = new[1]; w[0] = 32'h00000061;
    run(w, "a");
    check(key[0][31:0] == 32'h050c5d7e, "FNV-1 of 'a'");
    check(key[1][31:0] == 32'he40c292c, "FNV-1a of 'a'");
    w = new[9];
    foreach (w[i]) w[i] = 32'h31 + 32'(i);
    run(w, "123456789");
    check(key[4][31:0] == 32'h0376e6e7, "CRC-32 check value");
    // random streams, including an all-zero block
    for (int t = 0; t < 6; t++) begin
      w = new[1 + $urandom_range(200)];
      foreach (w[i]) w[i] = (t == 2) ? 32'd0 : $urandom;
      run(w, $sformatf("random stream %0d", t));
    end
    // a single flipped bit changes the FNV-1 key
    w = new[64];
    foreach (w[i]) w[i] = 32'(i) * 32'h01010101;
    run(w, "ramp");
    c = key[0][31:0];
    w[40][3] = ~w[40][3];
    run(w, "ramp with one flipped bit");
    check(key[0][31:0] != c, "one flipped bit changes the key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
