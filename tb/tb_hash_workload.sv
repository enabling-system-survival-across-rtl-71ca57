// Workload test of the hash function: the 200 kB algorithm-evaluation input
// (200000 bytes = 50000 words), hashed as one block by every byte-wide
// algorithm, FNV-1, FNV-1a, SDBM, DJB2 and CRC32, side by side.
//
// The data imitates secure memory: code-like random words, long runs of
// zero words (empty .bss), and small counters. It is generated here. Each
// final 128-bit key is compared with a reference model that works from the
// algorithms' definitions (CRC32 through a 256-entry table, unlike the
// bit-serial RTL). The cycle count is checked too: one setup clock plus one
// clock per 32-bit word, i.e. four bytes per clock where a single byte-wide
// hash needs one clock per byte. For every algorithm the testbench also
// counts how many of the 50000 intermediate keys repeat an earlier one, and
// it requires none for the default FNV-1 key. The input size follows the
// design's evaluation; the data pattern is this test's own.
module tb_hash_workload;
  import hm_pkg::*;
  localparam int unsigned NBYTES = 200000;
  localparam int unsigned NWORDS = NBYTES / 4;

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
  int unsigned cycle = 0;
  logic [31:0] crc_tab [256];
  logic [31:0] mem [NWORDS];
  bit seen [5][logic [127:0]];
  int unsigned repeats [5];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    while (cycle < NWORDS + 1000) @(posedge clk);
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

  // intermediate keys, sampled after every hashed word
  always @(posedge clk) begin
    if (rst_n && !init && $past(en)) begin
      for (int a = 0; a < 5; a++) begin
        if (seen[a].exists(key[a])) repeats[a]++;
        else seen[a][key[a]] = 1'b1;
      end
    end
  end

  initial begin
    logic [31:0] c;
    logic [31:0] h [5][4];
    int unsigned t0, t1;
    for (int i = 0; i < 256; i++) begin
      c = 32'(i) << 24;
      for (int j = 0; j < 8; j++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
      crc_tab[i] = c;
    end
    // memory-like image: code, an empty block, counters, more code
    for (int unsigned i = 0; i < NWORDS; i++) begin
      if (i < NWORDS / 4)            mem[i] = $urandom;
      else if (i < NWORDS / 2)       mem[i] = 32'd0;
      else if (i < 5 * NWORDS / 8)   mem[i] = i % 97;
      else                           mem[i] = ($urandom_range(3) == 0) ? 32'd0 : $urandom;
    end
    foreach (repeats[a]) repeats[a] = 0;
    for (int a = 0; a < 5; a++) for (int l = 0; l < 4; l++) h[a][l] = ref_start(a);
    init = 1'b0; en = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // setup clock, then one word per clock with no gaps
    @(negedge clk) init = 1'b1;
    t0 = cycle;
    @(negedge clk) init = 1'b0;
    for (int unsigned i = 0; i < NWORDS; i++) begin
      en = 1'b1; data = mem[i];
      for (int a = 0; a < 5; a++)
        for (int l = 0; l < 4; l++) h[a][l] = ref_step(a, h[a][l], mem[i][8*l +: 8]);
      @(negedge clk);
    end
    en = 1'b0;
    t1 = cycle;
    check(t1 - t0 == NWORDS + 1, $sformatf("one setup clock plus one clock per word (%0d clocks)", t1 - t0));
    for (int a = 0; a < 5; a++)
      check(key[a] == {h[a][3], h[a][2], h[a][1], h[a][0]}, $sformatf("200 kB key, algorithm %0d", a));
    @(negedge clk);
    check(repeats[0] == 0, "no repeated FNV-1 intermediate key");
    $display("repeated intermediate keys: FNV-1 %0d, FNV-1a %0d, SDBM %0d, DJB2 %0d, CRC32 %0d",
             repeats[0], repeats[1], repeats[2], repeats[3], repeats[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
