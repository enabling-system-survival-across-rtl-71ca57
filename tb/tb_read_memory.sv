// Self-checking test of Read Memory: words of a random-gap stream come out
// in order with the last flag, ready only while enabled, `available` while
// a word waits, and after `drain` the rest of a stream is discarded.
// Expected words are kept in the testbench; the gap pattern and stream
// lengths are this test's own.
module tb_read_memory;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  axis_t s;
  logic tready, enable, drain, valid, last, available, draining;
  logic [31:0] data;
  int unsigned checks = 0, failures = 0;
  logic [31:0] src [$];
  logic [31:0] got [$];
  int unsigned got_last = 0;

  read_memory dut (.clk, .rst_n, .enable, .drain, .s_axis(s), .s_axis_tready(tready),
                   .data, .valid, .last, .available, .draining);

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

  always @(posedge clk) if (rst_n && valid) begin
    got.push_back(data);
    if (last) got_last++;
  end

  // stream source: sends src[] with TLAST on the final word, random gaps
  task automatic send(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while ($urandom_range(2) == 0) begin s.tvalid = 0; @(negedge clk); end
      s.tvalid = 1; s.tdata = src[i]; s.tlast = (i == n - 1);
      #1;
      while (!tready) begin @(negedge clk); #1; end
    end
    @(negedge clk) s.tvalid = 0;
  endtask

  initial begin
    s = '0; enable = 0; drain = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 50; i++) src.push_back($urandom);
    // word waits while not enabled
    @(negedge clk) s.tvalid = 1; s.tdata = src[0]; s.tlast = 0;
    #1 check(available && !tready, "available and held while disabled");
    s.tvalid = 0;
    enable = 1;
    send(50);
    repeat (2) @(negedge clk);
    check(got.size() == 50 && got_last == 1, "all words passed, one last");
    foreach (src[i]) if (i < got.size()) check(got[i] == src[i], "word order and value");
    // drain: abort after 10 words, the rest of that stream must vanish
    got.delete();
    enable = 1;
    fork
      send(50);
      begin
        wait (got.size() == 10);
        @(negedge clk) drain = 1; enable = 0;
        @(negedge clk) drain = 0;
        #1 check(draining, "draining after drain pulse");
      end
    join
    repeat (2) @(negedge clk);
    check(got.size() <= 12, "words after drain discarded");
    check(!draining, "drain ends at TLAST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
