// Self-checking test of Write Memory: a stream of N words from a memory
// with one clock of read latency, under random back-pressure. Words must
// arrive in order, TLAST only on word N-1, `done` once, and with the sink
// always ready the last word must be taken N+1 clocks after start and
// `done` seen on the clock after that (N+2).
// Expected words and cycle counts are computed in the testbench; lengths
// and ready patterns are this test's own.
module tb_write_memory;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, cancel, advance, tready, done, active;
  logic [31:0] nwords, data;
  axis_t m;
  int unsigned checks = 0, failures = 0;
  logic [31:0] img [256];
  logic [31:0] got [$];
  int unsigned idx, lasts, dones;
  bit random_ready;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  write_memory dut (.clk, .rst_n, .start, .cancel, .nwords, .data, .advance, .m_axis(m),
                    .m_axis_tready(tready), .done, .active);

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

  // memory with registered read, address computed one clock ahead
  always_ff @(posedge clk) begin
    if (start) idx <= 0;
    else if (advance) idx <= idx + 1;
    data <= img[start ? 0 : (advance ? idx + 1 : idx)];
  end
  always @(posedge clk) if (rst_n) begin
    if (m.tvalid && tready) begin got.push_back(m.tdata); if (m.tlast) lasts++; end
    if (done) dones++;
  end
  always @(negedge clk) tready = random_ready ? ($urandom_range(2) != 0) : 1'b1;

  task automatic run(input int n, input bit rnd);
    int t0, t1;
    got.delete(); lasts = 0; dones = 0; random_ready = rnd;
    @(negedge clk) start = 1; nwords = n;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (dones == 0) @(negedge clk);
    t1 = cyc;
    check(got.size() == n, $sformatf("%0d words sent", n));
    for (int i = 0; i < n && i < got.size(); i++) check(got[i] == img[i], "word value");
    check(lasts == 1, "exactly one TLAST");
    if (!rnd) check(t1 - t0 == n + 2, $sformatf("N+2 clocks for %0d words, got %0d", n, t1 - t0));
  endtask

  initial begin
    start = 0; cancel = 0; nwords = 0; idx = 0; random_ready = 0;
    foreach (img[i]) img[i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(1, 0);
    run(17, 0);
    run(200, 1);
    run(64, 1);
    check(!active, "idle after completion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
