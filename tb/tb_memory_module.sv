// Self-checking test of the memory module against the DMA/DDR model with
// random stream stalls. Read mode: a read request must stream the secure
// words in order with one last flag. Write mode: a write request must store
// the supplied image (from a one-clock-latency source) into DDR and pulse
// `wr_done` once.
// Expected data is tracked in the testbench against the DMA model; the
// image contents and sizes are this test's own.
module tb_memory_module;
  import hm_pkg::*;
  localparam int N = 40;
  localparam logic [31:0] BASE = 32'h0010_0000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic read_req, write_req, rd_enable, rd_drain, wr_abort;
  logic [31:0] rd_nbytes, wr_nbytes, rd_data, wr_data;
  logic rd_valid, rd_last, rd_available, rd_draining, wr_advance, wr_done, wr_active, trig_busy;
  axil_req_t cfg, ddr;
  axil_rsp_t cfg_rsp, ddr_rsp;
  axis_t mm2s, s2mm;
  logic mm2s_ready, s2mm_ready;
  int unsigned checks = 0, failures = 0, lasts = 0, dones = 0, idx = 0;
  logic [31:0] got [$];
  logic [31:0] img [N];

  memory_module #(.DMA_BASE(32'h0)) dut (
    .clk, .rst_n, .read_req, .write_req, .rd_nbytes, .wr_nbytes, .rd_enable, .rd_drain, .wr_abort,
    .rd_data, .rd_valid, .rd_last, .rd_available, .rd_draining, .wr_data, .wr_advance, .wr_done,
    .wr_active, .trig_busy, .m_axil_dma(cfg), .m_axil_dma_rsp(cfg_rsp), .s_axis_mm2s(mm2s),
    .s_axis_mm2s_tready(mm2s_ready), .m_axis_s2mm(s2mm), .m_axis_s2mm_tready(s2mm_ready));

  dma_ddr_model #(.WORDS(N), .BASE(BASE), .STALLS(1'b1)) u_dma (
    .clk, .rst_n, .s_axil_cfg(cfg), .s_axil_cfg_rsp(cfg_rsp), .s_axil_ddr(ddr), .s_axil_ddr_rsp(ddr_rsp),
    .m_axis_mm2s(mm2s), .m_axis_mm2s_tready(mm2s_ready), .s_axis_s2mm(s2mm), .s_axis_s2mm_tready(s2mm_ready));

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

  always @(posedge clk) if (rst_n) begin
    if (rd_valid) begin got.push_back(rd_data); if (rd_last) lasts++; end
    if (wr_done) dones++;
  end
  // image source with one clock of read latency
  always_ff @(posedge clk) begin
    if (write_req) idx <= 0;
    else if (wr_advance) idx <= idx + 1;
    wr_data <= img[write_req ? 0 : (wr_advance ? idx + 1 : idx)];
  end

  initial begin
    ddr = '0; read_req = 0; write_req = 0; rd_enable = 0; rd_drain = 0; wr_abort = 0;
    rd_nbytes = 4 * N; wr_nbytes = 4 * N;
    for (int i = 0; i < N; i++) u_dma.mem[i] = $urandom;
    foreach (img[i]) img[i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // read mode
    @(negedge clk) read_req = 1;
    @(negedge clk) read_req = 0;
    while (!rd_available) @(negedge clk);
    rd_enable = 1;
    while (lasts == 0) @(negedge clk);
    rd_enable = 0;
    check(got.size() == N, "read mode delivered every word");
    for (int i = 0; i < N && i < got.size(); i++) check(got[i] == u_dma.mem[i], "read word value");
    check(u_dma.mm2s_starts == 1, "one DMA read started");
    // write mode
    @(negedge clk) write_req = 1;
    @(negedge clk) write_req = 0;
    while (dones == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(dones == 1, "transfer completed once");
    check(u_dma.s2mm_starts == 1 && u_dma.s2mm_words == N, "one DMA write of N words");
    for (int i = 0; i < N; i++) check(u_dma.mem[i] == img[i], "written word value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
