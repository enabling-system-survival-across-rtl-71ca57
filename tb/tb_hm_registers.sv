// Self-checking test of the register interface over AXI4-Lite: the four
// informative counters read back at offsets 0x0-0xC, NOB is read/write,
// TRIG pulses reset for 0 and start for a byte count, CS pulses on any
// write, STATUS reflects the status input, and unmapped reads give 0.
// The offsets and register meanings follow the design's register map; the
// counter values are arbitrary stimulus. Command pulses are counted on the
// clock and compared with the number of writes issued.
module tb_hm_registers;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

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

  axil_req_t rq;
  axil_rsp_t rs;
  logic [31:0] rcc, hcc, noc, nor_cnt, nbytes, trig_bytes;
  logic status_ok, trig_start, trig_reset, cs;
  int unsigned n_start = 0, n_reset = 0, n_cs = 0;

  hm_registers dut (.clk, .rst_n, .s_axil(rq), .s_axil_rsp(rs), .rcc, .hcc, .noc, .nor_cnt,
                    .status_ok, .nbytes, .trig_bytes, .trig_start, .trig_reset, .cs);

  always @(posedge clk) if (rst_n) begin
    if (trig_start) n_start++;
    if (trig_reset) n_reset++;
    if (cs) n_cs++;
  end

  // Inputs change on the falling edge; handshakes are judged just before
  // the rising edge that completes them.
  task automatic axil_write(ref axil_req_t rq, ref axil_rsp_t rs, input logic [31:0] a, input logic [31:0] d);
    bit aw_hs, w_hs;
    @(negedge clk);
    rq.awaddr = a; rq.awvalid = 1'b1; rq.wdata = d; rq.wstrb = 4'hF; rq.wvalid = 1'b1; rq.bready = 1'b1;
    while (rq.awvalid || rq.wvalid) begin
      #1;
      aw_hs = rq.awvalid && rs.awready;
      w_hs  = rq.wvalid && rs.wready;
      @(negedge clk);
      if (aw_hs) rq.awvalid = 1'b0;
      if (w_hs)  rq.wvalid  = 1'b0;
    end
    #1;
    while (!rs.bvalid) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    rq.bready = 1'b0;
  endtask

  task automatic axil_read(ref axil_req_t rq, ref axil_rsp_t rs, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    rq.araddr = a; rq.arvalid = 1'b1; rq.rready = 1'b1;
    #1;
    while (!rs.arready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    rq.arvalid = 1'b0;
    #1;
    while (!rs.rvalid) begin
      @(negedge clk);
      #1;
    end
    d = rs.rdata;
    @(negedge clk);
    rq.rready = 1'b0;
  endtask

  initial begin
    logic [31:0] v;
    rq = '0;
    rcc = 32'h1111_0001; hcc = 32'h2222_0002; noc = 32'h3333_0003; nor_cnt = 32'h4444_0004;
    status_ok = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    axil_read(rq, rs, 32'h00, v); check(v == rcc, "RCC at 0x00");
    axil_read(rq, rs, 32'h04, v); check(v == hcc, "HCC at 0x04");
    axil_read(rq, rs, 32'h08, v); check(v == noc, "NoC at 0x08");
    axil_read(rq, rs, 32'h0C, v); check(v == nor_cnt, "NoR at 0x0C");
    axil_write(rq, rs, 32'h10, 32'd1234);
    check(nbytes == 32'd1234, "NOB output");
    axil_read(rq, rs, 32'h10, v); check(v == 32'd1234, "NOB reads back");
    check(n_start == 0 && n_reset == 0 && n_cs == 0, "no command pulses yet");
    axil_write(rq, rs, 32'h14, 32'd0);
    check(n_reset == 1 && n_start == 0, "TRIG=0 pulses reset");
    axil_write(rq, rs, 32'h14, 32'd4096);
    check(n_start == 1 && n_reset == 1 && trig_bytes == 32'd4096, "TRIG=N pulses start with N");
    axil_write(rq, rs, 32'h18, 32'h1);
    check(n_cs == 1, "CS pulses once");
    axil_read(rq, rs, 32'h18, v); check(v == 32'd0, "CS reads 0");
    axil_write(rq, rs, 32'h18, 32'h0);
    check(n_cs == 2, "CS pulses on a write of 0 too");
    axil_read(rq, rs, 32'h1C, v); check(v == 32'd1, "STATUS 1");
    status_ok = 1'b0;
    axil_read(rq, rs, 32'h1C, v); check(v == 32'd0, "STATUS 0");
    for (int i = 0; i < 20; i++) begin
      rcc = $urandom;
      axil_read(rq, rs, 32'h00, v); check(v == rcc, "RCC follows input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
