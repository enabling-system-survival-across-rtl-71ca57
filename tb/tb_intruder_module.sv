// Self-checking test of the intruder module: configuration registers read
// back; exactly one AXI write of the configured value to the configured
// address per rising edge of (NS schedule AND error trigger); nothing when
// either input is low. The AND of the two conditions and the address/value
// pair follow the design; the DDR side is a small AXI4-Lite slave written
// here with random ready delays, and the addresses used are arbitrary.
module tb_intruder_module;
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

  axil_req_t cfg, m;
  axil_rsp_t cfg_rsp, m_rsp;
  logic ns_schedule, error_trigger;
  logic [31:0] hits;
  logic [31:0] wa [$];
  logic [31:0] wd [$];

  intruder_module dut (.clk, .rst_n, .ns_schedule, .error_trigger, .s_axil(cfg), .s_axil_rsp(cfg_rsp),
                       .m_axil(m), .m_axil_rsp(m_rsp), .hits);

  // AXI slave standing in for DDR, with random delays
  logic aw_seen, w_seen;
  logic [31:0] aw_a, w_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_rsp <= '0; aw_seen <= 0; w_seen <= 0; aw_a <= '0; w_d <= '0;
    end else begin
      m_rsp.awready <= !aw_seen && ($urandom_range(1) == 0);
      m_rsp.wready  <= !w_seen && ($urandom_range(1) == 0);
      if (m.awvalid && m_rsp.awready) begin aw_seen <= 1; aw_a <= m.awaddr; m_rsp.awready <= 0; end
      if (m.wvalid && m_rsp.wready)   begin w_seen <= 1; w_d <= m.wdata; m_rsp.wready <= 0; end
      if (aw_seen && w_seen && !m_rsp.bvalid) m_rsp.bvalid <= 1;
      if (m_rsp.bvalid && m.bready) begin
        m_rsp.bvalid <= 0; aw_seen <= 0; w_seen <= 0;
        wa.push_back(aw_a); wd.push_back(w_d);
      end
    end
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
    cfg = '0; ns_schedule = 0; error_trigger = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    axil_write(cfg, cfg_rsp, 32'h0, 32'h0010_0040);
    axil_write(cfg, cfg_rsp, 32'h4, 32'hBADC_0FFE);
    axil_read(cfg, cfg_rsp, 32'h0, v); check(v == 32'h0010_0040, "address register");
    axil_read(cfg, cfg_rsp, 32'h4, v); check(v == 32'hBADC_0FFE, "value register");
    // trigger alone, NS schedule alone: nothing
    @(negedge clk) error_trigger = 1;
    repeat (20) @(negedge clk);
    error_trigger = 0; ns_schedule = 1;
    repeat (20) @(negedge clk);
    check(wa.size() == 0 && hits == 0, "no write unless both inputs are high");
    // both high: one write, held high: still one
    error_trigger = 1;
    repeat (40) @(negedge clk);
    check(wa.size() == 1 && hits == 1, "one write per rising edge");
    if (wa.size() > 0) check(wa[0] == 32'h0010_0040 && wd[0] == 32'hBADC_0FFE, "write address and value");
    // second edge with a new target
    error_trigger = 0;
    axil_write(cfg, cfg_rsp, 32'h0, 32'h0010_0100);
    axil_write(cfg, cfg_rsp, 32'h4, 32'h1234_5678);
    @(negedge clk) error_trigger = 1;
    repeat (40) @(negedge clk);
    check(wa.size() == 2 && hits == 2, "second edge, second write");
    if (wa.size() > 1) check(wa[1] == 32'h0010_0100 && wd[1] == 32'h1234_5678, "second write address and value");
    // random phase: random targets and random waveforms on both inputs;
    // every rising edge of the AND that finds the module idle is one write
    error_trigger = 0; ns_schedule = 0;
    repeat (5) @(negedge clk);
    for (int r = 0; r < 12; r++) begin
      logic [31:0] ta, tv;
      int unsigned n0;
      ta = {$urandom} & 32'hFFFF_FFFC; tv = $urandom;
      axil_write(cfg, cfg_rsp, 32'h0, ta);
      axil_write(cfg, cfg_rsp, 32'h4, tv);
      n0 = wa.size();
      // one of: trigger alone, NS alone, or both rising together or in turn
      unique case (r % 4)
        0: begin @(negedge clk) error_trigger = 1; repeat (6) @(negedge clk); error_trigger = 0; end
        1: begin @(negedge clk) ns_schedule = 1; repeat (6) @(negedge clk); ns_schedule = 0; end
        2: begin @(negedge clk) begin ns_schedule = 1; error_trigger = 1; end end
        default: begin @(negedge clk) ns_schedule = 1; repeat ($urandom_range(5)) @(negedge clk); error_trigger = 1; end
      endcase
      repeat (40) @(negedge clk);
      error_trigger = 0; ns_schedule = 0;
      repeat (3) @(negedge clk);
      if (r % 4 < 2) check(wa.size() == n0, $sformatf("round %0d: one input alone writes nothing", r));
      else begin
        check(wa.size() == n0 + 1, $sformatf("round %0d: one write per edge", r));
        if (wa.size() == n0 + 1) check(wa[n0] == ta && wd[n0] == tv, $sformatf("round %0d: address and value", r));
      end
    end
    check(hits == wa.size(), "hits counts every completed write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
