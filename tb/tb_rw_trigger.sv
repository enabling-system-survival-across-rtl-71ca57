// Self-checking test of the Write/Read Trigger: read and write requests
// must each produce exactly one AXI4-Lite write of the byte count to the
// DMA length register (MM2S at 0x28, S2MM at 0x58), also when the slave
// delays AWREADY, WREADY and BVALID at random and when both requests come
// in the same cycle.
// The length-register offsets are the vendor DMA's; the request timing and
// slave delays are this test's own.
module tb_rw_trigger;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic read_req, write_req, busy;
  logic [31:0] rd_nbytes, wr_nbytes;
  axil_req_t m;
  axil_rsp_t r;
  int unsigned checks = 0, failures = 0;
  logic [31:0] got_addr [$];
  logic [31:0] got_data [$];
  logic aw_seen, w_seen;
  logic [31:0] aw_a, w_d;

  rw_trigger #(.DMA_BASE(32'h4040_0000)) dut (.clk, .rst_n, .read_req, .write_req, .rd_nbytes, .wr_nbytes,
                                              .m_axil(m), .m_axil_rsp(r), .busy);

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

  // random-latency AXI4-Lite slave that logs the writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; aw_seen <= 0; w_seen <= 0; aw_a <= '0; w_d <= '0;
    end else begin
      r.awready <= !aw_seen && ($urandom_range(2) == 0);
      r.wready  <= !w_seen && ($urandom_range(2) == 0);
      if (m.awvalid && r.awready) begin aw_seen <= 1; aw_a <= m.awaddr; r.awready <= 0; end
      if (m.wvalid && r.wready)   begin w_seen  <= 1; w_d  <= m.wdata;  r.wready  <= 0; end
      if (aw_seen && w_seen && !r.bvalid && ($urandom_range(1) == 0)) r.bvalid <= 1;
      if (r.bvalid && m.bready) begin
        r.bvalid <= 0; aw_seen <= 0; w_seen <= 0;
        got_addr.push_back(aw_a); got_data.push_back(w_d);
      end
    end
  end

  initial begin
    logic [31:0] ea [$];
    logic [31:0] ed [$];
    read_req = 0; write_req = 0; rd_nbytes = '0; wr_nbytes = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      rd_nbytes = $urandom; wr_nbytes = $urandom;
      case ($urandom_range(2))
        0: begin read_req = 1; ea.push_back(32'h4040_0028); ed.push_back(rd_nbytes); end
        1: begin write_req = 1; ea.push_back(32'h4040_0058); ed.push_back(wr_nbytes); end
        default: begin
          read_req = 1; write_req = 1;
          ea.push_back(32'h4040_0028); ed.push_back(rd_nbytes);
          ea.push_back(32'h4040_0058); ed.push_back(wr_nbytes);
        end
      endcase
      @(negedge clk); read_req = 0; write_req = 0;
      #1 check(busy, "busy after a request");
      while (busy) @(negedge clk);
    end
    check(got_addr.size() == ea.size(), "one DMA register write per request");
    foreach (ea[i]) if (i < got_addr.size()) begin
      check(got_addr[i] == ea[i], $sformatf("write %0d address", i));
      check(got_data[i] == ed[i], $sformatf("write %0d byte count", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
