// AXI4-Lite slave front end shared by the memory-mapped register blocks.
//
// Write: the address and data channels are accepted independently (one of
// each at a time); when both are held, `wr_en` pulses for one cycle with
// `wr_addr`/`wr_data`, and an OKAY response is raised on B until the master
// takes it. Read: an address is accepted when no read response is pending;
// in that cycle `rd_en` pulses with `rd_addr`, the register block answers
// combinationally on `rd_data`, and the value is returned on R until the
// master takes it. Only full 32-bit writes are meant (WSTRB is ignored).
// The register blocks are specified only as AXI4-Lite slaves; the channel
// buffering, the OKAY-only responses and the combinational read-back are
// this design's own choices.
module axil_slave
  import hm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_axil,
  output axil_rsp_t         s_axil_rsp,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [DATA_W-1:0] rd_data
);

  logic              aw_full, w_full, b_pend, r_pend;
  logic [ADDR_W-1:0] aw_q;
  logic [DATA_W-1:0] w_q, r_q;
  logic              aw_hs, w_hs, ar_hs;

  assign aw_hs = s_axil.awvalid && s_axil_rsp.awready;
  assign w_hs  = s_axil.wvalid  && s_axil_rsp.wready;
  assign ar_hs = s_axil.arvalid && s_axil_rsp.arready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_full <= 1'b0;
      w_full  <= 1'b0;
      b_pend  <= 1'b0;
      r_pend  <= 1'b0;
      aw_q    <= '0;
      w_q     <= '0;
      r_q     <= '0;
    end else begin
      if (aw_hs) begin
        aw_full <= 1'b1;
        aw_q    <= s_axil.awaddr;
      end
      if (w_hs) begin
        w_full <= 1'b1;
        w_q    <= s_axil.wdata;
      end
      if (wr_en) begin
        aw_full <= 1'b0;
        w_full  <= 1'b0;
        b_pend  <= 1'b1;
      end
      if (b_pend && s_axil.bready) b_pend <= 1'b0;
      if (ar_hs) begin
        r_pend <= 1'b1;
        r_q    <= rd_data;
      end else if (r_pend && s_axil.rready) begin
        r_pend <= 1'b0;
      end
    end
  end

  assign wr_en   = aw_full && w_full && !b_pend;
  assign wr_addr = aw_q;
  assign wr_data = w_q;
  assign rd_en   = ar_hs;
  assign rd_addr = s_axil.araddr;

  always_comb begin
    s_axil_rsp         = AXIL_RSP_IDLE;
    s_axil_rsp.awready = !aw_full;
    s_axil_rsp.wready  = !w_full;
    s_axil_rsp.bvalid  = b_pend;
    s_axil_rsp.bresp   = 2'b00;
    s_axil_rsp.arready = !r_pend;
    s_axil_rsp.rvalid  = r_pend;
    s_axil_rsp.rdata   = r_q;
    s_axil_rsp.rresp   = 2'b00;
  end

endmodule
