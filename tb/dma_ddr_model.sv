// Behavioural model (not synthesizable) of the AXI DMA in simple mode plus
// the DDR region that holds the secure memory, for simulation only.
//
// Configuration: an AXI4-Lite slave with the DMA's MM2S source address
// (0x18), MM2S length (0x28), S2MM destination address (0x48) and S2MM
// length (0x58). Writing a length starts the transfer: MM2S streams
// ceil(len/4) words of `mem` from the source address with TLAST on the
// last; S2MM takes ceil(len/4) words from its stream into `mem`. A second
// AXI4-Lite slave (`s_axil_ddr`) lets another master (the intruder) write
// words into `mem` directly. Addresses are byte addresses; `mem` word i is
// at BASE + 4*i. With STALLS set, stream valid/ready are dropped at random
// so the design sees back-pressure and gaps.
// Only the register offsets and simple-mode behaviour of the vendor DMA are
// modelled; the stall pattern and the DDR array are this model's own.
module dma_ddr_model
  import hm_pkg::*;
#(
  parameter int unsigned       WORDS  = 1024,
  parameter logic [ADDR_W-1:0] BASE   = 32'h0010_0000,
  parameter bit                STALLS = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_cfg,
  output axil_rsp_t s_axil_cfg_rsp,
  input  axil_req_t s_axil_ddr,
  output axil_rsp_t s_axil_ddr_rsp,
  output axis_t     m_axis_mm2s,
  input  logic      m_axis_mm2s_tready,
  input  axis_t     s_axis_s2mm,
  output logic      s_axis_s2mm_tready
);

  logic [31:0] mem [WORDS];
  logic [31:0] mm2s_sa, s2mm_da;
  int unsigned rd_left, rd_idx, wr_left, wr_idx;
  int unsigned mm2s_starts, s2mm_starts, s2mm_words;
  logic        rd_gap, wr_gap;
  logic        cfg_b, ddr_b;

  // The model accepts address and data in the same cycle only.
  assign s_axil_cfg_rsp.awready = s_axil_cfg.awvalid && s_axil_cfg.wvalid && !cfg_b;
  assign s_axil_cfg_rsp.wready  = s_axil_cfg.awvalid && s_axil_cfg.wvalid && !cfg_b;
  assign s_axil_cfg_rsp.bvalid  = cfg_b;
  assign s_axil_cfg_rsp.bresp   = 2'b00;
  assign s_axil_cfg_rsp.arready = 1'b0;
  assign s_axil_cfg_rsp.rvalid  = 1'b0;
  assign s_axil_cfg_rsp.rdata   = '0;
  assign s_axil_cfg_rsp.rresp   = 2'b00;

  assign s_axil_ddr_rsp.awready = s_axil_ddr.awvalid && s_axil_ddr.wvalid && !ddr_b;
  assign s_axil_ddr_rsp.wready  = s_axil_ddr.awvalid && s_axil_ddr.wvalid && !ddr_b;
  assign s_axil_ddr_rsp.bvalid  = ddr_b;
  assign s_axil_ddr_rsp.bresp   = 2'b00;
  assign s_axil_ddr_rsp.arready = 1'b0;
  assign s_axil_ddr_rsp.rvalid  = 1'b0;
  assign s_axil_ddr_rsp.rdata   = '0;
  assign s_axil_ddr_rsp.rresp   = 2'b00;

  function automatic int unsigned widx(logic [31:0] a);
    return (a - BASE) >> 2;
  endfunction

  assign m_axis_mm2s.tvalid = (rd_left != 0) && !rd_gap;
  assign m_axis_mm2s.tdata  = (rd_idx < WORDS) ? mem[rd_idx] : 32'd0;
  assign m_axis_mm2s.tlast  = (rd_left == 1);
  assign s_axis_s2mm_tready = (wr_left != 0) && !wr_gap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mm2s_sa <= BASE; s2mm_da <= BASE;
      rd_left <= 0; rd_idx <= 0; wr_left <= 0; wr_idx <= 0;
      cfg_b <= 1'b0; ddr_b <= 1'b0; rd_gap <= 1'b0; wr_gap <= 1'b0;
      mm2s_starts <= 0; s2mm_starts <= 0; s2mm_words <= 0;
    end else begin
      rd_gap <= STALLS && ($urandom_range(3) == 0);
      wr_gap <= STALLS && ($urandom_range(3) == 0);
      if (cfg_b && s_axil_cfg.bready) cfg_b <= 1'b0;
      if (s_axil_cfg_rsp.awready) begin
        cfg_b <= 1'b1;
        case (s_axil_cfg.awaddr[7:0])
          8'h18: mm2s_sa <= s_axil_cfg.wdata;
          8'h48: s2mm_da <= s_axil_cfg.wdata;
          8'h28: begin
            rd_left <= (s_axil_cfg.wdata + 3) >> 2;
            rd_idx  <= widx(mm2s_sa);
            mm2s_starts <= mm2s_starts + 1;
          end
          8'h58: begin
            wr_left <= (s_axil_cfg.wdata + 3) >> 2;
            wr_idx  <= widx(s2mm_da);
            s2mm_starts <= s2mm_starts + 1;
          end
          default: ;
        endcase
      end
      if (ddr_b && s_axil_ddr.bready) ddr_b <= 1'b0;
      if (s_axil_ddr_rsp.awready) begin
        ddr_b <= 1'b1;
        if (widx(s_axil_ddr.awaddr) < WORDS) mem[widx(s_axil_ddr.awaddr)] <= s_axil_ddr.wdata;
      end
      if (m_axis_mm2s.tvalid && m_axis_mm2s_tready) begin
        rd_left <= rd_left - 1;
        rd_idx  <= rd_idx + 1;
      end
      if (s_axis_s2mm.tvalid && s_axis_s2mm_tready) begin
        if (wr_idx < WORDS) mem[wr_idx] <= s_axis_s2mm.tdata;
        wr_left <= wr_left - 1;
        wr_idx  <= wr_idx + 1;
        s2mm_words <= s2mm_words + 1;
      end
    end
  end

endmodule
