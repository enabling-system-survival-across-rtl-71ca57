// Memory module: reads and writes the whole secure memory as a stream of
// 32-bit words, hiding addressing from the other modules.
//
// Read mode: `read_req` makes the Write/Read Trigger start a DMA read of
// `rd_nbytes`; the words then come out of Read Memory one per clock.
// Write mode: `write_req` starts a DMA write of `wr_nbytes` and Write Memory
// streams the checkpoint data (fetched through `wr_advance`); `wr_done`
// pulses when the last word was sent. The AXI DMA itself is a vendor block
// outside this module: its AXI4-Lite configuration slave and its two
// streams are ports here, and its two memory masters go straight to DDR.
// The split into trigger, read side, write side and vendor DMA, and the two
// modes, follow the design; the request/done handshakes and taking the
// write length in bytes (NOB, sent as NOB/4 words) are this design's own
// choices.
module memory_module
  import hm_pkg::*;
#(
  parameter logic [ADDR_W-1:0] DMA_BASE = 32'h0000_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              read_req,
  input  logic              write_req,
  input  logic [DATA_W-1:0] rd_nbytes,
  input  logic [DATA_W-1:0] wr_nbytes,
  input  logic              rd_enable,
  input  logic              rd_drain,
  input  logic              wr_abort,
  // read side
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_valid,
  output logic              rd_last,
  output logic              rd_available,
  output logic              rd_draining,
  // write side
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_advance,
  output logic              wr_done,
  output logic              wr_active,
  output logic              trig_busy,
  // DMA
  output axil_req_t         m_axil_dma,
  input  axil_rsp_t         m_axil_dma_rsp,
  input  axis_t             s_axis_mm2s,
  output logic              s_axis_mm2s_tready,
  output axis_t             m_axis_s2mm,
  input  logic              m_axis_s2mm_tready
);

  rw_trigger #(.DMA_BASE(DMA_BASE)) u_trigger (
    .clk       (clk),
    .rst_n     (rst_n),
    .read_req  (read_req),
    .write_req (write_req),
    .rd_nbytes (rd_nbytes),
    .wr_nbytes (wr_nbytes),
    .m_axil    (m_axil_dma),
    .m_axil_rsp(m_axil_dma_rsp),
    .busy      (trig_busy)
  );

  read_memory u_read (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (rd_enable),
    .drain        (rd_drain),
    .s_axis       (s_axis_mm2s),
    .s_axis_tready(s_axis_mm2s_tready),
    .data         (rd_data),
    .valid        (rd_valid),
    .last         (rd_last),
    .available    (rd_available),
    .draining     (rd_draining)
  );

  write_memory u_write (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (write_req),
    .cancel       (wr_abort),
    .nwords       ({2'b00, wr_nbytes[DATA_W-1:2]}),
    .data         (wr_data),
    .advance      (wr_advance),
    .m_axis       (m_axis_s2mm),
    .m_axis_tready(m_axis_s2mm_tready),
    .done         (wr_done),
    .active       (wr_active)
  );

endmodule
