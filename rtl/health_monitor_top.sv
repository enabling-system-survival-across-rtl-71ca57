// Health-monitor: hardware that detects and repairs changes made to the
// secure-world memory of a TrustZone system while the non-secure guest runs.
//
// When the hypervisor hands the CPU to the non-secure guest it writes the
// secure memory size to TRIG. The controller then reads the secure memory
// through the DMA again and again, hashing each pass into a 128-bit key:
// the first key is stored, every later key must equal it. Each pass is also
// captured into a checkpoint RAM; a matching key turns that capture into
// the new healthy checkpoint. A mismatch raises the error flag; when the
// hypervisor switches back (CS) it waits on STATUS while the memory is
// written back from the healthy RAM checkpoint or, when the window made no
// checkpoint or more than ERR_LIMIT windows in a row ended in an error,
// from the ROM image recorded at power-on. Writing 0 to TRIG (done before
// every window) resets the key cycle and drops the RAM checkpoint.
//
// Inside: register interface (hm_registers), controller (control_unit),
// detection module, memory module and checkpoint module, plus the intruder
// module used to inject an attack. The AXI DMA, the processor and the DDR
// are outside: the DMA's configuration port and both of its streams, the
// CPU's register port, the intruder's configuration port and its AXI
// master to DDR are the ports of this module. One clock, active-low async
// reset. A pass moves one 32-bit word per clock.
// The four-part structure (detection, memory and checkpoint modules,
// controller) with its register interface and the intruder follow the
// design; the port bundling into structs and the observation outputs are
// this design's own choices.
module health_monitor_top
  import hm_pkg::*;
#(
  parameter int unsigned       DEPTH     = 38400,
  parameter int unsigned       ERR_LIMIT = 5,
  parameter hash_algo_e        ALGO      = HASH_FNV1,
  parameter logic [ADDR_W-1:0] DMA_BASE  = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // hypervisor register port
  input  axil_req_t   s_axil_hm,
  output axil_rsp_t   s_axil_hm_rsp,
  // intruder configuration port and its master towards DDR
  input  axil_req_t   s_axil_intr,
  output axil_rsp_t   s_axil_intr_rsp,
  output axil_req_t   m_axil_intr,
  input  axil_rsp_t   m_axil_intr_rsp,
  input  logic        error_trigger,
  // AXI DMA
  output axil_req_t   m_axil_dma,
  input  axil_rsp_t   m_axil_dma_rsp,
  input  axis_t       s_axis_mm2s,
  output logic        s_axis_mm2s_tready,
  output axis_t       m_axis_s2mm,
  input  logic        m_axis_s2mm_tready,
  // observation
  output hm_state_e   state,
  output logic        error,
  output logic        hash_match,
  output logic        ns_running,
  output logic        checkpoint_valid,
  output logic        healthy_sel,
  output logic        rom_locked,
  output logic [3:0]  error_c
);

  // register interface
  logic [DATA_W-1:0] nbytes, trig_bytes;
  logic              trig_start, trig_reset, cs;
  logic [31:0]       rcc, hcc, noc, nor_cnt;
  logic              status_ok;
  // controller
  logic read_req, write_req, rd_enable, rd_drain, wr_abort;
  logic det_clear, hash_init, hash_en, key_store, cmp_en;
  logic cap_start, cap_valid, cap_last, commit, drop, rst_start, use_rom;
  // datapath
  logic [DATA_W-1:0] rd_data, restored_data;
  logic              rd_valid, rd_last, rd_available, rd_draining;
  logic              wr_advance, wr_done, wr_active, trig_busy;
  logic              keys_equal;
  logic [KEY_W-1:0]  key, saved_key;
  logic [31:0]       intr_hits;

  hm_registers u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_axil    (s_axil_hm),
    .s_axil_rsp(s_axil_hm_rsp),
    .rcc       (rcc),
    .hcc       (hcc),
    .noc       (noc),
    .nor_cnt   (nor_cnt),
    .status_ok (status_ok),
    .nbytes    (nbytes),
    .trig_bytes(trig_bytes),
    .trig_start(trig_start),
    .trig_reset(trig_reset),
    .cs        (cs)
  );

  control_unit #(.ERR_LIMIT(ERR_LIMIT)) u_ctrl (
    .clk             (clk),
    .rst_n           (rst_n),
    .sw_reset        (trig_reset),
    .start           (trig_start),
    .cs              (cs),
    .rd_available    (rd_available),
    .rd_draining     (rd_draining),
    .rd_valid        (rd_valid),
    .rd_last         (rd_last),
    .wr_done         (wr_done),
    .keys_equal      (keys_equal),
    .checkpoint_valid(checkpoint_valid),
    .read_req        (read_req),
    .write_req       (write_req),
    .rd_enable       (rd_enable),
    .rd_drain        (rd_drain),
    .wr_abort        (wr_abort),
    .det_clear       (det_clear),
    .hash_init       (hash_init),
    .hash_en         (hash_en),
    .key_store       (key_store),
    .cmp_en          (cmp_en),
    .cap_start       (cap_start),
    .cap_valid       (cap_valid),
    .cap_last        (cap_last),
    .commit          (commit),
    .drop            (drop),
    .rst_start       (rst_start),
    .use_rom         (use_rom),
    .state           (state),
    .error           (error),
    .status_ok       (status_ok),
    .ns_running      (ns_running),
    .error_c         (error_c),
    .rcc             (rcc),
    .hcc             (hcc),
    .noc             (noc),
    .nor_cnt         (nor_cnt)
  );

  detection_module #(.ALGO(ALGO)) u_det (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (det_clear),
    .hash_init (hash_init),
    .hash_en   (hash_en),
    .data      (rd_data),
    .key_store (key_store),
    .cmp_en    (cmp_en),
    .keys_equal(keys_equal),
    .hash_match(hash_match),
    .key       (key),
    .saved_key (saved_key)
  );

  memory_module #(.DMA_BASE(DMA_BASE)) u_mem (
    .clk               (clk),
    .rst_n             (rst_n),
    .read_req          (read_req),
    .write_req         (write_req),
    .rd_nbytes         (trig_bytes),
    .wr_nbytes         (nbytes),
    .rd_enable         (rd_enable),
    .rd_drain          (rd_drain),
    .wr_abort          (wr_abort),
    .rd_data           (rd_data),
    .rd_valid          (rd_valid),
    .rd_last           (rd_last),
    .rd_available      (rd_available),
    .rd_draining       (rd_draining),
    .wr_data           (restored_data),
    .wr_advance        (wr_advance),
    .wr_done           (wr_done),
    .wr_active         (wr_active),
    .trig_busy         (trig_busy),
    .m_axil_dma        (m_axil_dma),
    .m_axil_dma_rsp    (m_axil_dma_rsp),
    .s_axis_mm2s       (s_axis_mm2s),
    .s_axis_mm2s_tready(s_axis_mm2s_tready),
    .m_axis_s2mm       (m_axis_s2mm),
    .m_axis_s2mm_tready(m_axis_s2mm_tready)
  );

  checkpoint_module #(.DEPTH(DEPTH)) u_ckpt (
    .clk             (clk),
    .rst_n           (rst_n),
    .cap_start       (cap_start),
    .cap_valid       (cap_valid),
    .cap_last        (cap_last),
    .cap_data        (rd_data),
    .commit          (commit),
    .drop            (drop),
    .rst_start       (rst_start),
    .rst_advance     (wr_advance),
    .use_rom         (use_rom),
    .restored_data   (restored_data),
    .checkpoint_valid(checkpoint_valid),
    .healthy_sel     (healthy_sel),
    .rom_locked      (rom_locked)
  );

  intruder_module u_intr (
    .clk          (clk),
    .rst_n        (rst_n),
    .ns_schedule  (ns_running),
    .error_trigger(error_trigger),
    .s_axil       (s_axil_intr),
    .s_axil_rsp   (s_axil_intr_rsp),
    .m_axil       (m_axil_intr),
    .m_axil_rsp   (m_axil_intr_rsp),
    .hits         (intr_hits)
  );

endmodule
