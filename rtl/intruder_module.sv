// Intruder module: a test agent that corrupts the secure memory on demand,
// standing in for a non-secure guest that has slipped past TrustZone.
//
// Software (or any AXI master) sets two registers through an AXI4-Lite
// slave: 0x0 the secure address to hit, 0x4 the value to write. The write
// fires when the non-secure guest is scheduled AND the error trigger (a
// board switch) is on: each rising edge of that AND issues one write of
// the value to the address over the AXI master towards DDR. Because the
// master is a secure bus agent, TrustZone does not flag the access. The
// AND of the two control inputs is the design's; firing once per rising
// edge, the register offsets and single-beat AXI4-Lite writes are choices
// of this design. `hits` counts completed writes.
module intruder_module
  import hm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ns_schedule,
  input  logic        error_trigger,
  input  axil_req_t   s_axil,
  output axil_rsp_t   s_axil_rsp,
  output axil_req_t   m_axil,
  input  axil_rsp_t   m_axil_rsp,
  output logic [31:0] hits
);

  typedef enum logic [1:0] {I_IDLE, I_ADDR, I_RESP} intr_state_e;

  logic              wr_en, rd_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic [ADDR_W-1:0] target_addr;
  logic [DATA_W-1:0] target_value;
  logic              fire, fire_q, aw_done, w_done;
  intr_state_e       st;

  axil_slave u_axil (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_axil    (s_axil),
    .s_axil_rsp(s_axil_rsp),
    .wr_en     (wr_en),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .rd_en     (rd_en),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data)
  );

  assign rd_data = rd_addr[2] ? target_value : target_addr;
  assign fire    = ns_schedule && error_trigger;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target_addr  <= '0;
      target_value <= '0;
      fire_q       <= 1'b0;
      st           <= I_IDLE;
      aw_done      <= 1'b0;
      w_done       <= 1'b0;
      hits         <= '0;
    end else begin
      if (wr_en) begin
        if (wr_addr[2]) target_value <= wr_data;
        else            target_addr  <= wr_data;
      end
      fire_q <= fire;
      unique case (st)
        I_IDLE: begin
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (fire && !fire_q) st <= I_ADDR;
        end
        I_ADDR: begin
          if (m_axil.awvalid && m_axil_rsp.awready) aw_done <= 1'b1;
          if (m_axil.wvalid && m_axil_rsp.wready)   w_done  <= 1'b1;
          if ((aw_done || m_axil_rsp.awready) && (w_done || m_axil_rsp.wready))
            st <= I_RESP;
        end
        I_RESP: if (m_axil_rsp.bvalid) begin
          st   <= I_IDLE;
          hits <= hits + 1'b1;
        end
        default: st <= I_IDLE;
      endcase
    end
  end

  always_comb begin
    m_axil         = AXIL_REQ_IDLE;
    m_axil.awaddr  = target_addr;
    m_axil.awvalid = (st == I_ADDR) && !aw_done;
    m_axil.wdata   = target_value;
    m_axil.wstrb   = 4'hF;
    m_axil.wvalid  = (st == I_ADDR) && !w_done;
    m_axil.bready  = (st == I_RESP);
    m_axil.rready  = 1'b1;
  end

endmodule
