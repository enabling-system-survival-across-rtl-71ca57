// Write/Read Trigger: starts the DMA read or write channel over AXI4-Lite.
//
// Software sets up the DMA channels once (control word, source and
// destination addresses). A transfer of a simple-mode AXI DMA then starts
// when its length register is written, so this block only writes that
// register: `read_req` writes `nbytes` to the MM2S (memory-to-stream, read)
// length register, `write_req` to the S2MM (stream-to-memory, write) one.
// Requests are latched, one of each kind; if both are pending the read goes
// first. Each write is one AW+W beat (issued together, each held until its
// own handshake) followed by the B response; `busy` is high from the request
// until the response. The length register offsets follow the Xilinx AXI DMA
// register map and are a choice of this design.
module rw_trigger
  import hm_pkg::*;
#(
  parameter logic [ADDR_W-1:0] DMA_BASE        = 32'h0000_0000,
  parameter logic [ADDR_W-1:0] MM2S_LENGTH_OFF = 32'h0000_0028,
  parameter logic [ADDR_W-1:0] S2MM_LENGTH_OFF = 32'h0000_0058
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              read_req,
  input  logic              write_req,
  input  logic [DATA_W-1:0] rd_nbytes,
  input  logic [DATA_W-1:0] wr_nbytes,
  output axil_req_t         m_axil,
  input  axil_rsp_t         m_axil_rsp,
  output logic              busy
);

  typedef enum logic [1:0] {T_IDLE, T_ADDR, T_RESP} trig_state_e;

  trig_state_e       st;
  logic              pend_rd, pend_wr;
  logic              aw_done, w_done;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= T_IDLE;
      pend_rd <= 1'b0;
      pend_wr <= 1'b0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      addr_q  <= '0;
      data_q  <= '0;
    end else begin
      if (read_req)  pend_rd <= 1'b1;
      if (write_req) pend_wr <= 1'b1;
      unique case (st)
        T_IDLE: begin
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (pend_rd) begin
            pend_rd <= read_req;
            addr_q  <= DMA_BASE + MM2S_LENGTH_OFF;
            data_q  <= rd_nbytes;
            st      <= T_ADDR;
          end else if (pend_wr) begin
            pend_wr <= write_req;
            addr_q  <= DMA_BASE + S2MM_LENGTH_OFF;
            data_q  <= wr_nbytes;
            st      <= T_ADDR;
          end
        end
        T_ADDR: begin
          if (m_axil.awvalid && m_axil_rsp.awready) aw_done <= 1'b1;
          if (m_axil.wvalid && m_axil_rsp.wready)   w_done  <= 1'b1;
          if ((aw_done || m_axil_rsp.awready) && (w_done || m_axil_rsp.wready))
            st <= T_RESP;
        end
        T_RESP: if (m_axil_rsp.bvalid) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    m_axil         = AXIL_REQ_IDLE;
    m_axil.awaddr  = addr_q;
    m_axil.awvalid = (st == T_ADDR) && !aw_done;
    m_axil.wdata   = data_q;
    m_axil.wstrb   = 4'hF;
    m_axil.wvalid  = (st == T_ADDR) && !w_done;
    m_axil.bready  = (st == T_RESP);
    m_axil.rready  = 1'b1;
  end

  assign busy = (st != T_IDLE) || pend_rd || pend_wr;

endmodule
