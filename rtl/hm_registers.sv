// Health-monitor register interface: the memory-mapped registers through
// which the hypervisor drives and observes the Health-monitor.
//
//   0x00 RCC    (ro) clock cycles of the last recovery
//   0x04 HCC    (ro) clock cycles of the last hashing pass
//   0x08 NoC    (ro) number of checkpoints made
//   0x0C NoR    (ro) number of restores made
//   0x10 NOB    (rw) bytes of secure memory (length of recovery writes)
//   0x14 TRIG   (rw) write 0: reset the key cycle; write N>0: start a key
//                    cycle reading N bytes (done when leaving the secure
//                    guest for the non-secure one)
//   0x18 CS     (wo) any write: the hypervisor is switching back to the
//                    secure side (starts a pending recovery)
//   0x1C STATUS (ro) 1 when no error and no recovery is pending, else 0;
//                    the hypervisor waits for 1 before running the secure
//                    guest
// Only address bits [4:2] are decoded. The RCC and HCC offsets are the
// design's; the other offsets, and reading STATUS as 1 for "healthy", are
// choices of this design. Command outputs (`trig_start`, `trig_reset`,
// `cs`) pulse for one cycle on the register write.
module hm_registers
  import hm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_axil,
  output axil_rsp_t         s_axil_rsp,
  input  logic [31:0]       rcc,
  input  logic [31:0]       hcc,
  input  logic [31:0]       noc,
  input  logic [31:0]       nor_cnt,
  input  logic              status_ok,
  output logic [DATA_W-1:0] nbytes,
  output logic [DATA_W-1:0] trig_bytes,
  output logic              trig_start,
  output logic              trig_reset,
  output logic              cs
);

  localparam logic [2:0] R_RCC = 3'd0, R_HCC = 3'd1, R_NOC = 3'd2, R_NOR = 3'd3,
                         R_NOB = 3'd4, R_TRIG = 3'd5, R_CS = 3'd6, R_STAT = 3'd7;

  logic              wr_en, rd_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [DATA_W-1:0] wr_data, rd_data;

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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbytes     <= '0;
      trig_bytes <= '0;
      trig_start <= 1'b0;
      trig_reset <= 1'b0;
      cs         <= 1'b0;
    end else begin
      trig_start <= 1'b0;
      trig_reset <= 1'b0;
      cs         <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr[4:2])
          R_NOB: nbytes <= wr_data;
          R_TRIG: begin
            trig_bytes <= wr_data;
            if (wr_data == '0) trig_reset <= 1'b1;
            else               trig_start <= 1'b1;
          end
          R_CS: cs <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr[4:2])
      R_RCC:   rd_data = rcc;
      R_HCC:   rd_data = hcc;
      R_NOC:   rd_data = noc;
      R_NOR:   rd_data = nor_cnt;
      R_NOB:   rd_data = nbytes;
      R_TRIG:  rd_data = trig_bytes;
      R_STAT:  rd_data = {31'd0, status_ok};
      default: rd_data = '0;
    endcase
  end

endmodule
