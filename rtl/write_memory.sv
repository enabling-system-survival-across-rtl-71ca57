// Write Memory: streams a checkpoint image to the DMA write channel.
//
// `start` begins a stream of `nwords` words (zero is treated as one). The
// image memories have a one-cycle read latency, so the word is fetched one
// clock ahead: the checkpoint module moves to the next word when `advance`
// is high (a beat was accepted) and presents it on `data` the next cycle.
// The stream starts the cycle after `start`, then moves one word per clock
// while the DMA is ready. TLAST marks the last word; `done` pulses for one
// cycle when that word has been accepted ("transfer completed").
// `cancel` ends a stream early (software reset). The role, a write stream
// with TLAST and a completion pulse, follows the design; the fetch-ahead
// handshake and `cancel` are this design's own choices.
module write_memory
  import hm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              cancel,
  input  logic [DATA_W-1:0] nwords,
  input  logic [DATA_W-1:0] data,
  output logic              advance,
  output axis_t             m_axis,
  input  logic              m_axis_tready,
  output logic              done,
  output logic              active
);

  logic [DATA_W-1:0] count, total;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      count  <= '0;
      total  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cancel) begin
        active <= 1'b0;
      end else if (start) begin
        active <= 1'b1;
        count  <= '0;
        total  <= (nwords == '0) ? 32'd1 : nwords;
      end else if (advance) begin
        count <= count + 1'b1;
        if (m_axis.tlast) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign m_axis.tvalid = active;
  assign m_axis.tdata  = data;
  assign m_axis.tlast  = active && (count == total - 1'b1);
  assign advance       = active && m_axis_tready;

endmodule
