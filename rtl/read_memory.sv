// Read Memory: turns the DMA read stream into 32-bit words for the
// detection and checkpoint modules.
//
// While `enable` is high (the controller's FUNCTION state) the block is
// ready, and every accepted beat is given out for one cycle on `data` with
// `valid` (and `last` on the stream's final beat). While it is not enabled
// the first beat waits in the stream and `available` tells the controller
// that data is there. `drain` (set by a reset of the key cycle) makes the
// block accept and throw away beats until the end of the current stream,
// so an aborted transfer cannot leak into the next key cycle. The output is
// combinational from the stream: zero latency, one word per clock. Holding
// ready low outside FUNCTION and the drain behaviour are this design's
// choices. `draining` is high while an aborted stream is being discarded;
// no new read may start until it falls.
module read_memory
  import hm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              drain,
  input  axis_t             s_axis,
  output logic              s_axis_tready,
  output logic [DATA_W-1:0] data,
  output logic              valid,
  output logic              last,
  output logic              available,
  output logic              draining
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) draining <= 1'b0;
    else if (drain) draining <= 1'b1;
    else if (draining && s_axis.tvalid && s_axis.tlast) draining <= 1'b0;
  end

  assign s_axis_tready = draining || (enable && !drain);
  assign valid         = s_axis.tvalid && s_axis_tready && !draining;
  assign last          = valid && s_axis.tlast;
  assign data          = s_axis.tdata;
  assign available     = s_axis.tvalid && !draining && !drain;

endmodule
