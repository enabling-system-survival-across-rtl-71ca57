// RAM Image: one checkpoint memory of DEPTH 32-bit words.
//
// Two of these hold the secure-memory checkpoints: one keeps the last image
// confirmed healthy, the other receives the image being captured. Simple
// dual-port: one synchronous write port and one read port whose data is
// registered (read every cycle, data one clock after the address), which
// maps onto block RAM. Word addresses at or above DEPTH are ignored on
// write and read back as 0. DEPTH 38400 words
// is 150 KB, the size of each image memory in the design; how an FPGA
// splits it between block RAM and LUT RAM is left to synthesis.
// The size follows the design; the port structure and the out-of-range
// behaviour are this design's own choices.
module ram_image
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 38400
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (waddr < DEPTH)) mem[waddr] <= wdata;
    rdata <= (raddr < DEPTH) ? mem[raddr] : '0;
  end

endmodule
