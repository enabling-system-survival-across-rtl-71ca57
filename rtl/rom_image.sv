// ROM Image: the first healthy image of the secure memory, kept read-only.
//
// The image is the secure software as it stood before either world ran, so
// its contents are not known when the hardware is built. This design
// records it once: the memory accepts writes until `lock` is pulsed (the
// end of the first read pass after power-on) and is read-only from then on;
// `locked` reports that the image exists. Reads are registered like the RAM
// images (data one clock after the address). DEPTH 38400 words = 150 KB.
module rom_image
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 38400
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              lock,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  output logic              locked
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    locked <= 1'b0;
    else if (lock) locked <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we && !locked && (waddr < DEPTH)) mem[waddr] <= wdata;
    rdata <= (raddr < DEPTH) ? mem[raddr] : '0;
  end

endmodule
