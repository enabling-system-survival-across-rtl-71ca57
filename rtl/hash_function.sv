// Hash function of the detection module: 32 bits of memory per clock into a
// running 128-bit key.
//
// The secure memory is read as a stream of 32-bit words. Each word is split
// into four bytes; byte i feeds hash lane i, and lane i forms key bits
// [32i+31:32i]. Every lane feeds its own previous value back, so after the
// last word the key depends on the whole memory image, and only that final
// key is used. `init` is the one setup cycle that loads the start values;
// each `en` cycle consumes one word and the updated key appears on the next
// clock. Throughput is one word per clock, as the design requires.
//
// Four byte-wide lanes making a 128-bit key is the design's structure. The
// default algorithm, FNV-1, is this design's choice among the candidates the
// design weighed (it had the fewest collisions of the byte-wide ones); the
// others remain selectable through ALGO. Which byte drives which lane is
// also a choice made here.
module hash_function
  import hm_pkg::*;
#(
  parameter hash_algo_e ALGO = HASH_FNV1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [DATA_W-1:0] data,
  output logic [KEY_W-1:0]  key
);

  for (genvar i = 0; i < 4; i++) begin : g_lane
    hash_lane #(.ALGO(ALGO)) u_lane (
      .clk    (clk),
      .rst_n  (rst_n),
      .init   (init),
      .en     (en),
      .byte_in(data[8*i +: 8]),
      .hash   (key[32*i +: 32])
    );
  end

endmodule
