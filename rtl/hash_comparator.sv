// Hash comparator: tells whether the current key equals the stored key.
//
// `keys_equal` is the combinational comparison, used by the controller in
// its COMPARE state to pick the next state in the same cycle. `hash_match`
// is the registered "Hash match" bit: it is written with the comparison
// result on every cycle `en` is high, cleared by `clear` (RESET state), and
// otherwise holds. Giving the comparison combinationally as well is a choice
// of this design.
module hash_comparator
  import hm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clear,
  input  logic [KEY_W-1:0] key_a,
  input  logic [KEY_W-1:0] key_b,
  output logic             keys_equal,
  output logic             hash_match
);

  assign keys_equal = (key_a == key_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     hash_match <= 1'b0;
    else if (clear) hash_match <= 1'b0;
    else if (en)    hash_match <= keys_equal;
  end

endmodule
