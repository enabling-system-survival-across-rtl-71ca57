// Hash keys: the 128-bit register that keeps the first key of a key cycle.
//
// The first key is produced right after the secure guest has run; later keys
// of the same non-secure window are compared against it. `store` loads
// `key_in` on the clock edge; `clear` (the controller's RESET state) zeroes
// it and wins over `store`. The stored key is visible the next cycle.
// The 128-bit register loaded on a store signal follows the design; the
// clear input and its priority are this design's own choice.
module hash_keys
  import hm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             store,
  input  logic [KEY_W-1:0] key_in,
  output logic [KEY_W-1:0] key_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      key_q <= '0;
    else if (clear)  key_q <= '0;
    else if (store)  key_q <= key_in;
  end

endmodule
