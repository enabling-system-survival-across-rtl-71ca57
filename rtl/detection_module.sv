// Detection module: decides whether the secure memory changed during the
// non-secure guest's window.
//
// It wires the hash function, the hash-key register and the comparator:
// the running key goes both to the key register (stored on `key_store`, the
// SAVE HASH state) and to the comparator, which checks it against the
// stored key while `cmp_en` is high (COMPARE state). `hash_init` starts a
// new key, `hash_en` feeds one 32-bit word. `clear` empties the stored key
// and the match bit (RESET state). All sub-blocks are clocked; a key is
// complete one cycle after its last word.
// The three sub-blocks and their connections follow the design; the
// one-cycle key latency and the clear input are this design's own choices.
module detection_module
  import hm_pkg::*;
#(
  parameter hash_algo_e ALGO = HASH_FNV1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              hash_init,
  input  logic              hash_en,
  input  logic [DATA_W-1:0] data,
  input  logic              key_store,
  input  logic              cmp_en,
  output logic              keys_equal,
  output logic              hash_match,
  output logic [KEY_W-1:0]  key,
  output logic [KEY_W-1:0]  saved_key
);

  hash_function #(.ALGO(ALGO)) u_hash (
    .clk  (clk),
    .rst_n(rst_n),
    .init (hash_init),
    .en   (hash_en),
    .data (data),
    .key  (key)
  );

  hash_keys u_keys (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (clear),
    .store (key_store),
    .key_in(key),
    .key_q (saved_key)
  );

  hash_comparator u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (cmp_en),
    .clear     (clear),
    .key_a     (key),
    .key_b     (saved_key),
    .keys_equal(keys_equal),
    .hash_match(hash_match)
  );

endmodule
