// One 32-bit hash lane: folds one byte into a running 32-bit hash per clock.
//
// Four lanes side by side form the 128-bit key of the hash function. The
// lane keeps its state in a register: `init` loads the algorithm's start
// value (the "setup" cycle), `en` folds `byte_in` into it. The new value is
// visible on `hash` the cycle after `en`.
//
// Algorithms follow the byte-wise flowcharts of the candidate functions:
//   FNV-1   h = (h * 16777619) ^ b, start 0x811c9dc5
//   FNV-1a  h = (h ^ b) * 16777619, start 0x811c9dc5
//   SDBM    h = b + (h << 6) + (h << 16) - h, start 0
//   DJB2    h = (h << 5) + h + b, start 5381
//   CRC32   h = (h << 8) ^ T[(h >> 24) ^ b], start 0xFFFFFFFF, poly 0x04C11DB7
// CRC32 is computed bit-serially inside one clock instead of through the
// 256-entry lookup table; both give the same value. SDBM's start value is
// not given and is 0 here, as in the usual SDBM code.
// The update rules and start values follow the candidate algorithms named
// by the design; splitting the key into four byte lanes is the design's, the
// byte-to-lane order is this design's own choice.
module hash_lane
  import hm_pkg::*;
#(
  parameter hash_algo_e ALGO = HASH_FNV1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  byte_in,
  output logic [31:0] hash
);

  function automatic logic [31:0] start_value(hash_algo_e a);
    case (a)
      HASH_FNV1, HASH_FNV1A: return FNV_OFFSET_32;
      HASH_DJB2:             return DJB2_START;
      HASH_CRC32:            return CRC32_START;
      default:               return 32'd0;
    endcase
  endfunction

  function automatic logic [31:0] crc_step(logic [31:0] h, logic [7:0] b);
    logic [31:0] c;
    c = h ^ {b, 24'd0};
    for (int j = 0; j < 8; j++) begin
      if (c[31]) c = (c << 1) ^ CRC32_POLY;
      else       c = c << 1;
    end
    return c;
  endfunction

  logic [31:0] next;

  always_comb begin
    unique case (ALGO)
      HASH_FNV1:  next = (hash * FNV_PRIME_32) ^ {24'd0, byte_in};
      HASH_FNV1A: next = (hash ^ {24'd0, byte_in}) * FNV_PRIME_32;
      HASH_SDBM:  next = {24'd0, byte_in} + (hash << 6) + (hash << 16) - hash;
      HASH_DJB2:  next = (hash << 5) + hash + {24'd0, byte_in};
      HASH_CRC32: next = crc_step(hash, byte_in);
      default:    next = hash;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    hash <= start_value(ALGO);
    else if (init) hash <= start_value(ALGO);
    else if (en)   hash <= next;
  end

endmodule
