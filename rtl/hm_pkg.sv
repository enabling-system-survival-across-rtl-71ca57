// Shared types and constants of the Health-monitor.
//
// The Health-monitor hashes the secure-world memory of a TrustZone system
// while the non-secure guest runs, keeps checkpoint images of that memory
// and restores it when the key computed during the non-secure window no
// longer matches the key taken right after the secure guest ran.
//
// This package holds the bus bundles (AXI4-Lite and AXI4-Stream as packed
// structs), the hash algorithm selector and the controller state encoding.
// The state numbers 0..8 are the ones the controller diagram uses; the bus
// field subset (no PROT/USER/KEEP signals) is a choice of this design.
package hm_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned KEY_W  = 128;

  // AXI4-Lite, master-to-slave half.
  typedef struct packed {
    logic [ADDR_W-1:0] awaddr;
    logic              awvalid;
    logic [DATA_W-1:0] wdata;
    logic [3:0]        wstrb;
    logic              wvalid;
    logic              bready;
    logic [ADDR_W-1:0] araddr;
    logic              arvalid;
    logic              rready;
  } axil_req_t;

  // AXI4-Lite, slave-to-master half.
  typedef struct packed {
    logic              awready;
    logic              wready;
    logic [1:0]        bresp;
    logic              bvalid;
    logic              arready;
    logic [DATA_W-1:0] rdata;
    logic [1:0]        rresp;
    logic              rvalid;
  } axil_rsp_t;

  // AXI4-Stream forward signals; TREADY travels separately.
  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic              tlast;
    logic              tvalid;
  } axis_t;

  // Byte-wide hash algorithms that can fill one 32-bit lane of the key.
  typedef enum logic [2:0] {
    HASH_FNV1  = 3'd0,
    HASH_FNV1A = 3'd1,
    HASH_SDBM  = 3'd2,
    HASH_DJB2  = 3'd3,
    HASH_CRC32 = 3'd4
  } hash_algo_e;

  localparam logic [31:0] FNV_PRIME_32  = 32'd16777619;
  localparam logic [31:0] FNV_OFFSET_32 = 32'h811c9dc5;
  localparam logic [31:0] DJB2_START    = 32'd5381;
  localparam logic [31:0] CRC32_POLY    = 32'h04C11DB7;
  localparam logic [31:0] CRC32_START   = 32'hFFFFFFFF;

  // Controller states, numbered as in the controller state diagram.
  typedef enum logic [3:0] {
    S_RESET        = 4'd0,
    S_IDLE         = 4'd1,
    S_FUNCTION     = 4'd2,
    S_SAVE_HASH    = 4'd3,
    S_COMPARE      = 4'd4,
    S_ERROR        = 4'd5,
    S_NEW_READ     = 4'd6,
    S_RAM_RECOVERY = 4'd7,
    S_ROM_RECOVERY = 4'd8
  } hm_state_e;

  localparam axil_req_t AXIL_REQ_IDLE = '0;
  localparam axil_rsp_t AXIL_RSP_IDLE = '0;

endpackage
