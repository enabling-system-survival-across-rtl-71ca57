// Checkpoint module: keeps sane images of the secure memory and supplies
// one when the memory must be restored.
//
// Three memories of DEPTH words: the ROM image (first image after power-on,
// then read-only) and two RAM images used in rotation, one always holding
// the last image confirmed by the detection module, the other receiving the
// image captured during the current key cycle. The memory selector
// generates all addresses and chooses RAM or ROM data for a recovery.
// Captured words arrive on `cap_data`/`cap_valid` at one per clock;
// restored words leave on `restored_data`, next word one clock after
// `rst_advance`. Control inputs are described in the memory selector.
// The ROM and two RAMs, their 150 KB size and the RAM rotation follow the
// design; recording the ROM from the first pass instead of pre-loading it
// is this design's own choice.
module checkpoint_module
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 38400
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cap_start,
  input  logic              cap_valid,
  input  logic              cap_last,
  input  logic [DATA_W-1:0] cap_data,
  input  logic              commit,
  input  logic              drop,
  input  logic              rst_start,
  input  logic              rst_advance,
  input  logic              use_rom,
  output logic [DATA_W-1:0] restored_data,
  output logic              checkpoint_valid,
  output logic              healthy_sel,
  output logic              rom_locked
);

  logic              ram_we [2];
  logic [ADDR_W-1:0] ram_waddr, ram_raddr;
  logic [DATA_W-1:0] ram_wdata;
  logic [DATA_W-1:0] ram_rdata [2];
  logic              rom_we, rom_lock, rom_is_locked;
  logic [DATA_W-1:0] rom_rdata;

  memory_selector u_sel (
    .clk             (clk),
    .rst_n           (rst_n),
    .cap_start       (cap_start),
    .cap_valid       (cap_valid),
    .cap_last        (cap_last),
    .cap_data        (cap_data),
    .commit          (commit),
    .drop            (drop),
    .rst_start       (rst_start),
    .rst_advance     (rst_advance),
    .use_rom         (use_rom),
    .restored_data   (restored_data),
    .checkpoint_valid(checkpoint_valid),
    .healthy_sel     (healthy_sel),
    .rom_locked      (rom_locked),
    .ram_we          (ram_we),
    .ram_waddr       (ram_waddr),
    .ram_wdata       (ram_wdata),
    .ram_raddr       (ram_raddr),
    .ram_rdata       (ram_rdata),
    .rom_we          (rom_we),
    .rom_lock        (rom_lock),
    .rom_is_locked   (rom_is_locked),
    .rom_rdata       (rom_rdata)
  );

  for (genvar i = 0; i < 2; i++) begin : g_ram
    ram_image #(.DEPTH(DEPTH)) u_ram (
      .clk  (clk),
      .we   (ram_we[i]),
      .waddr(ram_waddr),
      .wdata(ram_wdata),
      .raddr(ram_raddr),
      .rdata(ram_rdata[i])
    );
  end

  rom_image #(.DEPTH(DEPTH)) u_rom (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (rom_we),
    .lock  (rom_lock),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .raddr (ram_raddr),
    .rdata (rom_rdata),
    .locked(rom_is_locked)
  );

endmodule
