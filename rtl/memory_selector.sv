// Memory Selector: addresses the three image memories, rotates the two
// checkpoint RAMs and picks the recovery source.
//
// Capture: `cap_start` rewinds the capture address; each `cap_valid` word
// is written to the RAM that is NOT the healthy holder, and also to the ROM
// until the ROM image is locked. The ROM is locked by the end (`cap_last`)
// of the first complete pass.
// Rotation: `commit` (keys matched) makes the RAM just written the healthy
// holder, so the old holder takes the next capture: no copy between RAMs.
// `checkpoint_valid` says a healthy RAM image exists; `drop` clears it.
// Restore: `rst_start` rewinds the restore address and latches `use_rom`;
// `rst_advance` moves to the next word. Read address is computed one clock
// ahead so `restored_data` always holds the current word.
// Rotation without copying and the RAM-or-ROM choice follow the design;
// recording the ROM from the first pass, the look-ahead read address and
// the `drop` input are this design's own choices.
module memory_selector
  import hm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // capture
  input  logic              cap_start,
  input  logic              cap_valid,
  input  logic              cap_last,
  input  logic [DATA_W-1:0] cap_data,
  input  logic              commit,
  input  logic              drop,
  // restore
  input  logic              rst_start,
  input  logic              rst_advance,
  input  logic              use_rom,
  output logic [DATA_W-1:0] restored_data,
  output logic              checkpoint_valid,
  output logic              healthy_sel,
  output logic              rom_locked,
  // memory ports
  output logic              ram_we   [2],
  output logic [ADDR_W-1:0] ram_waddr,
  output logic [DATA_W-1:0] ram_wdata,
  output logic [ADDR_W-1:0] ram_raddr,
  input  logic [DATA_W-1:0] ram_rdata [2],
  output logic              rom_we,
  output logic              rom_lock,
  input  logic              rom_is_locked,
  input  logic [DATA_W-1:0] rom_rdata
);

  logic [ADDR_W-1:0] cap_idx, rst_idx;
  logic              use_rom_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_idx          <= '0;
      rst_idx          <= '0;
      use_rom_q        <= 1'b0;
      healthy_sel      <= 1'b0;
      checkpoint_valid <= 1'b0;
    end else begin
      if (cap_start)      cap_idx <= '0;
      else if (cap_valid) cap_idx <= cap_idx + 1'b1;

      if (rst_start) begin
        rst_idx   <= '0;
        use_rom_q <= use_rom;
      end else if (rst_advance) begin
        rst_idx <= rst_idx + 1'b1;
      end

      if (commit) begin
        healthy_sel      <= ~healthy_sel;
        checkpoint_valid <= 1'b1;
      end else if (drop) begin
        checkpoint_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    ram_we[0] = cap_valid && (healthy_sel == 1'b1);
    ram_we[1] = cap_valid && (healthy_sel == 1'b0);
    ram_waddr = cap_idx;
    ram_wdata = cap_data;
    rom_we    = cap_valid && !rom_is_locked;
    rom_lock  = cap_last && !rom_is_locked;
    if (rst_start)        ram_raddr = '0;
    else if (rst_advance) ram_raddr = rst_idx + 1'b1;
    else                  ram_raddr = rst_idx;
    if (use_rom_q) restored_data = rom_rdata;
    else           restored_data = ram_rdata[healthy_sel];
  end

  assign rom_locked = rom_is_locked;

endmodule
