// Health-monitor Mechanism Controller: the nine-state machine that runs key
// cycles, checkpoints and recoveries.
//
// Normal flow. Software starts a key cycle when it hands the CPU to the
// non-secure guest (`start`). The controller triggers a DMA read of the
// secure memory and waits in IDLE until data is available, then hashes it
// in FUNCTION (one word per clock, each word also captured as a checkpoint
// candidate). When the last word is in, the first key of the cycle is
// stored (SAVE HASH); every later key is compared with it (COMPARE). After
// SAVE HASH or a match, NEW READ starts the next read pass, so keys keep
// being checked for as long as the non-secure guest runs. A match also
// confirms the captured image as the new checkpoint (`commit`).
// Error flow. A mismatch goes to ERROR, which raises the error flag and
// returns to IDLE with no new read. When software signals the switch back
// to the secure side (`cs`), the controller restores the secure memory:
// from the healthy RAM image (RAM RECOVERY) if one exists and Error_c, the
// count of consecutive windows that ended in an error, is at most
// ERR_LIMIT; otherwise from the ROM image (ROM RECOVERY). The end of the
// DMA write stream (`wr_done`) clears the flag and returns to IDLE.
// Reset flow. A hardware reset or `sw_reset` enters RESET for one cycle:
// saved key, match bit, error flag and the key cycle are cleared, the RAM
// checkpoint is dropped (`drop`: the RAM images count as empty) and an
// in-flight read stream is drained.
//
// The states, their numbers and the transition conditions follow the
// design's state diagram. This design's own choices: the recovery is
// entered on error AND `cs`; a comparison that ends after `cs` is dropped
// (the secure guest may already be writing its memory); the RAM images are
// cleared by invalidating the checkpoint rather than by writing zeros;
// Error_c counts consecutive windows that ended in a recovery: it is
// cleared by a switch back to the secure side with no error pending and by
// a ROM recovery, and survives a software reset; a ROM recovery also
// discards the RAM checkpoint.
//
// Counters: RCC = cycles of the last recovery, HCC = cycles of the last
// completed hashing pass (FUNCTION cycles), NoC = checkpoints made, NoR = restores.
module control_unit
  import hm_pkg::*;
#(
  parameter int unsigned ERR_LIMIT = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the register interface
  input  logic        sw_reset,
  input  logic        start,
  input  logic        cs,
  // from the memory module
  input  logic        rd_available,
  input  logic        rd_draining,
  input  logic        rd_valid,
  input  logic        rd_last,
  input  logic        wr_done,
  // from detection / checkpoint
  input  logic        keys_equal,
  input  logic        checkpoint_valid,
  // to the memory module
  output logic        read_req,
  output logic        write_req,
  output logic        rd_enable,
  output logic        rd_drain,
  output logic        wr_abort,
  // to the detection module
  output logic        det_clear,
  output logic        hash_init,
  output logic        hash_en,
  output logic        key_store,
  output logic        cmp_en,
  // to the checkpoint module
  output logic        cap_start,
  output logic        cap_valid,
  output logic        cap_last,
  output logic        commit,
  output logic        drop,
  output logic        rst_start,
  output logic        use_rom,
  // status
  output hm_state_e   state,
  output logic        error,
  output logic        status_ok,
  output logic        ns_running,
  output logic [3:0]  error_c,
  output logic [31:0] rcc,
  output logic [31:0] hcc,
  output logic [31:0] noc,
  output logic [31:0] nor_cnt
);

  hm_state_e state_d;
  logic      hash_saved, start_pend, rec_req, rd_inflight;
  logic      go_ram, go_rom, issue_read;
  logic [31:0] hcc_run;

  // Recovery choice as seen from IDLE.
  assign go_ram = rec_req && checkpoint_valid && (32'(error_c) <= ERR_LIMIT);
  assign go_rom = rec_req && !go_ram;

  always_comb begin
    state_d    = state;
    read_req   = 1'b0;
    write_req  = 1'b0;
    rd_enable  = 1'b0;
    rd_drain   = 1'b0;
    wr_abort   = 1'b0;
    det_clear  = 1'b0;
    hash_init  = 1'b0;
    hash_en    = 1'b0;
    key_store  = 1'b0;
    cmp_en     = 1'b0;
    cap_start  = 1'b0;
    cap_valid  = 1'b0;
    cap_last   = 1'b0;
    commit     = 1'b0;
    rst_start  = 1'b0;
    use_rom    = 1'b0;
    issue_read = 1'b0;
    unique case (state)
      S_RESET: begin
        det_clear = 1'b1;
        rd_drain  = rd_inflight;
        wr_abort  = 1'b1;
        if (!sw_reset) state_d = S_IDLE;
      end
      S_IDLE: begin
        if (sw_reset) begin
          state_d = S_RESET;
        end else if (go_ram || go_rom) begin
          state_d   = go_ram ? S_RAM_RECOVERY : S_ROM_RECOVERY;
          write_req = 1'b1;
          rst_start = 1'b1;
          use_rom   = go_rom;
        end else if (!error && start_pend && !rd_draining) begin
          issue_read = 1'b1;
        end else if (!error && rd_available) begin
          state_d = S_FUNCTION;
        end
      end
      S_FUNCTION: begin
        rd_enable = 1'b1;
        hash_en   = rd_valid;
        cap_valid = rd_valid;
        cap_last  = rd_last;
        if (sw_reset)     state_d = S_RESET;
        else if (rd_last) state_d = hash_saved ? S_COMPARE : S_SAVE_HASH;
      end
      S_SAVE_HASH: begin
        key_store = 1'b1;
        state_d   = sw_reset ? S_RESET : S_NEW_READ;
      end
      S_COMPARE: begin
        cmp_en = 1'b1;
        if (sw_reset) begin
          state_d = S_RESET;
        end else if (!ns_running || keys_equal) begin
          commit  = ns_running;
          state_d = S_NEW_READ;
        end else begin
          state_d = S_ERROR;
        end
      end
      S_ERROR: state_d = S_IDLE;
      S_NEW_READ: begin
        issue_read = ns_running && !sw_reset && !rd_draining;
        state_d    = sw_reset ? S_RESET : S_IDLE;
      end
      S_RAM_RECOVERY, S_ROM_RECOVERY: begin
        if (wr_done) state_d = S_IDLE;
      end
      default: state_d = S_RESET;
    endcase
    if (issue_read) begin
      read_req  = 1'b1;
      hash_init = 1'b1;
      cap_start = 1'b1;
    end
  end

  assign drop = (state == S_RESET) || ((state == S_ROM_RECOVERY) && wr_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RESET;
      error       <= 1'b0;
      error_c     <= '0;
      hash_saved  <= 1'b0;
      start_pend  <= 1'b0;
      rec_req     <= 1'b0;
      ns_running  <= 1'b0;
      rd_inflight <= 1'b0;
      rcc         <= '0;
      hcc         <= '0;
      hcc_run     <= '0;
      noc         <= '0;
      nor_cnt     <= '0;
    end else begin
      state <= state_d;

      if (start) start_pend <= 1'b1;
      if (cs) begin
        ns_running <= 1'b0;
        if (error || state == S_ERROR) rec_req <= 1'b1;
        else if (!rec_req)             error_c <= '0;
      end

      if (read_req) rd_inflight <= 1'b1;
      else if (rd_last || rd_drain) rd_inflight <= 1'b0;

      if (issue_read && state == S_IDLE) begin
        start_pend <= start;
        ns_running <= 1'b1;
      end

      unique case (state)
        S_RESET: begin
          error      <= 1'b0;
          hash_saved <= 1'b0;
          rec_req    <= 1'b0;
          ns_running <= 1'b0;
          start_pend <= start;
        end
        S_IDLE: begin
          if (state_d == S_FUNCTION) hcc_run <= '0;
          if (state_d == S_RAM_RECOVERY || state_d == S_ROM_RECOVERY) rcc <= 32'd1;
        end
        S_FUNCTION: begin
          hcc_run <= hcc_run + 1'b1;
          if (rd_last) hcc <= hcc_run + 1'b1;
        end
        S_SAVE_HASH: hash_saved <= 1'b1;
        S_COMPARE: if (commit) noc <= noc + 1'b1;
        S_ERROR: begin
          error <= 1'b1;
          if (error_c != '1) error_c <= error_c + 1'b1;
        end
        S_RAM_RECOVERY, S_ROM_RECOVERY: begin
          rcc <= rcc + 1'b1;
          if (wr_done) begin
            error      <= 1'b0;
            rec_req    <= 1'b0;
            hash_saved <= 1'b0;
            nor_cnt    <= nor_cnt + 1'b1;
            if (state == S_ROM_RECOVERY) error_c <= '0;
          end
        end
        default: ;
      endcase
    end
  end

  assign status_ok = !error && !rec_req &&
                     (state != S_ERROR) &&
                     (state != S_RAM_RECOVERY) && (state != S_ROM_RECOVERY);

endmodule
