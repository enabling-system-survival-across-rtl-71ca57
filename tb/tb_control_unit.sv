// Self-checking test of the controller state machine, driven at its ports.
// It follows the state sequence of a non-secure window (IDLE, FUNCTION,
// SAVE HASH, NEW READ, then FUNCTION, COMPARE, NEW READ ...), an error
// (COMPARE, ERROR, IDLE) and its recovery after the context-switch signal,
// the RAM/ROM choice by checkpoint flag and Error_c (limit 5), a comparison
// dropped after the switch, a software reset in mid-pass (stream drain),
// the checkpoint dropped by a software reset, Error_c cleared by a switch
// with no error pending, and the HCC, RCC, NoC and NoR counters.
module tb_control_unit;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sw_reset, start, cs, rd_available, rd_valid, rd_last, rd_draining, wr_done, keys_equal, checkpoint_valid;
  logic read_req, write_req, rd_enable, rd_drain, wr_abort, det_clear, hash_init, hash_en, key_store, cmp_en;
  logic cap_start, cap_valid, cap_last, commit, drop, rst_start, use_rom;
  hm_state_e state;
  logic error, status_ok, ns_running;
  logic [3:0] error_c;
  logic [31:0] rcc, hcc, noc, nor_cnt;
  int unsigned checks = 0, failures = 0;
  int unsigned n_read = 0, n_write = 0, n_rom = 0, n_commit = 0, n_drain = 0, n_drop = 0, d0 = 0;

  control_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d)", what, state); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (read_req) n_read++;
    if (write_req) n_write++;
    if (write_req && use_rom) n_rom++;
    if (commit) n_commit++;
    if (rd_drain) n_drain++;
    if (drop) n_drop++;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  // One read pass of n words; the keys compare as `eq`.
  task automatic pass(input int n, input bit eq, input hm_state_e after);
    @(negedge clk) rd_available = 1; keys_equal = eq;
    @(negedge clk);
    check(state == S_FUNCTION && rd_enable, "data available enters FUNCTION");
    for (int i = 0; i < n; i++) begin
      rd_valid = 1; rd_last = (i == n - 1);
      #1 check(hash_en && cap_valid, "FUNCTION hashes and captures each word");
      @(negedge clk);
    end
    rd_valid = 0; rd_last = 0; rd_available = 0;
    check(state == after, $sformatf("after the last word: state %0d", after));
  endtask

  task automatic recover(input bit expect_rom);
    int w0;
    w0 = n_write;
    pulse(cs);
    @(negedge clk);
    check(state == (expect_rom ? S_ROM_RECOVERY : S_RAM_RECOVERY), expect_rom ? "ROM RECOVERY chosen" : "RAM RECOVERY chosen");
    check(n_write == w0 + 1, "one write transfer started");
    check(!status_ok, "status busy during recovery");
    repeat (30) @(negedge clk);
    pulse(wr_done);
    check(state == S_IDLE && !error && status_ok, "recovery done returns to IDLE, error cleared");
    check(rcc == 33, $sformatf("RCC counts the recovery cycles (%0d)", rcc));
  endtask

  initial begin
    {sw_reset, start, cs, rd_available, rd_valid, rd_last, rd_draining, wr_done, keys_equal} = '0;
    checkpoint_valid = 0;
    repeat (2) @(posedge clk);
    check(state == S_RESET, "hardware reset holds RESET");
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    check(state == S_IDLE, "RESET -> IDLE");
    // window 1
    pulse(start);
    @(negedge clk);
    check(n_read == 1 && ns_running, "start triggers a read, window open");
    pass(10, 1'b0, S_SAVE_HASH);
    check(hcc == 10, "HCC = one cycle per word");
    @(negedge clk);
    check(state == S_NEW_READ, "SAVE HASH -> NEW READ");
    @(negedge clk);
    check(state == S_IDLE && n_read == 2, "NEW READ triggers the next read");
    pass(10, 1'b1, S_COMPARE);
    #1 check(commit, "match commits the checkpoint");
    checkpoint_valid = 1;
    @(negedge clk);
    check(state == S_NEW_READ && noc == 1, "match -> NEW READ, NoC counts");
    @(negedge clk);
    pass(10, 1'b0, S_COMPARE);
    @(negedge clk);
    check(state == S_ERROR, "mismatch -> ERROR");
    @(negedge clk);
    check(state == S_IDLE && error && !status_ok && error_c == 1, "ERROR -> IDLE with flag");
    repeat (5) @(negedge clk);
    check(state == S_IDLE && n_read == 3, "no new read while in error");
    recover(1'b0);
    check(nor_cnt == 1, "NoR counts");
    // five more failing windows in a row: Error_c 2..5 RAM, 6 ROM
    for (int k = 2; k <= 6; k++) begin
      pulse(sw_reset);
      @(negedge clk);
      pulse(start);
      pass(8, 1'b0, S_SAVE_HASH);
      repeat (2) @(negedge clk);
      pass(8, 1'b0, S_COMPARE);
      repeat (2) @(negedge clk);
      check(error_c == 4'(k), $sformatf("Error_c = %0d", k));
      recover(k == 6);
    end
    check(drop == 0 && error_c == 0, "ROM recovery resets Error_c");
    // no checkpoint at all: ROM even for the first error
    checkpoint_valid = 0;
    pulse(sw_reset);
    @(negedge clk);
    pulse(start);
    pass(8, 1'b0, S_SAVE_HASH);
    repeat (2) @(negedge clk);
    pass(8, 1'b0, S_COMPARE);
    repeat (2) @(negedge clk);
    recover(1'b1);
    check(n_rom == 2, "two ROM recoveries in total");
    // one RAM recovery leaves Error_c at 1
    checkpoint_valid = 1;
    d0 = n_drop;
    pulse(sw_reset);
    @(negedge clk);
    check(n_drop == d0 + 1, "software reset drops the RAM checkpoint");
    pulse(start);
    pass(8, 1'b0, S_SAVE_HASH);
    repeat (2) @(negedge clk);
    pass(8, 1'b0, S_COMPARE);
    repeat (2) @(negedge clk);
    recover(1'b0);
    check(error_c == 4'd1, "Error_c = 1 after one error");
    // comparison finishing after the switch is dropped; the clean switch
    // ends the run of failing windows and clears Error_c
    pulse(sw_reset);
    @(negedge clk);
    check(error_c == 4'd1, "software reset keeps Error_c");
    pulse(start);
    pass(8, 1'b1, S_SAVE_HASH);
    repeat (2) @(negedge clk);
    pulse(cs);
    check(error_c == 4'd0, "clean switch clears Error_c");
    pass(8, 1'b0, S_COMPARE);
    #1 check(!commit, "no commit after switch");
    @(negedge clk);
    check(state == S_NEW_READ, "dropped comparison -> NEW READ");
    @(negedge clk);
    check(state == S_IDLE && !error && !ns_running, "no error, window closed");
    // software reset mid-pass drains the stream and blocks reads until done
    pulse(start);
    @(negedge clk) rd_available = 1;
    @(negedge clk) rd_valid = 1;
    @(negedge clk) rd_valid = 0; sw_reset = 1;
    @(negedge clk) sw_reset = 0; rd_available = 0;
    check(state == S_RESET && rd_drain, "reset drains the in-flight stream");
    rd_draining = 1;
    start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    check(state == S_IDLE && n_read == 20, $sformatf("no read while draining (%0d)", n_read));
    rd_draining = 0;
    @(negedge clk);
    @(negedge clk);
    check(n_read == 21, "pending start served after drain");
    check(n_drain == 1, "one drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
