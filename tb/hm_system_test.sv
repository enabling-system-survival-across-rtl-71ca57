// End-to-end scenario for the Health-monitor, run against the top module at
// its default parameters together with a DMA/DDR model.
//
// A hypervisor is played by AXI4-Lite register accesses. The scenario:
//  1. boot pass: program NOB and TRIG; the first pass records the ROM image
//     and key cycles run until a checkpoint is confirmed;
//  2. switch to the secure side (CS); the secure guest legally edits its
//     memory; a new non-secure window starts and confirms checkpoints;
//  3. the intruder corrupts one secure word; the error is flagged, STATUS
//     drops to 0, and after CS the memory is restored from the RAM
//     checkpoint (checked word by word against the expected image);
//  4. five more windows, each attacked after its first checkpoint: four
//     RAM recoveries, then, with Error_c above 5, a ROM recovery back to
//     the boot image; then a window attacked before its first checkpoint
//     (the window's reset has dropped the RAM checkpoint): ROM recovery;
//  5. a key cycle reset in the middle of a pass (stream drained), a fresh
//     window, and an attack attempt while the non-secure guest is not
//     scheduled (must do nothing).
// Every mechanism is counted and a mechanism that never happened is a
// failure. HCC is checked against the one-word-per-clock hashing rate;
// HCC and the first RCC are also printed.
// The sequence of windows, switches and recoveries follows the design's
// intended use by the hypervisor; image contents, attack addresses and
// values are this test's own.
module hm_system_test
  import hm_pkg::*;
#(
  parameter int unsigned SEC_WORDS = 48,
  parameter bit          STALLS    = 1'b1
) ();

  localparam logic [31:0] BASE   = 32'h0010_0000;
  localparam int unsigned WORDS  = SEC_WORDS;
  localparam logic [31:0] BYTES  = 32'(4 * SEC_WORDS);
  localparam logic [31:0] A_RCC = 32'h00, A_HCC = 32'h04, A_NOC = 32'h08, A_NOR = 32'h0C,
                          A_NOB = 32'h10, A_TRIG = 32'h14, A_CS = 32'h18, A_STAT = 32'h1C;
  localparam longint unsigned WATCHDOG = 64'd400 * SEC_WORDS + 64'd400000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t hm_req, intr_req, dma_req, ddr_req;
  axil_rsp_t hm_rsp, intr_rsp, dma_rsp, ddr_rsp;
  axis_t     mm2s, s2mm;
  logic      mm2s_ready, s2mm_ready, error_trigger;
  hm_state_e state;
  logic      error, hash_match, ns_running, checkpoint_valid, healthy_sel, rom_locked;
  logic [3:0] error_c;

  health_monitor_top dut (
    .clk               (clk),
    .rst_n             (rst_n),
    .s_axil_hm         (hm_req),
    .s_axil_hm_rsp     (hm_rsp),
    .s_axil_intr       (intr_req),
    .s_axil_intr_rsp   (intr_rsp),
    .m_axil_intr       (ddr_req),
    .m_axil_intr_rsp   (ddr_rsp),
    .error_trigger     (error_trigger),
    .m_axil_dma        (dma_req),
    .m_axil_dma_rsp    (dma_rsp),
    .s_axis_mm2s       (mm2s),
    .s_axis_mm2s_tready(mm2s_ready),
    .m_axis_s2mm       (s2mm),
    .m_axis_s2mm_tready(s2mm_ready),
    .state             (state),
    .error             (error),
    .hash_match        (hash_match),
    .ns_running        (ns_running),
    .checkpoint_valid  (checkpoint_valid),
    .healthy_sel       (healthy_sel),
    .rom_locked        (rom_locked),
    .error_c           (error_c)
  );

  dma_ddr_model #(.WORDS(WORDS + 16), .BASE(BASE), .STALLS(STALLS)) u_dma (
    .clk               (clk),
    .rst_n             (rst_n),
    .s_axil_cfg        (dma_req),
    .s_axil_cfg_rsp    (dma_rsp),
    .s_axil_ddr        (ddr_req),
    .s_axil_ddr_rsp    (ddr_rsp),
    .m_axis_mm2s       (mm2s),
    .m_axis_mm2s_tready(mm2s_ready),
    .s_axis_s2mm       (s2mm),
    .s_axis_s2mm_tready(s2mm_ready)
  );

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  int unsigned n_save = 0, n_commit = 0, n_error = 0, n_ram = 0, n_rom = 0,
               n_drain = 0, n_stall = 0, n_discard = 0, n_newread = 0;
  logic [31:0] rom_img  [WORDS];
  logic [31:0] ckpt_img [WORDS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // mechanism counters, sampled on the clock
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (state == S_SAVE_HASH) n_save++;
      if (state == S_COMPARE && ns_running && dut.keys_equal) n_commit++;
      if (state == S_COMPARE && !ns_running) n_discard++;
      if (state == S_ERROR) n_error++;
      if (state == S_NEW_READ && ns_running) n_newread++;
      if (state == S_IDLE && dut.u_ctrl.state_d == S_RAM_RECOVERY) n_ram++;
      if (state == S_IDLE && dut.u_ctrl.state_d == S_ROM_RECOVERY) n_rom++;
      if (dut.rd_drain) n_drain++;
      if (state == S_FUNCTION && !dut.rd_valid) n_stall++;
    end
  end

  initial begin
    while (cycle < WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired at cycle %0d limit %0d", cycle, WATCHDOG);
    $display("  state=%0d error=%0b ns=%0b noc=%0d nor=%0d rd_left=%0d checks=%0d", state, error, ns_running, dut.noc, dut.nor_cnt, u_dma.rd_left, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- AXI4-Lite master tasks (hypervisor and intruder configuration) ----
  // Inputs change on the falling edge; handshakes are judged just before
  // the rising edge that completes them.
  task automatic axil_write(ref axil_req_t rq, ref axil_rsp_t rs, input logic [31:0] a, input logic [31:0] d);
    bit aw_hs, w_hs;
    @(negedge clk);
    rq.awaddr = a; rq.awvalid = 1'b1; rq.wdata = d; rq.wstrb = 4'hF; rq.wvalid = 1'b1; rq.bready = 1'b1;
    while (rq.awvalid || rq.wvalid) begin
      #1;
      aw_hs = rq.awvalid && rs.awready;
      w_hs  = rq.wvalid && rs.wready;
      @(negedge clk);
      if (aw_hs) rq.awvalid = 1'b0;
      if (w_hs)  rq.wvalid  = 1'b0;
    end
    #1;
    while (!rs.bvalid) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    rq.bready = 1'b0;
  endtask

  task automatic axil_read(ref axil_req_t rq, ref axil_rsp_t rs, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    rq.araddr = a; rq.arvalid = 1'b1; rq.rready = 1'b1;
    #1;
    while (!rs.arready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    rq.arvalid = 1'b0;
    #1;
    while (!rs.rvalid) begin
      @(negedge clk);
      #1;
    end
    d = rs.rdata;
    @(negedge clk);
    rq.rready = 1'b0;
  endtask

  task automatic hm_wr(input logic [31:0] a, input logic [31:0] d);
    axil_write(hm_req, hm_rsp, a, d);
  endtask
  task automatic hm_rd(input logic [31:0] a, output logic [31:0] d);
    axil_read(hm_req, hm_rsp, a, d);
  endtask

  task automatic wait_noc_above(input logic [31:0] n);
    logic [31:0] v;
    do begin
      repeat (8) @(posedge clk);
      hm_rd(A_NOC, v);
    end while (v <= n);
  endtask

  // The non-secure window is closed: wait until any pass still in flight
  // has finished and the controller rests in IDLE.
  task automatic wait_quiet();
    do @(posedge clk); while (!(state == S_IDLE && u_dma.rd_left == 0 && !dut.trig_busy));
  endtask

  task automatic wait_status(input logic [31:0] want);
    logic [31:0] v;
    do begin
      repeat (4) @(posedge clk);
      hm_rd(A_STAT, v);
    end while (v != want);
  endtask

  task automatic start_window();
    hm_wr(A_TRIG, 32'd0);
    hm_wr(A_TRIG, BYTES);
  endtask

  task automatic aim(input int unsigned widx, input logic [31:0] value);
    axil_write(intr_req, intr_rsp, 32'h0, BASE + 32'(4 * widx));
    axil_write(intr_req, intr_rsp, 32'h4, value);
  endtask

  task automatic fire();
    @(negedge clk) error_trigger = 1'b1;
    repeat (20) @(posedge clk);
    @(negedge clk) error_trigger = 1'b0;
  endtask

  task automatic attack(input int unsigned widx, input logic [31:0] value);
    aim(widx, value);
    fire();
  endtask

  task automatic compare_mem(input bit rom, input string what);
    int unsigned bad = 0;
    for (int unsigned i = 0; i < WORDS; i++)
      if (u_dma.mem[i] != (rom ? rom_img[i] : ckpt_img[i])) bad++;
    check(bad == 0, what);
    if (bad != 0) $display("  %0d words differ", bad);
  endtask

  initial begin
    logic [31:0] v, noc0, nor0;
    hm_req = '0; intr_req = '0; error_trigger = 1'b0;
    for (int unsigned i = 0; i < WORDS + 16; i++) u_dma.mem[i] = $urandom;
    for (int unsigned i = 0; i < WORDS; i++) begin
      rom_img[i]  = u_dma.mem[i];
      ckpt_img[i] = u_dma.mem[i];
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. boot pass
    hm_wr(A_NOB, BYTES);
    hm_rd(A_NOB, v);
    check(v == BYTES, "NOB register reads back");
    start_window();
    wait_noc_above(0);
    check(rom_locked, "ROM image recorded by the first pass");
    check(checkpoint_valid, "checkpoint confirmed");
    hm_rd(A_STAT, v);
    check(v == 32'd1, "STATUS healthy during clean window");
    hm_rd(A_HCC, v);
    if (STALLS) check(v >= WORDS, "HCC at least one cycle per word");
    else        check(v == WORDS, "HCC exactly one cycle per word");
    $display("HCC after a clean pass of %0d words: %0d clocks", WORDS, v);
    hm_wr(A_CS, 32'd1);
    wait_quiet();
    hm_rd(A_STAT, v);
    check(v == 32'd1, "STATUS healthy after clean switch");

    // 2. secure guest edits its own memory, then a new window
    for (int unsigned i = 0; i < 4; i++) begin
      u_dma.mem[3 * i] = ~u_dma.mem[3 * i];
      ckpt_img[3 * i]  = u_dma.mem[3 * i];
    end
    hm_rd(A_NOC, noc0);
    start_window();
    wait_noc_above(noc0 + 1);
    hm_rd(A_STAT, v);
    check(v == 32'd1, "secure guest's own edits raise no error");

    // 3. attack and RAM recovery
    attack(WORDS - 1, ~ckpt_img[WORDS - 1]);
    check(dut.u_intr.hits == 1, "intruder performed one write");
    wait_status(32'd0);
    check(error, "error flag set after corruption");
    check(u_dma.mem[WORDS - 1] == ~ckpt_img[WORDS - 1], "memory was corrupted");
    hm_wr(A_CS, 32'd1);
    wait_status(32'd1);
    compare_mem(1'b0, "RAM recovery restored the last checkpoint");
    hm_rd(A_NOR, v);
    check(v == 32'd1, "NoR counts one restore");
    hm_rd(A_RCC, v);
    check(v >= WORDS, "RCC covers the restore stream");
    $display("RCC of the first RAM recovery of %0d words: %0d clocks", WORDS, v);
    check(n_ram == 1 && n_rom == 0, "first recovery used the RAM image");

    // 4. five more attacks, each after the window's first checkpoint of the
    //    restored state; Error_c keeps counting across windows
    for (int unsigned k = 2; k <= 6; k++) begin
      hm_rd(A_NOC, noc0);
      start_window();
      wait_noc_above(noc0 + 1);
      attack(WORDS - 1, 32'hDEAD_0000 + 32'(k));
      wait_status(32'd0);
      check(32'(error_c) == k, $sformatf("Error_c counts error %0d", k));
      hm_wr(A_CS, 32'd1);
      wait_status(32'd1);
      wait_quiet();
      if (k <= 5) begin
        compare_mem(1'b0, $sformatf("recovery %0d from RAM", k));
        check(n_rom == 0, "no ROM recovery yet");
      end else begin
        compare_mem(1'b1, "recovery 6 from ROM image");
        check(n_rom == 1, "sixth consecutive error recovers from ROM");
        check(!checkpoint_valid && error_c == 0, "ROM recovery discards the RAM checkpoint");
      end
    end
    check(n_ram == 5, "five RAM recoveries");
    hm_rd(A_NOR, nor0);
    check(nor0 == 32'd6, "NoR counts six restores");

    // 4b. a window reset drops the RAM checkpoint: an attack before the
    //     window's first checkpoint must be recovered from the ROM image
    aim(WORDS - 1, 32'h5EC0_0005);
    start_window();
    check(!checkpoint_valid, "window reset drops the RAM checkpoint");
    do @(posedge clk); while (state != S_SAVE_HASH);
    fire();
    wait_status(32'd0);
    check(32'(error_c) == 1, "Error_c restarts after a ROM recovery");
    hm_wr(A_CS, 32'd1);
    wait_status(32'd1);
    wait_quiet();
    compare_mem(1'b1, "attack before any checkpoint recovers from ROM");
    check(n_rom == 2 && n_ram == 5, "no checkpoint means ROM recovery");

    // 5. reset in the middle of a pass, then a clean window
    start_window();
    do @(posedge clk); while (!(state == S_FUNCTION && dut.rd_valid && dut.u_ckpt.u_sel.cap_idx > 2));
    hm_wr(A_TRIG, 32'd0);
    repeat (3) @(posedge clk);
    check(state == S_IDLE, "reset returns to IDLE");
    for (int unsigned i = 0; i < WORDS; i++) ckpt_img[i] = u_dma.mem[i];
    hm_rd(A_NOC, noc0);
    hm_wr(A_TRIG, BYTES);
    wait_noc_above(noc0 + 1);
    check(checkpoint_valid, "checkpoint re-established after ROM recovery");
    hm_rd(A_STAT, v);
    check(v == 32'd1, "no false error after an aborted pass");
    hm_wr(A_CS, 32'd1);
    wait_quiet();
    // attack attempt while the non-secure guest is not scheduled
    attack(0, 32'h0BAD_0BAD);
    check(dut.u_intr.hits == 7, "intruder idle outside the non-secure window");
    compare_mem(1'b0, "memory untouched outside the window");

    // mechanism coverage
    check(n_save    > 0, "SAVE HASH happened");
    check(n_commit  > 0, "checkpoint commit happened");
    check(n_newread > 0, "NEW READ happened");
    check(n_error   > 0, "ERROR happened");
    check(n_ram     > 0, "RAM RECOVERY happened");
    check(n_rom     > 0, "ROM RECOVERY happened");
    check(n_drain   > 0, "stream drain after reset happened");
    check(n_discard > 0, "comparison after switch discarded");
    if (STALLS) check(n_stall > 0, "stream stall happened");
    $display("events: save=%0d commit=%0d newread=%0d error=%0d ram=%0d rom=%0d drain=%0d discard=%0d stall=%0d cycles=%0d",
             n_save, n_commit, n_newread, n_error, n_ram, n_rom, n_drain, n_discard, n_stall, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
