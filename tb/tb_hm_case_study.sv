// Case-study size test of the Health-monitor: an 86 KB secure image of
// 21384 words (85536 bytes), the size whose hashing is reported to take
// 21384 programmable-logic clocks, i.e. one 32-bit word per clock. The top
// runs at its default parameters and the DMA model streams without gaps, so
// the HCC register read by the shared scenario must equal exactly 21384.
// The stimulus, the checks and the result line live in hm_system_test;
// this wrapper fixes the image size and adds an outer watchdog, set above
// the scenario's own, that ends the run should the scenario never finish.
module tb_hm_case_study;
  localparam int unsigned CASE_WORDS = 21384;
  localparam int unsigned OUTER_LIMIT = 500 * CASE_WORDS + 500000;

  hm_system_test #(.SEC_WORDS(CASE_WORDS), .STALLS(1'b0)) u_test ();

  initial begin
    repeat (OUTER_LIMIT) @(posedge u_test.clk);
    $display("TB_RESULT checks=%0d failures=%0d", u_test.checks, u_test.failures + 1);
    $finish;
  end
endmodule
