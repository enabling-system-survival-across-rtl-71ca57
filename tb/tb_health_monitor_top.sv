// End-to-end test of the Health-monitor with a small secure image (48
// words) and a DMA model that stalls its streams at random. The top keeps
// its default parameters; only the amount of secure memory is small.
// The small image and the random DMA stalls are this test's own choice; the
// scenario follows the design's use by the hypervisor.
module tb_health_monitor_top;
  hm_system_test #(.SEC_WORDS(48), .STALLS(1'b1)) u_test ();
endmodule
