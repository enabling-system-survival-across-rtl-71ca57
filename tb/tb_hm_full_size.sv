// Full-size test of the Health-monitor: the secure image fills the whole
// 150 KB (38400-word) checkpoint memories, the top runs at its default
// parameters, and the DMA model streams without gaps so the hashing time
// (HCC) must equal exactly one clock per word.
// The image size is the design's checkpoint capacity; the rest follows the
// shared scenario.
module tb_hm_full_size;
  hm_system_test #(.SEC_WORDS(38400), .STALLS(1'b0)) u_test ();
endmodule
