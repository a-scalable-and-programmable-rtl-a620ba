// tb_rp_top: end-to-end test of rp_top at a reduced size (32x16 frames,
// 8 regions per chunk, 4 cached frames), eight frames with cycle length 3.
// Every pixel of every frame is decoded and checked; see rp_top_harness.
module tb_rp_top;
  rp_top_harness #(.W(32), .H(16), .NF(8), .CYCLE_LEN(3), .FULL(1'b0), .DEC_SAMPLES(0)) h ();
endmodule
