// tb_rp_top_full: rp_top at its default parameters (4K frames, 2 pixels per
// clock, 4 chunks of 50 regions, 8 cached frames). Encodes a full-frame
// capture and a region frame of 3840x2160 (cycle length 2), checks the three
// streams against the reference model (every offset, TLAST and pixel count,
// a sample of mask codes and pixel values) and decodes 218 pixels of each
// frame. See rp_top_harness.
module tb_rp_top_full;
  rp_top_harness #(.W(3840), .H(2160), .NF(2), .CYCLE_LEN(2), .FULL(1'b1), .DEC_SAMPLES(200),
                   .WATCHDOG(40000000)) h ();
endmodule
