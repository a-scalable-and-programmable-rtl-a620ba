// tb_rp_face_svga: rp_top at its default parameters on 800x600 frames, the
// frame size of the face-detection workload: a full capture and two region
// frames (cycle length 3), streams checked and 218 pixels of each frame
// decoded. See rp_top_harness.
module tb_rp_face_svga;
  rp_top_harness #(.W(800), .H(600), .NF(3), .CYCLE_LEN(3), .FULL(1'b1), .DEC_SAMPLES(200),
                   .WATCHDOG(10000000)) h ();
  // The harness ends the run; this is only a backstop.
  initial begin
    #1000000000000;
    $finish;
  end
endmodule
