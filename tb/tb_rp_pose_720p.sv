// tb_rp_pose_720p: rp_top at its default parameters on 1280x720 frames, the
// frame size of the pose-estimation workload: a full capture and a region
// frame (cycle length 2), streams checked and 218 pixels of each frame
// decoded. See rp_top_harness.
module tb_rp_pose_720p;
  rp_top_harness #(.W(1280), .H(720), .NF(2), .CYCLE_LEN(2), .FULL(1'b1), .DEC_SAMPLES(200),
                   .WATCHDOG(10000000)) h ();
  // The harness ends the run; this is only a backstop.
  initial begin
    #1000000000000;
    $finish;
  end
endmodule
