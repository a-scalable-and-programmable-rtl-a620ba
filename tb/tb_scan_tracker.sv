// tb_scan_tracker: steps a 12x10 frame (4 chunks of 2 rows plus 2 remainder
// rows in the last) with random gaps between beats over several frames, and
// checks position, chunk, row/frame flags, frame count and the full-frame
// flag of a cycle length of 3 against counters kept here.
module tb_scan_tracker;
  localparam int PPC = 2, NC = 4, W = 12, H = 10, L = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 0;
  logic [15:0] cfg_width = 16'(W), cfg_height = 16'(H);
  logic [7:0] cfg_cycle_len = 8'(L);
  logic [15:0] x, y;
  logic [1:0] chunk;
  logic row_first, row_last, frame_first, frame_last, last_row, frame_end, full_frame;
  logic [31:0] frame_idx;
  int checks = 0, failures = 0;

  scan_tracker #(.PPC(PPC), .NUM_CHUNKS(NC)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 7; f++)
      for (int yy = 0; yy < H; yy++)
        for (int xx = 0; xx < W; xx += PPC) begin
          @(negedge clk);
          adv = 0;
          if ($urandom % 4 == 0) @(negedge clk);
          check(x == 16'(xx) && y == 16'(yy), $sformatf("pos (%0d,%0d) expected (%0d,%0d)", x, y, xx, yy));
          check(chunk == 2'((yy / 2 > 3) ? 3 : yy / 2), $sformatf("row %0d chunk %0d", yy, chunk));
          check(row_first == (xx == 0) && row_last == (xx == W - PPC), "row flags");
          check(frame_first == (xx == 0 && yy == 0) && frame_last == (xx == W - PPC && yy == H - 1), "frame flags");
          check(last_row == (yy == H - 1), "last row flag");
          check(frame_idx == 32'(f) && full_frame == (f % L == 0), $sformatf("frame %0d idx %0d full %b", f, frame_idx, full_frame));
          adv = 1;
          #1 check(frame_end == (xx == W - PPC && yy == H - 1), "frame_end");
        end
    @(negedge clk); adv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
