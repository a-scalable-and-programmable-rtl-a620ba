// tb_row_offset_gen: frames of 6 rows x 4 beats with random selected-pixel
// counts; each row's offset must equal the selected pixels counted here
// since the start of the frame, with TUSER on row 0 and TLAST on row 5.
module tb_row_offset_gen;
  localparam int PPC = 2, OW = 16, BPR = 4, H = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 0, row_first = 0, frame_first = 0, last_row = 0;
  logic [1:0] nsel = '0;
  logic push;
  logic [OW+1:0] word;
  int checks = 0, failures = 0;

  row_offset_gen #(.PPC(PPC), .OFFSET_W(OW)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      int total;
      total = 0;
      for (int r = 0; r < H; r++)
        for (int b = 0; b < BPR; b++) begin
          @(negedge clk);
          adv = 0;
          if ($urandom % 3 == 0) @(negedge clk);
          nsel = 2'($urandom % 3);
          row_first = (b == 0); frame_first = (b == 0 && r == 0); last_row = (r == H - 1);
          adv = 1;
          #1;
          check(push == (b == 0), "push only on the first beat of a row");
          if (b == 0) check(word == {frame_first, last_row, OW'(total)},
                            $sformatf("frame %0d row %0d offset %0d expected %0d", f, r, word[OW-1:0], total));
          total += nsel;
        end
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
