// tb_pixel_packer: rows of 10 pixels (5 beats) with random selections and
// random gaps; the expected beats of each row are built here by cutting the
// row's selected pixels into PPC-wide pieces, the last one with TLAST.
module tb_pixel_packer;
  localparam int PPC = 2, PW = 8, W = 10, BW = PPC*PW + PPC + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 0, row_last = 0, frame_first = 0;
  logic [PPC*PW-1:0] pix = '0;
  logic [PPC-1:0] sel = '0;
  logic push0, push1;
  logic [BW-1:0] beat0, beat1;
  logic [BW-1:0] expq [$];
  int checks = 0, failures = 0, n_dual = 0, n_partial = 0, n_empty = 0;
  bit sof_wait = 0;   // a frame started and its first beat is still to come

  pixel_packer #(.PPC(PPC), .PIXEL_W(PW)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic [BW-1:0] gotq [$];
  always @(posedge clk) if (rst_n) begin
    if (push0) gotq.push_back(beat0);
    if (push1) gotq.push_back(beat1);
    if (push1) n_dual++;
    if (push1 && !push0) check(0, "push1 without push0");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 300; row++) begin
      logic [PW-1:0] selp [$];
      bit first_of_frame;
      int dens;
      selp.delete();
      first_of_frame = (row % 4 == 0);
      dens = $urandom % 4;
      if (first_of_frame) sof_wait = 1;
      for (int b = 0; b < W / PPC; b++) begin
        @(negedge clk);
        adv = 0;
        if ($urandom % 3 == 0) @(negedge clk);
        for (int k = 0; k < PPC; k++) begin
          pix[k*PW +: PW] = PW'($urandom);
          sel[k] = (dens == 0) ? 1'b0 : ($urandom % 4 < dens);
          if (sel[k]) selp.push_back(pix[k*PW +: PW]);
        end
        row_last = (b == W / PPC - 1);
        frame_first = first_of_frame && b == 0;
        if (row_last) begin
          // expected beats of this row
          int n;
          n = selp.size();
          if (n == 0) n_empty++;
          for (int s = 0; s < n; s += PPC) begin
            logic [BW-1:0] e;
            e = '0;
            for (int k = 0; k < PPC; k++)
              if (s + k < n) begin e[k*PW +: PW] = selp[s + k]; e[PPC*PW + k] = 1'b1; end
            if (s + PPC >= n) e[BW-2] = 1'b1;
            if (s + PPC >= n && n % PPC != 0) n_partial++;
            if (s == 0 && sof_wait) begin e[BW-1] = 1'b1; sof_wait = 0; end
            expq.push_back(e);
          end
        end
        adv = 1;
      end
      @(negedge clk); adv = 0;
      @(negedge clk);
      check(gotq.size() == expq.size(), $sformatf("row %0d: %0d beats, expected %0d", row, gotq.size(), expq.size()));
      for (int i = 0; i < expq.size() && i < gotq.size(); i++)
        check(gotq[i] == expq[i], $sformatf("row %0d beat %0d: %h expected %h", row, i, gotq[i], expq[i]));
      expq.delete();
      gotq.delete();
    end
    check(n_dual > 0 && n_partial > 0 && n_empty > 0, "dual pushes, partial beats and empty rows occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
