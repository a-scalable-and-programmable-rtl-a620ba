// tb_encmask_packer: rows of 20 pixels (a full 16-code word and a partial
// one) with random codes; the expected words are packed here, pixel i of a
// word in bits [2i+1:2i], unused codes 0, TLAST on each row's last word and
// TUSER on the first word of a frame.
module tb_encmask_packer;
  import rp_pkg::*;
  localparam int PPC = 2, MWP = 16, W = 20, H = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 0, row_last = 0, frame_first = 0;
  enc_code_t codes [PPC];
  logic push;
  logic [2*MWP+1:0] word;
  logic [2*MWP+1:0] expq [$];
  int checks = 0, failures = 0;

  encmask_packer #(.PPC(PPC), .MASK_WORD_PIX(MWP)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (rst_n && push) begin
    check(expq.size() > 0 && word == expq[0], $sformatf("word %h expected %h", word, expq.size() > 0 ? expq[0] : '0));
    void'(expq.pop_front());
  end

  initial begin
    codes = '{ENC_N, ENC_N};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 10; f++)
      for (int r = 0; r < H; r++) begin
        logic [2*W-1:0] rowbits;
        rowbits = '0;
        for (int b = 0; b < W / PPC; b++) begin
          @(negedge clk);
          adv = 0;
          if ($urandom % 3 == 0) @(negedge clk);
          for (int k = 0; k < PPC; k++) begin
            codes[k] = enc_code_t'($urandom % 4);
            rowbits[2*(b*PPC + k) +: 2] = codes[k];
          end
          row_last = (b == W / PPC - 1);
          frame_first = (r == 0 && b == 0);
          if (b == MWP / PPC - 1)
            expq.push_back({(r == 0), 1'b0, rowbits[0 +: 2*MWP]});
          if (row_last) begin
            expq.push_back({1'b0, 1'b1, (2*MWP)'(rowbits[2*MWP +: 2*(W-MWP)])});
          end
          adv = 1;
        end
        @(negedge clk); adv = 0;
        @(negedge clk);
        check(expq.size() == 0, "all words of the row sent");
        expq.delete();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
