// tb_rp_encoder: the encoder alone on a 16x8 frame with four chunks of 4
// entries: three regions (plain, strided, skipped every other frame) over
// five frames with a cycle length of 4. The three output streams are always
// ready here, so TREADY must stay high and each frame must take exactly 64
// cycles. Mask codes, row offsets and pixel order are checked against a
// model of the coding rule.
module tb_rp_encoder;
  import rp_pkg::*;
  localparam int PPC = 2, NC = 4, CR = 4, PW = 24, MWP = 16, OW = 32, W = 16, H = 8, NF = 5, L = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] cfg_width = 16'(W), cfg_height = 16'(H);
  logic [7:0] cfg_cycle_len = 8'(L);
  logic cfg_we = 0, cfg_clear = 0;
  logic [1:0] cfg_chunk = '0;
  logic [1:0] cfg_idx = '0;
  region_t cfg_region = '0;
  logic s_tvalid = 0, s_tready;
  logic [PPC*PW-1:0] s_tdata = '0;
  logic m_pix_tvalid, m_pix_tlast, m_pix_tuser, m_off_tvalid, m_off_tlast, m_off_tuser;
  logic m_mask_tvalid, m_mask_tlast, m_mask_tuser;
  logic m_pix_tready = 1, m_off_tready = 1, m_mask_tready = 1;
  logic [PPC*PW-1:0] m_pix_tdata;
  logic [PPC-1:0] m_pix_tkeep;
  logic [OW-1:0] m_off_tdata;
  logic [2*MWP-1:0] m_mask_tdata;
  logic [31:0] frame_idx;
  logic full_frame;
  int checks = 0, failures = 0;
  region_t regs [3];
  logic [PW-1:0] pixq [$];
  logic [OW-1:0] offq [$];
  logic [2*MWP-1:0] maskq [$];

  rp_encoder #(.PPC(PPC), .NUM_CHUNKS(NC), .CHUNK_REGIONS(CR), .PIXEL_W(PW), .MASK_WORD_PIX(MWP), .OFFSET_W(OW)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic enc_code_t model(int f, int x, int y);
    enc_code_t best, c;
    best = ENC_N;
    if (f % L == 0) return ENC_R;
    foreach (regs[r])
      if (x >= int'(regs[r].x) && x < int'(regs[r].x + regs[r].w) && y >= int'(regs[r].y) && y < int'(regs[r].y + regs[r].h)) begin
        if (f % (int'(regs[r].skip) + 1) != 0) c = ENC_SK;
        else if ((x - int'(regs[r].x)) % (int'(regs[r].stride) + 1) != 0) c = ENC_ST;
        else c = ENC_R;
        if (c > best) best = c;
      end
    return best;
  endfunction

  function automatic logic [PW-1:0] pixval(int f, int x, int y);
    return PW'(f * 65536 + y * 256 + x);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (m_pix_tvalid) for (int k = 0; k < PPC; k++) if (m_pix_tkeep[k]) pixq.push_back(m_pix_tdata[k*PW +: PW]);
    if (m_off_tvalid) offq.push_back(m_off_tdata);
    if (m_mask_tvalid) maskq.push_back(m_mask_tdata);
    if (s_tvalid) check(s_tready, "TREADY high on every cycle");
  end

  initial begin
    regs[0] = '{1'b1, 16'd1, 16'd0, 16'd5, 16'd3, 4'd0, 4'd0};   // chunks 0,1
    regs[1] = '{1'b1, 16'd8, 16'd2, 16'd7, 16'd5, 4'd1, 4'd0};   // chunks 1..3, stride 1
    regs[2] = '{1'b1, 16'd3, 16'd5, 16'd6, 16'd2, 4'd0, 4'd1};   // chunks 2,3, every other frame
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (regs[r])
      for (int c = 0; c < NC; c++)
        if (int'(regs[r].y) <= 2*c + 1 && int'(regs[r].y + regs[r].h) - 1 >= 2*c) begin
          @(negedge clk);
          cfg_we = 1; cfg_chunk = 2'(c); cfg_idx = 2'(r); cfg_region = regs[r];
        end
    @(negedge clk); cfg_we = 0;
    for (int f = 0; f < NF; f++) begin
      int t0, idx;
      t0 = 0;
      for (int i = 0; i < W * H / PPC; i++) begin
        @(negedge clk);
        s_tvalid = 1;
        for (int k = 0; k < PPC; k++) s_tdata[k*PW +: PW] = pixval(f, (i*PPC + k) % W, (i*PPC + k) / W);
        t0++;
      end
      @(negedge clk); s_tvalid = 0;
      check(t0 == W * H / PPC, "one beat per clock");
      repeat (6) @(negedge clk);
      idx = 0;
      check(offq.size() == H && maskq.size() == H, $sformatf("frame %0d: %0d offsets, %0d mask words", f, offq.size(), maskq.size()));
      for (int y = 0; y < H; y++) begin
        check(offq[y] == OW'(idx), $sformatf("frame %0d row %0d offset", f, y));
        for (int x = 0; x < W; x++) begin
          enc_code_t e;
          e = model(f, x, y);
          check(maskq[y][2*x +: 2] == e, $sformatf("frame %0d (%0d,%0d) code %0d expected %0d", f, x, y, maskq[y][2*x +: 2], e));
          if (e == ENC_R) begin
            check(idx < pixq.size() && pixq[idx] == pixval(f, x, y), $sformatf("frame %0d pixel %0d", f, idx));
            idx++;
          end
        end
      end
      check(pixq.size() == idx, $sformatf("frame %0d: %0d pixels expected %0d", f, pixq.size(), idx));
      pixq.delete(); offq.delete(); maskq.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
