// tb_rp_decoder: the decoder against a frame cache filled here. Six 40x6
// frames get random EncMask codes; their offsets, mask words and encoded
// pixels are laid out in a 4-slot memory model that answers after 1..3
// cycles. Every pixel of every frame is requested and compared with the fill
// rules (R own pixel, St last R to the left, Sk the previous frame within the
// cached frames, N zero). Frame 3 is decoded with one cached frame only.
module tb_rp_decoder;
  import rp_pkg::*;
  localparam int PW = 16, MWP = 16, OW = 32, MC = 4, W = 40, H = 6, NF = 6, WPR = (W + MWP - 1) / MWP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] cfg_width = 16'(W);
  logic [1:0] cur_slot = '0;
  logic [2:0] num_frames = '0;
  logic req_valid = 0, req_ready, rsp_valid;
  logic [15:0] req_x = '0, req_y = '0;
  logic [PW-1:0] rsp_pixel;
  enc_code_t rsp_code;
  logic [2:0] rsp_age;
  logic off_rd_req, mask_rd_req, pix_rd_req;
  logic [1:0] off_rd_slot, mask_rd_slot, pix_rd_slot;
  logic [15:0] off_rd_row;
  logic [31:0] mask_rd_addr;
  logic [OW-1:0] pix_rd_addr;
  logic off_rd_valid = 0, mask_rd_valid = 0, pix_rd_valid = 0;
  logic [OW-1:0] off_rd_data = '0;
  logic [2*MWP-1:0] mask_rd_data = '0;
  logic [PW-1:0] pix_rd_data = '0;
  int checks = 0, failures = 0, n_age = 0, n_miss = 0, n_st = 0;

  enc_code_t codes [NF][H][W];
  logic [OW-1:0] off_mem [MC][H];
  logic [2*MWP-1:0] mask_mem [MC][H*WPR];
  logic [PW-1:0] pix_mem [MC][W*H];

  rp_decoder #(.PIXEL_W(PW), .MASK_WORD_PIX(MWP), .OFFSET_W(OW), .MAX_CACHE(MC)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic logic [PW-1:0] pixval(int f, int x, int y);
    return PW'(f * 4096 + y * 64 + x + 1);
  endfunction

  function automatic logic [PW-1:0] expect_pix(int f, int x, int y, int lim);
    for (int a = 0; a < lim; a++) begin
      case (codes[f-a][y][x])
        ENC_R: return pixval(f-a, x, y);
        ENC_N: return '0;
        ENC_ST: begin
          for (int xl = x - 1; xl >= 0; xl--) if (codes[f-a][y][xl] == ENC_R) return pixval(f-a, xl, y);
          return '0;
        end
        default: ;
      endcase
    end
    return '0;
  endfunction

  // memory model: one response per request, 1..3 cycles later
  always @(posedge clk) begin
    off_rd_valid <= 0; mask_rd_valid <= 0; pix_rd_valid <= 0;
    if (off_rd_req) fork begin
      automatic int s = off_rd_slot, r = off_rd_row;
      repeat ($urandom % 3) @(posedge clk);
      off_rd_data <= off_mem[s][r]; off_rd_valid <= 1;
    end join_none
    if (mask_rd_req) fork begin
      automatic int s = mask_rd_slot, a = mask_rd_addr;
      repeat ($urandom % 3) @(posedge clk);
      mask_rd_data <= mask_mem[s][a]; mask_rd_valid <= 1;
    end join_none
    if (pix_rd_req) fork begin
      automatic int s = pix_rd_slot, a = pix_rd_addr;
      repeat ($urandom % 3) @(posedge clk);
      pix_rd_data <= pix_mem[s][a]; pix_rd_valid <= 1;
    end join_none
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int s, idx, lim;
      s = f % MC;
      idx = 0;
      // random codes in runs, so strided and skipped pixels sit next to encoded ones
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          codes[f][y][x] = (f == 0) ? ENC_R : enc_code_t'(((x / 5 + y + f) % 4 == 0) ? ENC_SK : $urandom % 4);
      for (int y = 0; y < H; y++) begin
        off_mem[s][y] = OW'(idx);
        for (int w = 0; w < WPR; w++) mask_mem[s][y*WPR + w] = '0;
        for (int x = 0; x < W; x++) begin
          mask_mem[s][y*WPR + x/MWP][2*(x%MWP) +: 2] = codes[f][y][x];
          if (codes[f][y][x] == ENC_R) begin pix_mem[s][idx] = pixval(f, x, y); idx++; end
        end
      end
      lim = (f == 3) ? 1 : ((f + 1 < MC) ? f + 1 : MC);
      cur_slot = 2'(s);
      num_frames = 3'(lim);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          logic [PW-1:0] e;
          e = expect_pix(f, x, y, lim);
          @(negedge clk);
          req_valid = 1; req_x = 16'(x); req_y = 16'(y);
          do @(posedge clk); while (!req_ready);
          @(negedge clk); req_valid = 0;
          do @(posedge clk); while (!rsp_valid);
          check(rsp_pixel == e && rsp_code == codes[f][y][x],
                $sformatf("frame %0d (%0d,%0d): %h/%0d expected %h/%0d", f, x, y, rsp_pixel, rsp_code, e, codes[f][y][x]));
          if (codes[f][y][x] == ENC_SK && rsp_age > 0 && e != '0) n_age++;
          if (codes[f][y][x] == ENC_SK && lim == 1) n_miss++;
          if (codes[f][y][x] == ENC_ST && e != '0) n_st++;
        end
    end
    check(n_age > 0 && n_miss > 0 && n_st > 0, "skipped, missed and strided fills all occurred");
    $display("fills: strided=%0d skipped=%0d beyond-cache=%0d", n_st, n_age, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
