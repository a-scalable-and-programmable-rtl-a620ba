// rp_top_harness: end-to-end test of the rhythmic pixel region controller.
//
// Feeds NF frames through the encoder, captures its three output streams in a
// behavioural stand-in for the DMA engines and the DRAM frame cache (one slot
// per frame, frame f in slot f mod MAX_CACHE), and after each frame asks the
// decoder for every pixel (or DEC_SAMPLES pixels of it). Everything is checked
// against a reference model written directly from the coding rules:
//   code(x,y) = R on a full-frame capture, else the largest code over all
//   regions, a region giving N outside, Sk when skipped in this frame, St on
//   columns its stride drops and R otherwise;
//   decoded = original (R), last R pixel to the left in the row (St),
//   the decoded pixel of the previous frame (Sk, within the cache), 0 (N).
// The reference never looks at chunks: the harness places each region in
// every chunk it covers, so a chunking error shows as a code mismatch.
//
// Odd frames run with random stalls on the three output streams (the encoder
// must then drop TREADY); even frames run with the streams always ready and
// must take exactly W*H/PPC cycles, one beat per clock. Every mechanism the
// design has is counted and must occur at least once. FULL=1 leaves the
// top's parameters at their defaults.
module rp_top_harness #(
  parameter int unsigned W           = 32,
  parameter int unsigned H           = 16,
  parameter int unsigned NF          = 8,
  parameter int unsigned CYCLE_LEN   = 3,
  parameter bit          FULL        = 1'b0,
  parameter int unsigned DEC_SAMPLES = 0,       // 0: decode every pixel
  parameter int unsigned WATCHDOG    = 2000000
);
  import rp_pkg::*;

  localparam int unsigned PPC   = 2;
  localparam int unsigned NCH   = 4;
  localparam int unsigned CREG  = FULL ? 50 : 8;
  localparam int unsigned PW    = 24;
  localparam int unsigned MWP   = 16;
  localparam int unsigned OW    = 32;
  localparam int unsigned MC    = FULL ? 8 : 4;
  localparam int unsigned SW    = $clog2(MC);
  localparam int unsigned WPR   = (W + MWP - 1) / MWP;
  localparam int unsigned NPIX  = W * H;
  localparam int unsigned NREG  = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- DUT
  logic [15:0] cfg_width = 16'(W), cfg_height = 16'(H);
  logic [7:0]  cfg_cycle_len = 8'(CYCLE_LEN);
  logic cfg_we = 1'b0, cfg_clear = 1'b0;
  logic [$clog2(NCH)-1:0]  cfg_chunk = '0;
  logic [$clog2(CREG)-1:0] cfg_idx = '0;
  region_t cfg_region = '0;
  logic s_tvalid = 1'b0, s_tready;
  logic [PPC*PW-1:0] s_tdata = '0;
  logic m_pix_tvalid, m_pix_tready, m_pix_tlast, m_pix_tuser;
  logic [PPC*PW-1:0] m_pix_tdata;
  logic [PPC-1:0] m_pix_tkeep;
  logic m_off_tvalid, m_off_tready, m_off_tlast, m_off_tuser;
  logic [OW-1:0] m_off_tdata;
  logic m_mask_tvalid, m_mask_tready, m_mask_tlast, m_mask_tuser;
  logic [2*MWP-1:0] m_mask_tdata;
  logic [31:0] frame_idx;
  logic full_frame;
  logic [SW-1:0] dec_cur_slot = '0;
  logic [SW:0] dec_num_frames = '0;
  logic dec_req_valid = 1'b0, dec_req_ready, dec_rsp_valid;
  logic [15:0] dec_req_x = '0, dec_req_y = '0;
  logic [PW-1:0] dec_rsp_pixel;
  enc_code_t dec_rsp_code;
  logic [SW:0] dec_rsp_age;
  logic off_rd_req, mask_rd_req, pix_rd_req;
  logic [SW-1:0] off_rd_slot, mask_rd_slot, pix_rd_slot;
  logic [15:0] off_rd_row;
  logic [31:0] mask_rd_addr;
  logic [OW-1:0] pix_rd_addr;
  logic off_rd_valid = 1'b0, mask_rd_valid = 1'b0, pix_rd_valid = 1'b0;
  logic [OW-1:0] off_rd_data = '0;
  logic [2*MWP-1:0] mask_rd_data = '0;
  logic [PW-1:0] pix_rd_data = '0;

  if (FULL) begin : g_full
    rp_top dut (.*);
  end else begin : g_small
    rp_top #(.CHUNK_REGIONS(CREG), .MAX_CACHE(MC)) dut (.*);
  end

  // ---------------------------------------------------------------- reference model
  region_t     regs [NREG];
  byte unsigned codes [];         // codes[f*NPIX + y*W + x]

  function automatic logic [PW-1:0] orig(int f, int x, int y);
    return PW'((f * 7919 + y * W + x) * 2654435761);
  endfunction

  function automatic enc_code_t ref_code(int f, int x, int y);
    enc_code_t best = ENC_N;
    if (CYCLE_LEN != 0 && f % CYCLE_LEN == 0) return ENC_R;
    foreach (regs[r]) begin
      enc_code_t c;
      if (x >= int'(regs[r].x) && x < int'(regs[r].x + regs[r].w) &&
          y >= int'(regs[r].y) && y < int'(regs[r].y + regs[r].h)) begin
        if (f % (int'(regs[r].skip) + 1) != 0)                          c = ENC_SK;
        else if ((x - int'(regs[r].x)) % (int'(regs[r].stride) + 1) != 0) c = ENC_ST;
        else                                                             c = ENC_R;
        if (c > best) best = c;
      end
    end
    return best;
  endfunction

  function automatic enc_code_t code_at(int f, int x, int y);
    return enc_code_t'(codes[f*NPIX + y*W + x]);
  endfunction

  // Decoded value of (x,y) in frame f when `lim` frames are cached.
  function automatic logic [PW-1:0] ref_dec(int f, int x, int y, int lim, output int age);
    for (int a = 0; a < lim; a++) begin
      int g = f - a;
      age = a;
      case (code_at(g, x, y))
        ENC_R:  return orig(g, x, y);
        ENC_N:  return '0;
        ENC_ST: begin
          for (int xl = x - 1; xl >= 0; xl--)
            if (code_at(g, xl, y) == ENC_R) return orig(g, xl, y);
          return '0;
        end
        default: ;
      endcase
    end
    return '0;
  endfunction

  // ---------------------------------------------------------------- DMA + DRAM model
  logic [PW-1:0]    pix_mem  [MC][NPIX];
  logic [OW-1:0]    off_mem  [MC][H];
  logic [2*MWP-1:0] mask_mem [MC][H*WPR];
  int pix_frame = -1, off_frame = -1, mask_frame = -1;
  int pix_wr = 0, off_wr = 0, mask_wr = 0;
  int tlast_idx [$];               // pixel index after each TLAST beat
  int mask_tlasts = 0, off_tlasts = 0;
  bit stall_mode = 1'b0;

  // mechanism counters
  int n_full = 0, n_code[4] = '{0, 0, 0, 0}, n_chunk_sw = 0, n_stall = 0, n_partial = 0,
      n_dual = 0, n_overlap = 0, n_dec_age = 0, n_dec_miss = 0, n_dec_st = 0, n_empty_row = 0;

  always @(posedge clk) begin
    m_pix_tready  <= stall_mode ? ($urandom % 4 != 0) : 1'b1;
    m_off_tready  <= stall_mode ? ($urandom % 3 != 0) : 1'b1;
    m_mask_tready <= stall_mode ? ($urandom % 3 != 0) : 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (m_pix_tvalid && m_pix_tready) begin
      if (m_pix_tuser) begin pix_frame++; pix_wr = 0; end
      for (int k = 0; k < PPC; k++)
        if (m_pix_tkeep[k]) begin
          pix_mem[pix_frame % MC][pix_wr] = m_pix_tdata[k*PW +: PW];
          pix_wr++;
        end
      if (m_pix_tkeep != '1) n_partial++;
      if (m_pix_tlast) tlast_idx.push_back(pix_wr);
    end
    if (m_off_tvalid && m_off_tready) begin
      if (m_off_tuser) begin off_frame++; off_wr = 0; end
      off_mem[off_frame % MC][off_wr] = m_off_tdata;
      off_wr++;
      if (m_off_tlast) off_tlasts++;
    end
    if (m_mask_tvalid && m_mask_tready) begin
      if (m_mask_tuser) begin mask_frame++; mask_wr = 0; end
      mask_mem[mask_frame % MC][mask_wr] = m_mask_tdata;
      mask_wr++;
      if (m_mask_tlast) mask_tlasts++;
    end
    if (s_tvalid && !s_tready) n_stall++;
  end

  // Memory read responses after 1..3 cycles.
  always @(posedge clk) begin
    off_rd_valid  <= 1'b0;
    mask_rd_valid <= 1'b0;
    pix_rd_valid  <= 1'b0;
    if (off_rd_req) fork begin
      automatic int s = off_rd_slot, r = off_rd_row;
      repeat ($urandom % 3) @(posedge clk);
      off_rd_data <= off_mem[s][r]; off_rd_valid <= 1'b1;
    end join_none
    if (mask_rd_req) fork begin
      automatic int s = mask_rd_slot, a = mask_rd_addr;
      repeat ($urandom % 3) @(posedge clk);
      mask_rd_data <= mask_mem[s][a]; mask_rd_valid <= 1'b1;
    end join_none
    if (pix_rd_req) fork begin
      automatic int s = pix_rd_slot, a = pix_rd_addr;
      repeat ($urandom % 3) @(posedge clk);
      pix_rd_data <= pix_mem[s][a]; pix_rd_valid <= 1'b1;
    end join_none
  end

  // ---------------------------------------------------------------- helpers
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic setup_regions();
    int cr = H / NCH;
    int next_idx [NCH];
    regs[0] = '{1'b1, 16'(W/16),     16'(H/16),     16'(W/5),     16'(H/3),     4'd0, 4'd0};
    regs[1] = '{1'b1, 16'(3*W/8),    16'(H/5),      16'(W/5+1),   16'(H/3),     4'd1, 4'd0};
    regs[2] = '{1'b1, 16'(5*W/8),    16'(3*H/8),    16'(W/4),     16'(H/2),     4'd0, 4'd1};
    regs[3] = '{1'b1, 16'(W/2),      16'(5*H/8),    16'(W/4+3),   16'(H/4),     4'd2, 4'd2};
    regs[4] = '{1'b1, 16'(W-3),      16'(0),        16'(3),       16'(2),       4'd0, 4'd0};
    regs[5] = '{1'b1, 16'(W/16+2),   16'(H/16+1),   16'(W/8+1),   16'(H/8+1),   4'd3, 4'd0};
    foreach (next_idx[c]) next_idx[c] = 0;
    foreach (regs[r]) begin
      for (int c = 0; c < NCH; c++) begin
        int lo = c * cr, hi = (c == NCH-1) ? H - 1 : (c+1) * cr - 1;
        if (int'(regs[r].y) <= hi && int'(regs[r].y + regs[r].h) - 1 >= lo) begin
          @(negedge clk);
          cfg_we = 1'b1; cfg_chunk = 2'(c); cfg_idx = $bits(cfg_idx)'(next_idx[c]); cfg_region = regs[r];
          next_idx[c]++;
          if (int'(regs[r].y) < lo) n_chunk_sw++;   // region continued into a further chunk
          @(negedge clk);
          cfg_we = 1'b0;
        end
      end
    end
  endtask

  task automatic run_frame(int f);
    longint t0 = -1, t1 = 0;
    int i = 0;
    stall_mode = (f % 2 == 1);
    // reference codes of this frame
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int n_cover = 0;
        codes[f*NPIX + y*W + x] = byte'(ref_code(f, x, y));
        foreach (regs[r])
          if (x >= int'(regs[r].x) && x < int'(regs[r].x + regs[r].w) &&
              y >= int'(regs[r].y) && y < int'(regs[r].y + regs[r].h)) n_cover++;
        if (n_cover > 1 && !(CYCLE_LEN != 0 && f % CYCLE_LEN == 0)) n_overlap++;
      end
    if (CYCLE_LEN != 0 && f % CYCLE_LEN == 0) n_full++;
    while (i < int'(NPIX / PPC)) begin
      @(negedge clk);
      s_tvalid = 1'b1;
      for (int k = 0; k < PPC; k++)
        s_tdata[k*PW +: PW] = orig(f, (i*PPC + k) % W, (i*PPC + k) / W);
      @(posedge clk);
      if (s_tready) begin
        if (t0 < 0) t0 = cycle;
        t1 = cycle;
        i++;
      end
    end
    @(negedge clk);
    s_tvalid = 1'b0;
    stall_mode = 1'b0;
    if (!stall_mode && f % 2 == 0)
      check(t1 - t0 + 1 == longint'(NPIX / PPC), $sformatf("frame %0d took %0d cycles for %0d beats", f, t1 - t0 + 1, NPIX / PPC));
    repeat (3 * FIFO_DRAIN) @(posedge clk);
  endtask

  localparam int unsigned FIFO_DRAIN = 12;

  task automatic check_streams(int f);
    int s = f % MC, idx = 0, nrow_nonempty = 0, tl = 0;
    check(pix_frame == f && off_frame == f && mask_frame == f, $sformatf("frame %0d stream frame counters %0d %0d %0d", f, pix_frame, off_frame, mask_frame));
    check(off_wr == H && mask_wr == H * WPR, $sformatf("frame %0d: %0d offsets, %0d mask words", f, off_wr, mask_wr));
    for (int y = 0; y < H; y++) begin
      int nrow = 0;
      check(off_mem[s][y] == OW'(idx), $sformatf("frame %0d row %0d offset %0d, expected %0d", f, y, off_mem[s][y], idx));
      for (int x = 0; x < W; x++) begin
        enc_code_t c = code_at(f, x, y);
        n_code[c]++;
        if (DEC_SAMPLES == 0 || (x % 97 == 0))
          check(mask_mem[s][y*WPR + x/MWP][2*(x%MWP) +: 2] == c, $sformatf("frame %0d (%0d,%0d) mask", f, x, y));
        if (c == ENC_R) begin
          if (DEC_SAMPLES == 0 || (idx % 101 == 0))
            check(pix_mem[s][idx] == orig(f, x, y), $sformatf("frame %0d pixel %0d (%0d,%0d)", f, idx, x, y));
          idx++;
          nrow++;
        end
      end
      // Two beats leave at the row end when more than PPC pixels are pending:
      // the held pixels (1..2, from an odd or even count before the last beat)
      // plus the last beat's.
      if (nrow > 2 && (((nrow - ((code_at(f, W-1, y) == ENC_R) + (code_at(f, W-2, y) == ENC_R)) - 1) % 2) + 1
                       + (code_at(f, W-1, y) == ENC_R) + (code_at(f, W-2, y) == ENC_R)) > 2) n_dual++;
      if (nrow == 0) n_empty_row++;
      else begin
        nrow_nonempty++;
        check(tl < tlast_idx.size() && tlast_idx[tl] == idx, $sformatf("frame %0d row %0d TLAST", f, y));
        tl++;
      end
    end
    check(pix_wr == idx, $sformatf("frame %0d: %0d encoded pixels, expected %0d", f, pix_wr, idx));
    check(tlast_idx.size() == nrow_nonempty, $sformatf("frame %0d: %0d TLASTs, expected %0d", f, tlast_idx.size(), nrow_nonempty));
    check(mask_tlasts == H && off_tlasts == 1, $sformatf("frame %0d: mask TLASTs %0d, offset TLASTs %0d", f, mask_tlasts, off_tlasts));
    tlast_idx.delete();
    mask_tlasts = 0;
    off_tlasts = 0;
  endtask

  task automatic decode_one(int f, int x, int y, int lim);
    int age;
    logic [PW-1:0] exp;
    exp = ref_dec(f, x, y, lim, age);
    @(negedge clk);
    dec_req_valid = 1'b1; dec_req_x = 16'(x); dec_req_y = 16'(y);
    do @(posedge clk); while (!dec_req_ready);
    @(negedge clk);
    dec_req_valid = 1'b0;
    do @(posedge clk); while (!dec_rsp_valid);
    check(dec_rsp_pixel == exp && dec_rsp_code == code_at(f, x, y),
          $sformatf("frame %0d decode (%0d,%0d): %h code %0d, expected %h code %0d", f, x, y,
                    dec_rsp_pixel, dec_rsp_code, exp, code_at(f, x, y)));
    if (code_at(f, x, y) == ENC_SK) begin
      if (int'(dec_rsp_age) > 0 && dec_rsp_pixel != '0) n_dec_age++;
      if (int'(dec_rsp_age) == lim - 1 && code_at(f - lim + 1, x, y) == ENC_SK) n_dec_miss++;
    end
    if (code_at(f, x, y) == ENC_ST && dec_rsp_pixel != '0) n_dec_st++;
  endtask

  task automatic decode_frame(int f);
    int lim = (f % 4 == 3) ? 1 : ((f + 1 < int'(MC)) ? f + 1 : int'(MC));
    dec_cur_slot   = SW'(f % MC);
    dec_num_frames = (SW+1)'(lim);
    if (DEC_SAMPLES == 0) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) decode_one(f, x, y, lim);
    end else begin
      // region corners and strided columns, then random pixels
      foreach (regs[r]) begin
        decode_one(f, int'(regs[r].x), int'(regs[r].y), lim);
        decode_one(f, int'(regs[r].x + regs[r].w) - 1, int'(regs[r].y + regs[r].h) - 1, lim);
        decode_one(f, int'(regs[r].x) + 1, int'(regs[r].y) + 1, lim);
      end
      for (int n = 0; n < int'(DEC_SAMPLES); n++) decode_one(f, $urandom % W, $urandom % H, lim);
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    codes = new[NF * NPIX];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    setup_regions();
    for (int f = 0; f < int'(NF); f++) begin
      run_frame(f);
      check_streams(f);
      decode_frame(f);
    end
    check(n_full > 0,        "no full-frame capture");
    check(n_code[ENC_N] > 0,  "no N pixel");
    check(n_code[ENC_ST] > 0, "no strided pixel");
    check(n_code[ENC_SK] > 0, "no skipped pixel");
    check(n_code[ENC_R] > 0,  "no encoded pixel");
    check(n_chunk_sw > 0,    "no region spanning two chunks");
    check(n_overlap > 0,     "no overlapping regions");
    check(n_stall > 0,       "TREADY never dropped under output back-pressure");
    check(n_partial > 0,     "no partial beat at a row end");
    check(n_dual > 0,        "no row end with two beats");
    check(n_empty_row > 0,   "no row without encoded pixels");
    check(n_dec_st > 0,      "decoder never filled a strided pixel");
    check(n_dec_age > 0,     "decoder never filled a skipped pixel from an earlier frame");
    if (!FULL) check(n_dec_miss > 0, "decoder never ran past the cached frames");
    $display("mechanisms: full=%0d N=%0d St=%0d Sk=%0d R=%0d regions_across_chunks=%0d overlap=%0d stalls=%0d partial=%0d dual=%0d empty_rows=%0d dec_st=%0d dec_sk=%0d dec_miss=%0d",
             n_full, n_code[0], n_code[1], n_code[2], n_code[3], n_chunk_sw, n_overlap, n_stall,
             n_partial, n_dual, n_empty_row, n_dec_st, n_dec_age, n_dec_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
