// rp_encoder: rhythmic pixel region encoder (the I/O selection interface).
//
// Sits between the image signal pipeline and memory. The ISP's pixel stream
// arrives in raster order, PPC pixels per clock; the encoder checks every
// pixel against the application's regions and writes out three AXI4-Streams
// for three DMA engines:
//   * pixel stream  - only the pixels coded R, packed PPC per beat, TLAST on
//                     the last encoded pixel of each row;
//   * offset stream - one word per row: encoded pixels of the frame before it;
//   * EncMask stream - the 2-bit code (N/St/Sk/R) of every original pixel.
// Together they let a decoder rebuild any pixel without rescanning the frame.
//
// Inside: scan_tracker follows the raster position, the chunk of the row and
// the full-frame cycle; region_table hands the descriptors of the current
// chunk to region_matcher, which codes all PPC pixels of the beat against all
// of them in one cycle; pixel_packer, row_offset_gen and encmask_packer turn
// the codes into the three streams, each buffered by an rp_fifo.
//
// Timing: a beat is taken whenever s_tvalid and s_tready are high, and the
// streams see its results one clock later. The design requires TREADY to be
// high on every cycle; here it only drops when an output FIFO lacks room for
// a worst-case beat, which happens only if a DMA engine stalls. The streams,
// the codes, the chunks and the cycle length follow the design; the FIFOs, the
// one-cycle latency, the configuration port and the beat layouts are this
// implementation's choices.
module rp_encoder
  import rp_pkg::*;
#(
  parameter int unsigned PPC           = 2,
  parameter int unsigned NUM_CHUNKS    = 4,
  parameter int unsigned CHUNK_REGIONS = 50,
  parameter int unsigned PIXEL_W       = 24,
  parameter int unsigned MASK_WORD_PIX = 16,
  parameter int unsigned OFFSET_W      = 32,
  parameter int unsigned FIFO_DEPTH    = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration (change between frames)
  input  logic [15:0]                      cfg_width,
  input  logic [15:0]                      cfg_height,
  input  logic [7:0]                       cfg_cycle_len,
  input  logic                             cfg_we,
  input  logic [$clog2(NUM_CHUNKS)-1:0]    cfg_chunk,
  input  logic [$clog2(CHUNK_REGIONS)-1:0] cfg_idx,
  input  region_t                          cfg_region,
  input  logic                             cfg_clear,
  // pixel stream from the ISP
  input  logic                             s_tvalid,
  output logic                             s_tready,
  input  logic [PPC*PIXEL_W-1:0]           s_tdata,
  // encoded pixel stream
  output logic                             m_pix_tvalid,
  input  logic                             m_pix_tready,
  output logic [PPC*PIXEL_W-1:0]           m_pix_tdata,
  output logic [PPC-1:0]                   m_pix_tkeep,
  output logic                             m_pix_tlast,
  output logic                             m_pix_tuser,
  // per-row offset stream
  output logic                             m_off_tvalid,
  input  logic                             m_off_tready,
  output logic [OFFSET_W-1:0]              m_off_tdata,
  output logic                             m_off_tlast,
  output logic                             m_off_tuser,
  // EncMask stream
  output logic                             m_mask_tvalid,
  input  logic                             m_mask_tready,
  output logic [2*MASK_WORD_PIX-1:0]       m_mask_tdata,
  output logic                             m_mask_tlast,
  output logic                             m_mask_tuser,
  // status
  output logic [31:0]                      frame_idx,
  output logic                             full_frame
);
  localparam int unsigned BEAT_W = PPC*PIXEL_W + PPC + 2;
  localparam int unsigned OFF_EW = OFFSET_W + 2;
  localparam int unsigned MSK_EW = 2*MASK_WORD_PIX + 2;
  localparam int unsigned FCW    = $clog2(FIFO_DEPTH+1);

  logic                          adv;
  logic [15:0]                   x, y;
  logic [$clog2(NUM_CHUNKS)-1:0] chunk;
  logic                          row_first, row_last, frame_first, frame_last, last_row, frame_end;
  region_t                       regions [CHUNK_REGIONS];
  logic [CHUNK_REGIONS-1:0]      active;
  enc_code_t                     codes [PPC];
  logic [PPC-1:0]                sel;
  logic [$clog2(PPC+1)-1:0]      nsel;

  logic              pix_push0, pix_push1, off_push, msk_push;
  logic [BEAT_W-1:0] pix_beat0, pix_beat1, pix_head;
  logic [OFF_EW-1:0] off_word, off_head;
  logic [MSK_EW-1:0] msk_word, msk_head;
  logic [FCW-1:0]    pix_cnt, off_cnt, msk_cnt;

  assign s_tready = (int'(pix_cnt) <= int'(FIFO_DEPTH) - 2)
                 && (int'(off_cnt) <= int'(FIFO_DEPTH) - 1)
                 && (int'(msk_cnt) <= int'(FIFO_DEPTH) - 1);
  assign adv = s_tvalid && s_tready;

  scan_tracker #(.PPC(PPC), .NUM_CHUNKS(NUM_CHUNKS)) u_scan (
    .clk, .rst_n, .adv, .cfg_width, .cfg_height, .cfg_cycle_len,
    .x, .y, .chunk, .row_first, .row_last, .frame_first, .frame_last, .last_row, .frame_end,
    .full_frame, .frame_idx
  );

  region_table #(.NUM_CHUNKS(NUM_CHUNKS), .CHUNK_REGIONS(CHUNK_REGIONS)) u_table (
    .clk, .rst_n, .cfg_we, .cfg_chunk, .cfg_idx, .cfg_region, .cfg_clear,
    .frame_end, .chunk, .regions, .active
  );

  region_matcher #(.PPC(PPC), .CHUNK_REGIONS(CHUNK_REGIONS)) u_match (
    .x, .y, .full_frame, .regions, .active, .codes
  );

  always_comb begin
    nsel = '0;
    for (int k = 0; k < int'(PPC); k++) begin
      sel[k] = (codes[k] == ENC_R);
      nsel   = nsel + sel[k];
    end
  end

  pixel_packer #(.PPC(PPC), .PIXEL_W(PIXEL_W)) u_pack (
    .clk, .rst_n, .adv, .pix(s_tdata), .sel, .row_last, .frame_first,
    .push0(pix_push0), .beat0(pix_beat0), .push1(pix_push1), .beat1(pix_beat1)
  );

  row_offset_gen #(.PPC(PPC), .OFFSET_W(OFFSET_W)) u_off (
    .clk, .rst_n, .adv, .nsel, .row_first, .frame_first, .last_row,
    .push(off_push), .word(off_word)
  );

  encmask_packer #(.PPC(PPC), .MASK_WORD_PIX(MASK_WORD_PIX)) u_mask (
    .clk, .rst_n, .adv, .codes, .row_last, .frame_first,
    .push(msk_push), .word(msk_word)
  );

  rp_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_pix_fifo (
    .clk, .rst_n, .push0(pix_push0), .din0(pix_beat0), .push1(pix_push1), .din1(pix_beat1),
    .m_valid(m_pix_tvalid), .m_ready(m_pix_tready), .m_data(pix_head), .count(pix_cnt)
  );

  rp_fifo #(.WIDTH(OFF_EW), .DEPTH(FIFO_DEPTH)) u_off_fifo (
    .clk, .rst_n, .push0(off_push), .din0(off_word), .push1(1'b0), .din1('0),
    .m_valid(m_off_tvalid), .m_ready(m_off_tready), .m_data(off_head), .count(off_cnt)
  );

  rp_fifo #(.WIDTH(MSK_EW), .DEPTH(FIFO_DEPTH)) u_msk_fifo (
    .clk, .rst_n, .push0(msk_push), .din0(msk_word), .push1(1'b0), .din1('0),
    .m_valid(m_mask_tvalid), .m_ready(m_mask_tready), .m_data(msk_head), .count(msk_cnt)
  );

  assign {m_pix_tuser, m_pix_tlast, m_pix_tkeep, m_pix_tdata} = pix_head;
  assign {m_off_tuser, m_off_tlast, m_off_tdata}              = off_head;
  assign {m_mask_tuser, m_mask_tlast, m_mask_tdata}           = msk_head;

  // AXI4-Stream rule on the outputs: once valid, a beat stays until taken.
  a_pix_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_pix_tvalid && !m_pix_tready |=> m_pix_tvalid && $stable(pix_head));
  a_off_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_off_tvalid && !m_off_tready |=> m_off_tvalid && $stable(off_head));
  a_msk_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_mask_tvalid && !m_mask_tready |=> m_mask_tvalid && $stable(msk_head));

endmodule
