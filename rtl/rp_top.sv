// rp_top: rhythmic pixel region I/O controller, encoder and decoder.
//
// Rhythmic pixel regions let a vision application ask for many rectangular
// regions of the camera frame, each with its own position, size, column
// stride and frame rate, and move only those pixels through DRAM. The
// encoder (rp_encoder) sits after the ISP and turns the full-rate pixel
// stream into three streams: the encoded pixels, a per-row offset and a 2-bit
// EncMask per original pixel. DMA engines write them to a cache of recent
// encoded frames in DRAM. The decoder (rp_decoder) reads that cache back and
// serves requests for any pixel of the current frame as if it were a plain
// frame: strided pixels copy their left encoded neighbour, skipped pixels
// come from an earlier frame, pixels outside all regions read as 0.
//
// The DMA engines and DRAM are not part of this RTL, so the encoder's three
// output streams and the decoder's three memory read ports are ports of this
// module; the user connects them through memory. Both halves share the frame
// width. The default parameters are the design's largest configuration: 4K
// frames at 2 pixels per clock, 4 chunks, 200 regions. The split into an
// encoder and a decoder joined through a DRAM cache follows the design; the
// port-level interfaces and the 8-slot cache default are this
// implementation's choices.
module rp_top
  import rp_pkg::*;
#(
  parameter int unsigned PPC           = 2,
  parameter int unsigned NUM_CHUNKS    = 4,
  parameter int unsigned CHUNK_REGIONS = 50,
  parameter int unsigned PIXEL_W       = 24,
  parameter int unsigned MASK_WORD_PIX = 16,
  parameter int unsigned OFFSET_W      = 32,
  parameter int unsigned MAX_CACHE     = 8,
  localparam int unsigned SW           = (MAX_CACHE > 1) ? $clog2(MAX_CACHE) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic [15:0]                      cfg_width,
  input  logic [15:0]                      cfg_height,
  input  logic [7:0]                       cfg_cycle_len,
  input  logic                             cfg_we,
  input  logic [$clog2(NUM_CHUNKS)-1:0]    cfg_chunk,
  input  logic [$clog2(CHUNK_REGIONS)-1:0] cfg_idx,
  input  region_t                          cfg_region,
  input  logic                             cfg_clear,
  // ISP pixel stream
  input  logic                             s_tvalid,
  output logic                             s_tready,
  input  logic [PPC*PIXEL_W-1:0]           s_tdata,
  // encoder output streams, to the DMA engines
  output logic                             m_pix_tvalid,
  input  logic                             m_pix_tready,
  output logic [PPC*PIXEL_W-1:0]           m_pix_tdata,
  output logic [PPC-1:0]                   m_pix_tkeep,
  output logic                             m_pix_tlast,
  output logic                             m_pix_tuser,
  output logic                             m_off_tvalid,
  input  logic                             m_off_tready,
  output logic [OFFSET_W-1:0]              m_off_tdata,
  output logic                             m_off_tlast,
  output logic                             m_off_tuser,
  output logic                             m_mask_tvalid,
  input  logic                             m_mask_tready,
  output logic [2*MASK_WORD_PIX-1:0]       m_mask_tdata,
  output logic                             m_mask_tlast,
  output logic                             m_mask_tuser,
  output logic [31:0]                      frame_idx,
  output logic                             full_frame,
  // decoder
  input  logic [SW-1:0]                    dec_cur_slot,
  input  logic [SW:0]                      dec_num_frames,
  input  logic                             dec_req_valid,
  output logic                             dec_req_ready,
  input  logic [15:0]                      dec_req_x,
  input  logic [15:0]                      dec_req_y,
  output logic                             dec_rsp_valid,
  output logic [PIXEL_W-1:0]               dec_rsp_pixel,
  output enc_code_t                        dec_rsp_code,
  output logic [SW:0]                      dec_rsp_age,
  // decoder reads of the encoded-frame cache
  output logic                             off_rd_req,
  output logic [SW-1:0]                    off_rd_slot,
  output logic [15:0]                      off_rd_row,
  input  logic                             off_rd_valid,
  input  logic [OFFSET_W-1:0]              off_rd_data,
  output logic                             mask_rd_req,
  output logic [SW-1:0]                    mask_rd_slot,
  output logic [31:0]                      mask_rd_addr,
  input  logic                             mask_rd_valid,
  input  logic [2*MASK_WORD_PIX-1:0]       mask_rd_data,
  output logic                             pix_rd_req,
  output logic [SW-1:0]                    pix_rd_slot,
  output logic [OFFSET_W-1:0]              pix_rd_addr,
  input  logic                             pix_rd_valid,
  input  logic [PIXEL_W-1:0]               pix_rd_data
);

  rp_encoder #(
    .PPC(PPC), .NUM_CHUNKS(NUM_CHUNKS), .CHUNK_REGIONS(CHUNK_REGIONS), .PIXEL_W(PIXEL_W),
    .MASK_WORD_PIX(MASK_WORD_PIX), .OFFSET_W(OFFSET_W)
  ) u_enc (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_cycle_len, .cfg_we, .cfg_chunk, .cfg_idx,
    .cfg_region, .cfg_clear, .s_tvalid, .s_tready, .s_tdata,
    .m_pix_tvalid, .m_pix_tready, .m_pix_tdata, .m_pix_tkeep, .m_pix_tlast, .m_pix_tuser,
    .m_off_tvalid, .m_off_tready, .m_off_tdata, .m_off_tlast, .m_off_tuser,
    .m_mask_tvalid, .m_mask_tready, .m_mask_tdata, .m_mask_tlast, .m_mask_tuser,
    .frame_idx, .full_frame
  );

  rp_decoder #(
    .PIXEL_W(PIXEL_W), .MASK_WORD_PIX(MASK_WORD_PIX), .OFFSET_W(OFFSET_W), .MAX_CACHE(MAX_CACHE)
  ) u_dec (
    .clk, .rst_n, .cfg_width, .cur_slot(dec_cur_slot), .num_frames(dec_num_frames),
    .req_valid(dec_req_valid), .req_ready(dec_req_ready), .req_x(dec_req_x), .req_y(dec_req_y),
    .rsp_valid(dec_rsp_valid), .rsp_pixel(dec_rsp_pixel), .rsp_code(dec_rsp_code), .rsp_age(dec_rsp_age),
    .off_rd_req, .off_rd_slot, .off_rd_row, .off_rd_valid, .off_rd_data,
    .mask_rd_req, .mask_rd_slot, .mask_rd_addr, .mask_rd_valid, .mask_rd_data,
    .pix_rd_req, .pix_rd_slot, .pix_rd_addr, .pix_rd_valid, .pix_rd_data
  );

endmodule
