// rp_pkg: types and constants shared by the rhythmic-pixel-region encoder and
// decoder.
//
// The EncMask codes are the ones the design defines for every pixel of the
// original frame: N (00) non-regional, St (01) regional but dropped by the
// region's column stride, Sk (10) regional but temporally skipped in this
// frame, R (11) regional and sent. Their numeric order is also used to merge
// overlapping regions (the larger code wins), which is this implementation's
// own rule.
//
// A region descriptor holds its position and size in pixels, a column stride
// (keep one column out of STRIDE+1, counted from the left edge) and a
// temporal skip (capture the region on one frame out of SKIP+1). The field
// widths are this implementation's choice: 16-bit coordinates cover 4K frames,
// 4-bit stride and skip fields give sampling periods of 1 to 16.
package rp_pkg;

  typedef enum logic [1:0] {
    ENC_N  = 2'b00,  // non-regional pixel
    ENC_ST = 2'b01,  // regional pixel, strided away
    ENC_SK = 2'b10,  // regional pixel, temporally skipped this frame
    ENC_R  = 2'b11   // regional pixel, encoded
  } enc_code_t;

  localparam int unsigned COORD_W  = 16;
  localparam int unsigned STRIDE_W = 4;
  localparam int unsigned SKIP_W   = 4;

  typedef struct packed {
    logic                valid;
    logic [COORD_W-1:0]  x;       // left column
    logic [COORD_W-1:0]  y;       // top row
    logic [COORD_W-1:0]  w;       // width in pixels
    logic [COORD_W-1:0]  h;       // height in rows
    logic [STRIDE_W-1:0] stride;  // columns dropped between kept columns
    logic [SKIP_W-1:0]   skip;    // frames skipped between captures
  } region_t;

endpackage
