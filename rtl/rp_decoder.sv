// rp_decoder: random-access decoder of rhythmic-pixel-region frames.
//
// A vision application asks for pixel (x, y) of the current frame in any
// order. The encoded frame holds only the R pixels, so the decoder uses the
// encoder's metadata to find it: the row offset gives the number of encoded
// pixels before row y, and the EncMask words of row y, read from the start of
// the row up to column x, give the number of R pixels before x and the code
// of (x, y) itself. Then:
//   R  - the pixel is encoded at index offset + count;
//   St - it was dropped by a column stride and is replaced by the nearest
//        encoded pixel to its left, index offset + count - 1 (0 if none);
//   Sk - it was skipped in this frame and is taken from the same position of
//        the previous cached frame, repeating the lookup there (and further
//        back if it was skipped there too);
//   N  - it lies outside every region and decodes to 0.
// If a skipped pixel is not resolved within the cached frames, 0 is returned.
//
// The use of offsets and EncMask, the St/Sk fill rules and the cache of
// earlier encoded frames follow the design. The memory interface, the
// sequential word-by-word scan, the handling of lookups that fall off the
// cache and the zero value of N pixels are this implementation's choices.
//
// Memory: the cache of encoded frames lives outside (in DRAM, written by the
// encoder's DMA engines) in MAX_CACHE slots. Three read ports each send a
// one-cycle request (slot, address) and wait for a one-cycle response valid;
// only one request is ever outstanding. The EncMask word of column x in row
// y is y*ceil(width/MASK_WORD_PIX) + x/MASK_WORD_PIX, the same layout
// encmask_packer writes.
// Requests: req_valid/req_ready handshake; rsp_valid pulses once per request
// with the pixel, the code of (x, y) in the current frame and the number of
// frames back the pixel came from. A lookup costs about
// 2*(x/MASK_WORD_PIX + 3) cycles per frame visited plus the memory latency.
// This is a functional decoder: it does not reach the two pixels per clock
// at which the pipeline's decoder is meant to run.
module rp_decoder
  import rp_pkg::*;
#(
  parameter int unsigned PIXEL_W       = 24,
  parameter int unsigned MASK_WORD_PIX = 16,
  parameter int unsigned OFFSET_W      = 32,
  parameter int unsigned MAX_CACHE     = 8,
  localparam int unsigned SW           = (MAX_CACHE > 1) ? $clog2(MAX_CACHE) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [15:0]                cfg_width,
  input  logic [SW-1:0]              cur_slot,     // slot of the current frame
  input  logic [SW:0]                num_frames,   // frames held, current one included
  // pixel requests
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [15:0]                req_x,
  input  logic [15:0]                req_y,
  output logic                       rsp_valid,
  output logic [PIXEL_W-1:0]         rsp_pixel,
  output enc_code_t                  rsp_code,
  output logic [SW:0]                rsp_age,
  // row offset reads
  output logic                       off_rd_req,
  output logic [SW-1:0]              off_rd_slot,
  output logic [15:0]                off_rd_row,
  input  logic                       off_rd_valid,
  input  logic [OFFSET_W-1:0]        off_rd_data,
  // EncMask word reads
  output logic                       mask_rd_req,
  output logic [SW-1:0]              mask_rd_slot,
  output logic [31:0]                mask_rd_addr,
  input  logic                       mask_rd_valid,
  input  logic [2*MASK_WORD_PIX-1:0] mask_rd_data,
  // encoded pixel reads
  output logic                       pix_rd_req,
  output logic [SW-1:0]              pix_rd_slot,
  output logic [OFFSET_W-1:0]        pix_rd_addr,
  input  logic                       pix_rd_valid,
  input  logic [PIXEL_W-1:0]         pix_rd_data
);
  localparam int unsigned LW = (MASK_WORD_PIX > 1) ? $clog2(MASK_WORD_PIX) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_OFF, S_OFF_W, S_MASK, S_MASK_W, S_PIX, S_PIX_W
  } state_t;

  state_t              state;
  logic [15:0]         x, y;
  logic [SW-1:0]       slot;
  logic [SW:0]         age;
  logic [OFFSET_W-1:0] offset, count, pix_addr;
  logic [15:0]         word;          // word of the row being read
  logic [15:0]         last_word;     // word holding column x
  logic [LW-1:0]       lane;          // column x inside that word
  logic [31:0]         words_per_row;
  enc_code_t           code0;         // code of (x, y) in the current frame

  // Count of R codes in a mask word, among the first `n` codes.
  function automatic logic [LW:0] count_r(input logic [2*MASK_WORD_PIX-1:0] w, input int unsigned n);
    logic [LW:0] c;
    c = '0;
    for (int i = 0; i < int'(MASK_WORD_PIX); i++)
      if (i < int'(n) && w[2*i +: 2] == ENC_R) c = c + 1'b1;
    return c;
  endfunction

  assign words_per_row = (32'(cfg_width) + MASK_WORD_PIX - 1) / MASK_WORD_PIX;
  assign last_word     = 16'(x / 16'(MASK_WORD_PIX));
  assign lane          = LW'(x % 16'(MASK_WORD_PIX));

  assign req_ready    = (state == S_IDLE);
  assign off_rd_req   = (state == S_OFF);
  assign off_rd_slot  = slot;
  assign off_rd_row   = y;
  assign mask_rd_req  = (state == S_MASK);
  assign mask_rd_slot = slot;
  assign mask_rd_addr = 32'(y) * words_per_row + 32'(word);
  assign pix_rd_req   = (state == S_PIX);
  assign pix_rd_slot  = slot;
  assign pix_rd_addr  = pix_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      x         <= '0;
      y         <= '0;
      slot      <= '0;
      age       <= '0;
      offset    <= '0;
      count     <= '0;
      pix_addr  <= '0;
      word      <= '0;
      code0     <= ENC_N;
      rsp_valid <= 1'b0;
      rsp_pixel <= '0;
      rsp_code  <= ENC_N;
      rsp_age   <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          x     <= req_x;
          y     <= req_y;
          slot  <= cur_slot;
          age   <= '0;
          state <= S_OFF;
        end
        S_OFF:   state <= S_OFF_W;
        S_OFF_W: if (off_rd_valid) begin
          offset <= off_rd_data;
          count  <= '0;
          word   <= '0;
          state  <= S_MASK;
        end
        S_MASK:   state <= S_MASK_W;
        S_MASK_W: if (mask_rd_valid) begin
          if (word != last_word) begin
            count <= count + OFFSET_W'(count_r(mask_rd_data, MASK_WORD_PIX));
            word  <= word + 1'b1;
            state <= S_MASK;
          end else begin
            logic [OFFSET_W-1:0] n_left;   // R pixels of the row left of x
            enc_code_t           c;
            n_left = count + OFFSET_W'(count_r(mask_rd_data, int'(lane)));
            c      = enc_code_t'(mask_rd_data[2*int'(lane) +: 2]);
            if (age == '0) code0 <= c;
            unique case (c)
              ENC_R: begin
                pix_addr <= offset + n_left;
                state    <= S_PIX;
              end
              ENC_ST: begin
                if (n_left != '0) begin
                  pix_addr <= offset + n_left - 1'b1;
                  state    <= S_PIX;
                end else begin
                  rsp_valid <= 1'b1;
                  rsp_pixel <= '0;
                  rsp_code  <= (age == '0) ? c : code0;
                  rsp_age   <= age;
                  state     <= S_IDLE;
                end
              end
              ENC_SK: begin
                if (32'(age) + 1 < 32'(num_frames)) begin
                  age   <= age + 1'b1;
                  slot  <= (slot == '0) ? SW'(MAX_CACHE - 1) : slot - 1'b1;
                  state <= S_OFF;
                end else begin
                  rsp_valid <= 1'b1;
                  rsp_pixel <= '0;
                  rsp_code  <= (age == '0) ? c : code0;
                  rsp_age   <= age;
                  state     <= S_IDLE;
                end
              end
              default: begin
                rsp_valid <= 1'b1;
                rsp_pixel <= '0;
                rsp_code  <= (age == '0) ? c : code0;
                rsp_age   <= age;
                state     <= S_IDLE;
              end
            endcase
          end
        end
        S_PIX:   state <= S_PIX_W;
        S_PIX_W: if (pix_rd_valid) begin
          rsp_valid <= 1'b1;
          rsp_pixel <= pix_rd_data;
          rsp_code  <= code0;
          rsp_age   <= age;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
