// encmask_packer: builds the EncMask stream.
//
// Every pixel of the original frame has a 2-bit EncMask code (N, St, Sk, R).
// The packer gathers the PPC codes of each accepted beat into words of
// MASK_WORD_PIX codes, pixel i of a word in bits [2i+1:2i], and sends a word
// when it is full or the row ends. Each row starts a new word, so the word
// holding column x of row y is y*ceil(width/MASK_WORD_PIX) + x/MASK_WORD_PIX;
// codes past the row's end are 0 (N). The codes are the design's; the word
// size and row alignment are this implementation's choices.
//
// Entry layout (2*MASK_WORD_PIX+2 bits): {tuser = first word of the frame,
// tlast = last word of the row, codes}. MASK_WORD_PIX must be a multiple of
// PPC. `push`/`word` are combinational, valid in the cycle where `adv` is
// high.
module encmask_packer
  import rp_pkg::*;
#(
  parameter int unsigned PPC           = 2,
  parameter int unsigned MASK_WORD_PIX = 16,
  localparam int unsigned WORD_W       = 2*MASK_WORD_PIX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv,
  input  enc_code_t         codes [PPC],
  input  logic              row_last,
  input  logic              frame_first,
  output logic              push,
  output logic [WORD_W+1:0] word
);
  localparam int unsigned SLOTS = MASK_WORD_PIX / PPC;
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  logic [WORD_W-1:0] acc, acc_d;
  logic [SW-1:0]     slot;     // beats already in acc
  logic              first_q;  // acc holds the frame's first codes

  always_comb begin
    acc_d = acc;
    for (int k = 0; k < int'(PPC); k++)
      acc_d[(int'(slot)*int'(PPC) + k)*2 +: 2] = codes[k];
  end

  assign push = adv && (row_last || (int'(slot) == int'(SLOTS) - 1));
  assign word = {frame_first || first_q, row_last, acc_d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      slot    <= '0;
      first_q <= 1'b0;
    end else if (adv) begin
      if (push) begin
        acc     <= '0;
        slot    <= '0;
        first_q <= 1'b0;
      end else begin
        acc     <= acc_d;
        slot    <= slot + 1'b1;
        first_q <= frame_first || first_q;
      end
    end
  end

endmodule
