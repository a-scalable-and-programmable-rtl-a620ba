// row_offset_gen: per-row offsets of the encoded frame.
//
// For random access the decoder needs, for every row, the number of encoded
// pixels that come before the row in the frame. This block keeps a running
// count of the selected (R) pixels of the frame and, on the first beat of
// each row, emits the count as it stands before that beat, so row 0 always
// gets 0. The count restarts with every frame. The per-row offset itself
// follows the design; its width and the stream flags are this
// implementation's choices.
//
// Entry layout (OFFSET_W+2 bits): {tuser = row 0, tlast = last row of the
// frame, offset}. `push`/`word` are combinational and valid in the cycle
// where `adv` is high; the count updates on that edge.
module row_offset_gen #(
  parameter int unsigned PPC      = 2,
  parameter int unsigned OFFSET_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adv,
  input  logic [$clog2(PPC+1)-1:0] nsel,
  input  logic                     row_first,
  input  logic                     frame_first,
  input  logic                     last_row,
  output logic                     push,
  output logic [OFFSET_W+1:0]      word
);
  logic [OFFSET_W-1:0] count, base;

  // The first beat of a frame starts from zero whatever the count holds.
  assign base = frame_first ? '0 : count;
  assign push = adv && row_first;
  assign word = {frame_first, last_row, base};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (adv) count <= base + OFFSET_W'(nsel);
  end

endmodule
