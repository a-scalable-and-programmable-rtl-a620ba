// pixel_packer: builds the encoded pixel stream.
//
// Only pixels coded R leave the encoder. Each accepted input beat brings PPC
// pixels of which 0..PPC are selected; the packer appends them, in order, to
// the up to PPC pixels it still holds from earlier beats of the row and sends
// a full PPC-wide beat once it has more than PPC. It always keeps at least one
// pixel back until the row ends, because only then is it known which pixel is
// the row's last: on the last beat of a row whatever is held goes out with
// TLAST set, so TLAST marks the last encoded pixel of the row. That can mean
// two beats in the same cycle, hence the two push outputs. A row with
// no encoded pixel produces no beat. TKEEP marks the valid pixel lanes of a
// partial beat and TUSER the first beat sent in a frame.
//
// Sending only the selected pixels in raster order, and placing TLAST on the
// last encoded pixel of the row, follow the design. TKEEP/TUSER and keeping
// rows apart in beats are this implementation's choices.
//
// Beat layout (W = PPC*PIXEL_W + PPC + 2 bits): {tuser, tlast, tkeep[PPC-1:0],
// tdata}, pixel k in tdata[k*PIXEL_W +: PIXEL_W].
// Timing: push0/push1 and the beats are combinational from the inputs and are
// valid in the cycle where `adv` is high; held pixels update on that edge.
module pixel_packer #(
  parameter int unsigned PPC     = 2,
  parameter int unsigned PIXEL_W = 24,
  localparam int unsigned BEAT_W = PPC*PIXEL_W + PPC + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adv,
  input  logic [PPC*PIXEL_W-1:0]   pix,
  input  logic [PPC-1:0]           sel,
  input  logic                     row_last,
  input  logic                     frame_first,
  output logic                     push0,
  output logic [BEAT_W-1:0]        beat0,
  output logic                     push1,
  output logic [BEAT_W-1:0]        beat1
);
  localparam int unsigned CW = $clog2(2*PPC+1);

  logic [PIXEL_W-1:0] held   [PPC];
  logic [CW-1:0]      nheld;
  logic               sof_pending;

  logic [PIXEL_W-1:0] buf_q  [2*PPC];
  logic [CW-1:0]      n;
  logic [PIXEL_W-1:0] held_d [PPC];
  logic [CW-1:0]      nheld_d;
  logic               sof;

  function automatic logic [BEAT_W-1:0] make_beat(input logic [PIXEL_W-1:0] p [2*PPC],
                                                  input int unsigned base, input int unsigned cnt,
                                                  input logic last, input logic user);
    logic [BEAT_W-1:0] b;
    b = '0;
    for (int k = 0; k < int'(PPC); k++) begin
      if (k < int'(cnt)) begin
        b[k*PIXEL_W +: PIXEL_W] = p[base + k];
        b[PPC*PIXEL_W + k]      = 1'b1;
      end
    end
    b[BEAT_W-2] = last;
    b[BEAT_W-1] = user;
    return b;
  endfunction

  // Append the selected pixels of the beat behind the held ones.
  always_comb begin
    int unsigned m;
    for (int i = 0; i < int'(2*PPC); i++) buf_q[i] = '0;
    for (int i = 0; i < int'(PPC); i++) if (i < int'(nheld)) buf_q[i] = held[i];
    m = int'(nheld);
    for (int k = 0; k < int'(PPC); k++) begin
      if (sel[k]) begin
        buf_q[m] = pix[k*PIXEL_W +: PIXEL_W];
        m++;
      end
    end
    n = CW'(m);
  end

  always_comb begin
    sof     = sof_pending || frame_first;
    push0   = 1'b0;
    push1   = 1'b0;
    beat0   = '0;
    beat1   = '0;
    nheld_d = n;
    for (int i = 0; i < int'(PPC); i++) held_d[i] = buf_q[i];
    if (adv) begin
      if (!row_last) begin
        if (int'(n) > int'(PPC)) begin
          push0   = 1'b1;
          beat0   = make_beat(buf_q, 0, PPC, 1'b0, sof);
          nheld_d = n - CW'(PPC);
          for (int i = 0; i < int'(PPC); i++) held_d[i] = buf_q[PPC + i];
        end
      end else begin
        nheld_d = '0;
        if (int'(n) > int'(PPC)) begin
          push0 = 1'b1;
          beat0 = make_beat(buf_q, 0, PPC, 1'b0, sof);
          push1 = 1'b1;
          beat1 = make_beat(buf_q, PPC, int'(n) - int'(PPC), 1'b1, 1'b0);
        end else if (n != '0) begin
          push0 = 1'b1;
          beat0 = make_beat(buf_q, 0, int'(n), 1'b1, sof);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nheld       <= '0;
      sof_pending <= 1'b0;
      for (int i = 0; i < int'(PPC); i++) held[i] <= '0;
    end else if (adv) begin
      nheld       <= nheld_d;
      held        <= held_d;
      sof_pending <= sof && !push0;
    end
  end

endmodule
