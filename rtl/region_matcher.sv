// region_matcher: EncMask code of every pixel of a beat.
//
// Each of the PPC pixels of the beat is checked against all CHUNK_REGIONS
// descriptors of the current chunk at once (the design checks every region
// in parallel so that a beat can be taken every clock). Per region, a pixel
// outside the rectangle gets N; inside a region that is not captured in this
// frame it gets Sk; inside a captured region it gets R if its column is one
// the stride keeps ((px - x) mod (stride+1) == 0) and St otherwise. Over all
// regions the largest code wins, so any region that sends a pixel sends it.
// On a full-frame capture every pixel is R.
//
// The four codes and their meaning follow the design. That strides act on
// columns only (as in its worked example, where one middle column of a region
// is dropped) and the max-merge of overlapping regions are this
// implementation's reading.
//
// Interface: purely combinational. x, y give the first pixel of the beat;
// codes[k] belongs to pixel x+k.
module region_matcher
  import rp_pkg::*;
#(
  parameter int unsigned PPC           = 2,
  parameter int unsigned CHUNK_REGIONS = 50
) (
  input  logic [15:0]              x,
  input  logic [15:0]              y,
  input  logic                     full_frame,
  input  region_t                  regions [CHUNK_REGIONS],
  input  logic [CHUNK_REGIONS-1:0] active,
  output enc_code_t                codes   [PPC]
);
  always_comb begin
    for (int k = 0; k < int'(PPC); k++) begin
      logic [16:0] px;
      enc_code_t   best;
      px   = 17'(x) + 17'(k);
      best = ENC_N;
      for (int r = 0; r < int'(CHUNK_REGIONS); r++) begin
        logic      in_rect;
        logic [16:0] dx;
        enc_code_t c;
        in_rect = regions[r].valid
              && px >= 17'(regions[r].x) && px < 17'(regions[r].x) + 17'(regions[r].w)
              && 17'(y) >= 17'(regions[r].y) && 17'(y) < 17'(regions[r].y) + 17'(regions[r].h);
        dx = px - 17'(regions[r].x);
        if (!in_rect)                                          c = ENC_N;
        else if (!active[r])                                  c = ENC_SK;
        else if (dx % (17'(regions[r].stride) + 17'd1) != '0) c = ENC_ST;
        else                                                  c = ENC_R;
        if (c > best) best = c;
      end
      codes[k] = full_frame ? ENC_R : best;
    end
  end

endmodule
