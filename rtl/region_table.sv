// region_table: storage for the region descriptors, grouped by chunk.
//
// The frame's rows are split into NUM_CHUNKS horizontal bands ("chunks").
// Software places each region in every chunk whose rows it covers, so the
// encoder only has to check the CHUNK_REGIONS entries of the current chunk
// for each pixel, which keeps the parallel check small while the frame as a
// whole holds NUM_CHUNKS*CHUNK_REGIONS entries (200 by default). The chunking
// and the 200-region total follow the design; the even 50-per-chunk split is
// this implementation's choice.
//
// Every entry also has a temporal phase counter. A region with skip field S
// is captured on one frame out of S+1: the entry is "active" when its phase is
// 0, and the phase steps 0,1..S,0 at every frame_end pulse. Writing an entry
// restarts its phase at 0, so a region written between frames is captured on
// the next frame; entries of one region written together stay in step.
//
// Interface: cfg_we writes cfg_region into (cfg_chunk, cfg_idx); cfg_clear
// invalidates every entry. `regions`/`active` show the entries of the chunk
// selected by `chunk`, combinationally. Writes take effect the next cycle and
// are meant to be made between frames.
module region_table
  import rp_pkg::*;
#(
  parameter int unsigned NUM_CHUNKS    = 4,
  parameter int unsigned CHUNK_REGIONS = 50
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_we,
  input  logic [$clog2(NUM_CHUNKS)-1:0]     cfg_chunk,
  input  logic [$clog2(CHUNK_REGIONS)-1:0]  cfg_idx,
  input  region_t                           cfg_region,
  input  logic                              cfg_clear,
  input  logic                              frame_end,
  input  logic [$clog2(NUM_CHUNKS)-1:0]     chunk,
  output region_t                           regions [CHUNK_REGIONS],
  output logic [CHUNK_REGIONS-1:0]          active
);
  region_t           tbl   [NUM_CHUNKS][CHUNK_REGIONS];
  logic [SKIP_W-1:0] phase [NUM_CHUNKS][CHUNK_REGIONS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NUM_CHUNKS); c++)
        for (int r = 0; r < int'(CHUNK_REGIONS); r++) begin
          tbl[c][r]   <= '0;
          phase[c][r] <= '0;
        end
    end else begin
      for (int c = 0; c < int'(NUM_CHUNKS); c++)
        for (int r = 0; r < int'(CHUNK_REGIONS); r++) begin
          if (cfg_clear) begin
            tbl[c][r].valid <= 1'b0;
          end else if (cfg_we && int'(cfg_chunk) == c && int'(cfg_idx) == r) begin
            tbl[c][r]   <= cfg_region;
            phase[c][r] <= '0;
          end else if (frame_end) begin
            phase[c][r] <= (phase[c][r] >= tbl[c][r].skip) ? '0 : phase[c][r] + 1'b1;
          end
        end
    end
  end

  always_comb begin
    for (int r = 0; r < int'(CHUNK_REGIONS); r++) begin
      regions[r] = tbl[chunk][r];
      active[r]  = (phase[chunk][r] == '0);
    end
  end

endmodule
