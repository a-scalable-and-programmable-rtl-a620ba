// scan_tracker: raster position of the encoder's input stream.
//
// The ISP delivers each frame in raster order, PPC pixels per beat. This
// block counts accepted beats against the configured frame size and reports
// the column x and row y of the beat's first pixel, the chunk of the row, the
// beat's place in its row and frame, and whether the frame is a full-frame
// capture.
//
// Chunks are horizontal bands of floor(height/NUM_CHUNKS) rows; the last
// chunk also takes the remainder rows. The cycle length L makes every L-th
// frame a full capture, starting with frame 0 (L = 0 disables full
// captures). Both mechanisms follow the design; where the band edges fall and
// which frame of the cycle is the full one are this implementation's choices.
//
// Interface: `adv` is high for one cycle per accepted beat; all outputs
// describe the beat being presented now and change on the clock edge after
// `adv`. `frame_end` pulses with `adv` on the frame's last beat. Width must be
// a multiple of PPC, height at least NUM_CHUNKS, and NUM_CHUNKS at least 2; configuration is sampled
// at every step and is meant to change only between frames.
module scan_tracker #(
  parameter int unsigned PPC        = 2,
  parameter int unsigned NUM_CHUNKS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          adv,
  input  logic [15:0]                   cfg_width,
  input  logic [15:0]                   cfg_height,
  input  logic [7:0]                    cfg_cycle_len,
  output logic [15:0]                   x,
  output logic [15:0]                   y,
  output logic [$clog2(NUM_CHUNKS)-1:0] chunk,
  output logic                          row_first,
  output logic                          row_last,
  output logic                          frame_first,
  output logic                          frame_last,
  output logic                          last_row,
  output logic                          frame_end,
  output logic                          full_frame,
  output logic [31:0]                   frame_idx
);
  logic [15:0] chunk_rows;     // rows per chunk
  logic [15:0] row_in_chunk;
  logic [7:0]  cyc_pos;        // frame position inside the capture cycle

  assign chunk_rows  = cfg_height / 16'(NUM_CHUNKS);
  assign row_first   = (x == '0);
  assign row_last    = (32'(x) + PPC >= 32'(cfg_width));
  assign frame_first = row_first && (y == '0);
  assign last_row    = (32'(y) + 1 >= 32'(cfg_height));
  assign frame_last  = row_last && last_row;
  assign frame_end   = adv && frame_last;
  assign full_frame  = (cfg_cycle_len != '0) && (cyc_pos == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x            <= '0;
      y            <= '0;
      chunk        <= '0;
      row_in_chunk <= '0;
      cyc_pos      <= '0;
      frame_idx    <= '0;
    end else if (adv) begin
      if (!row_last) begin
        x <= x + 16'(PPC);
      end else begin
        x <= '0;
        if (frame_last) begin
          y            <= '0;
          chunk        <= '0;
          row_in_chunk <= '0;
          frame_idx    <= frame_idx + 1;
          cyc_pos      <= (32'(cyc_pos) + 1 >= 32'(cfg_cycle_len)) ? '0 : cyc_pos + 1'b1;
        end else begin
          y <= y + 1'b1;
          if (row_in_chunk + 1'b1 >= chunk_rows && 32'(chunk) < NUM_CHUNKS - 1) begin
            chunk        <= chunk + 1'b1;
            row_in_chunk <= '0;
          end else begin
            row_in_chunk <= row_in_chunk + 1'b1;
          end
        end
      end
    end
  end

endmodule
