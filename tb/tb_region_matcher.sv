// tb_region_matcher: random descriptor sets (overlapping, strided, skipped,
// some invalid) and random beats, each code compared with a model that
// evaluates the coding rule pixel by pixel; plus full-frame beats.
module tb_region_matcher;
  import rp_pkg::*;
  localparam int PPC = 2, CR = 6;
  logic [15:0] x = '0, y = '0;
  logic full_frame = 0;
  region_t regions [CR];
  logic [CR-1:0] active = '0;
  enc_code_t codes [PPC];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  region_matcher #(.PPC(PPC), .CHUNK_REGIONS(CR)) dut (.*);

  function automatic enc_code_t model(int px, int py);
    enc_code_t best;
    best = ENC_N;
    if (full_frame) return ENC_R;
    for (int r = 0; r < CR; r++) begin
      enc_code_t c;
      c = ENC_N;
      if (regions[r].valid && px >= int'(regions[r].x) && px < int'(regions[r].x) + int'(regions[r].w)
          && py >= int'(regions[r].y) && py < int'(regions[r].y) + int'(regions[r].h)) begin
        if (!active[r]) c = ENC_SK;
        else if ((px - int'(regions[r].x)) % (int'(regions[r].stride) + 1) == 0) c = ENC_R;
        else c = ENC_ST;
      end
      if (c > best) best = c;
    end
    return best;
  endfunction

  initial begin
    for (int set = 0; set < 200; set++) begin
      for (int r = 0; r < CR; r++)
        regions[r] = '{($urandom % 5 != 0), 16'($urandom % 40), 16'($urandom % 20), 16'(1 + $urandom % 15),
                       16'(1 + $urandom % 8), 4'($urandom % 4), 4'($urandom)};
      active = CR'($urandom);
      for (int b = 0; b < 40; b++) begin
        x = 16'(2 * ($urandom % 28));
        y = 16'($urandom % 30);
        full_frame = (b == 39);
        #1;
        for (int k = 0; k < PPC; k++) begin
          enc_code_t e;
          e = model(int'(x) + k, int'(y));
          checks++;
          seen[e]++;
          if (codes[k] != e) begin
            failures++;
            if (failures < 10) $display("FAIL (%0d,%0d) got %0d expected %0d", int'(x) + k, y, codes[k], e);
          end
        end
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) failures++;
    $display("codes seen N=%0d St=%0d Sk=%0d R=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
