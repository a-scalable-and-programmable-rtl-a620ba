// tb_region_table: writes descriptors into several chunks, reads every chunk
// back, steps frames and checks each entry's captured flag against
// frame mod (skip+1), then checks that a rewrite restarts the phase and that
// clear invalidates everything.
module tb_region_table;
  import rp_pkg::*;
  localparam int NC = 4, CR = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, cfg_clear = 0, frame_end = 0;
  logic [1:0] cfg_chunk = '0, chunk = '0;
  logic [2:0] cfg_idx = '0;
  region_t cfg_region = '0;
  region_t regions [CR];
  logic [CR-1:0] active;
  region_t model [NC][CR];
  int wframe [NC][CR];
  int checks = 0, failures = 0, frame = 0;

  region_table #(.NUM_CHUNKS(NC), .CHUNK_REGIONS(CR)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic write(int c, int i, region_t r);
    @(negedge clk);
    cfg_we = 1; cfg_chunk = 2'(c); cfg_idx = 3'(i); cfg_region = r;
    @(negedge clk);
    cfg_we = 0;
    model[c][i] = r; wframe[c][i] = frame;
  endtask

  task automatic compare();
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      chunk = 2'(c);
      #1;
      for (int i = 0; i < CR; i++) begin
        check(regions[i] == model[c][i], $sformatf("chunk %0d entry %0d descriptor", c, i));
        check(active[i] == ((frame - wframe[c][i]) % (int'(model[c][i].skip) + 1) == 0),
              $sformatf("frame %0d chunk %0d entry %0d active %b skip %0d", frame, c, i, active[i], model[c][i].skip));
      end
    end
  endtask

  initial begin
    foreach (model[c, i]) begin model[c][i] = '0; wframe[c][i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < CR; i++)
        write(c, i, '{1'b1, 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), 4'($urandom), 4'(i + c)});
    for (int f = 0; f < 12; f++) begin
      compare();
      @(negedge clk); frame_end = 1; @(negedge clk); frame_end = 0;
      frame++;
      if (f == 5) write(1, 2, '{1'b1, 16'd1, 16'd2, 16'd3, 16'd4, 4'd0, 4'd3});
    end
    @(negedge clk); cfg_clear = 1; @(negedge clk); cfg_clear = 0;
    foreach (model[c, i]) model[c][i].valid = 1'b0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
