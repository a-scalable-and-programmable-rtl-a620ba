// rp_fifo: small synchronous FIFO that can take two entries in one cycle.
//
// The encoder writes each of its three output streams through one of these.
// The pixel stream needs the second write port: at the end of a row the
// compacted pixels may fill one whole beat plus a partial one, and both must
// leave in the same cycle for the input to keep accepting a beat every clock.
// The read side is an AXI4-Stream style valid/ready pair; the head entry is
// presented straight from the storage array (first-word fall-through).
//
// Interface: push0/din0 and push1/din1 write zero, one or two entries, din0
// first; push1 without push0 writes din1 alone. The writer must check `count`
// before pushing: a push beyond DEPTH is dropped and flagged by an assertion.
// Timing: an entry written in cycle t is visible at m_data in cycle t+1.
// The depth is this implementation's choice; the design only asks that the
// streams be buffered towards the DMA engines.
module rp_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push0,
  input  logic [WIDTH-1:0]           din0,
  input  logic                       push1,
  input  logic [WIDTH-1:0]           din1,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic [WIDTH-1:0]           m_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             pop;
  logic [1:0]       npush;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p, input int unsigned n);
    return AW'((int'(p) + n) % DEPTH);
  endfunction

  assign m_valid = (count != '0);
  assign m_data  = mem[rd_ptr];
  assign pop     = m_valid && m_ready;
  assign npush   = 2'(push0) + 2'(push1);

  always_ff @(posedge clk) begin
    if (push0) mem[wr_ptr] <= din0;
    if (push1) mem[push0 ? inc(wr_ptr, 1) : wr_ptr] <= din1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= inc(wr_ptr, int'(npush));
      if (pop) rd_ptr <= inc(rd_ptr, 1);
      count <= CW'(int'(count) + int'(npush) - int'(pop));
    end
  end

  // A writer that ignores `count` would overwrite unread entries.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) + int'(npush) - int'(pop) <= int'(DEPTH));

endmodule
