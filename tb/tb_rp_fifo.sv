// tb_rp_fifo: random single and double writes against random read stalls,
// checked against a queue. Writes respect `count`, as the encoder does.
module tb_rp_fifo;
  localparam int W = 12, D = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push0 = 0, push1 = 0, m_valid, m_ready = 0;
  logic [W-1:0] din0 = '0, din1 = '0, m_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_dual = 0, n_full = 0;
  logic [W-1:0] q [$];

  rp_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(int'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      check(m_valid == (q.size() != 0), "valid");
      if (m_valid) check(m_data == q[0], $sformatf("data %h vs %h", m_data, q[0]));
      if (int'(count) == D) n_full++;
      m_ready = ($urandom % 3 != 0);
      push0 = 0; push1 = 0;
      din0 = W'($urandom); din1 = W'($urandom);
      if (int'(count) <= D - 2 && $urandom % 2 == 1) begin push0 = 1; push1 = 1; end
      else if (int'(count) <= D - 1) begin push0 = ($urandom % 2 == 1); push1 = !push0 && ($urandom % 3 == 0); end
      @(posedge clk);
      if (m_valid && m_ready) void'(q.pop_front());
      if (push0) q.push_back(din0);
      if (push1) q.push_back(din1);
      if (push0 && push1) n_dual++;
    end
    check(n_dual > 0 && n_full > 0, "double writes and a full FIFO both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
