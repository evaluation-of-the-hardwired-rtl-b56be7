// tb_axis_skid: self-checking test of the AXI4-Stream register slice.
//
// Random data words are pushed in with random valid gaps and drained with
// random ready gaps. The test checks order and content against a queue,
// that nothing is lost or duplicated, that full throughput (one beat per
// cycle) is reached with both sides always ready, and that the latency is
// one cycle.
module tb_axis_skid;
  localparam int unsigned W = 17, N = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] s_data = 0, m_data;
  logic         s_valid = 0, s_ready, m_valid, m_ready = 0;

  axis_skid #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q [$];
  int sent = 0, got = 0, mode = 0, cyc = 0, first_out = -1;

  // producer
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin q.push_back(s_data); sent++; end
  end
  // consumer
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (m_valid && m_ready) begin
      if (first_out < 0) first_out = cyc;
      check(q.size() > 0 && m_data == q[0], $sformatf("beat %0d content", got));
      if (q.size() > 0) void'(q.pop_front());
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phase 1: both sides always ready
    cyc = 0;
    while (sent < 100) begin
      s_valid = 1; m_ready = 1; s_data = W'($urandom);
      @(posedge clk); #1;
    end
    s_valid = 0;
    repeat (3) @(posedge clk); #1;
    check(got == 100, "all beats through");
    check(first_out == 2, $sformatf("latency, first beat at cycle %0d", first_out));
    check(cyc == 100 + 3, $sformatf("throughput, %0d cycles", cyc));
    // phase 2: random gaps on both sides
    while (sent < N) begin
      if (!s_valid || s_ready) begin
        s_valid = 1'($urandom);
        s_data  = W'($urandom);
      end
      m_ready = ($urandom_range(3) != 0) ? 1'b1 : 1'b0;
      if (sent > N/2) m_ready = 1'($urandom);
      @(posedge clk); #1;
    end
    s_valid = 0; m_ready = 1;
    repeat (5) @(posedge clk); #1;
    check(got == N && q.size() == 0, $sformatf("no loss: sent %0d got %0d", sent, got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
