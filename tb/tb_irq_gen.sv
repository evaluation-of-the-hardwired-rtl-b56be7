// tb_irq_gen: self-checking test of the interrupt registers.
//
// Drives random sequences of done events and register writes and compares
// GIE, IER, ISR and the registered irq output with a reference model each
// cycle; also checks the set-wins rule when a done event and a clear meet.
module tb_irq_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic done_evt = 0, gie_we = 0, ier_we = 0, isr_w1c = 0, wdata = 0;
  logic gie, ier, isr, irq;
  logic m_gie = 0, m_ier = 0, m_isr = 0, m_irq = 0;
  int   irq_seen = 0, collide = 0;

  irq_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!gie && !ier && !isr && !irq, "reset values");
    for (int t = 0; t < 3000; t++) begin
      done_evt = ($urandom_range(7) == 0);
      gie_we   = ($urandom_range(15) == 0);
      ier_we   = ($urandom_range(15) == 0);
      isr_w1c  = ($urandom_range(5) == 0);
      wdata    = 1'($urandom);
      if (done_evt && isr_w1c && wdata) collide++;
      // model, evaluated on the values before the edge
      m_irq = m_gie && m_ier && m_isr;
      if (gie_we) m_gie = wdata;
      if (ier_we) m_ier = wdata;
      if (done_evt) m_isr = 1;
      else if (isr_w1c && wdata) m_isr = 0;
      @(posedge clk); #1;
      check(gie == m_gie && ier == m_ier && isr == m_isr, "registers");
      check(irq == m_irq, "irq");
      if (irq) irq_seen++;
    end
    check(irq_seen > 0, "irq raised at least once");
    check(collide > 0, "set/clear collision exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
