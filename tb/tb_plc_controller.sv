// tb_plc_controller: self-checking test of run sequencing and registers.
//
// The testbench plays the three phase blocks: it answers recv_start,
// exec_start and send_start with a done pulse after a random delay, and
// logs the order of the phases. Through the register strobes it starts runs
// and polls CTRL. Checked: the phases come in the order receive, execute,
// send, each once per run; CTRL.start reads 1 during a run, CTRL.idle 0;
// CTRL.done is set at the end of a run and cleared by reading CTRL; done_evt
// pulses once per run; writes to GIE/IER/ISR produce the right strobes and
// reads return the interrupt register inputs.
module tb_plc_controller;
  import plc_pkg::*;
  localparam int unsigned AW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          reg_we = 0, reg_re = 0;
  logic [AW-1:0] reg_waddr = 0, reg_raddr = 0;
  logic [31:0]   reg_wdata = 0, reg_rdata;
  logic [3:0]    reg_wstrb = 0;
  logic          gie_we, ier_we, isr_w1c, irq_wdata, done_evt;
  logic          gie = 0, ier = 0, isr = 0;
  logic          recv_start, recv_done = 0, exec_start, exec_done = 0;
  logic          send_start, send_done = 0, idle;

  plc_controller #(.AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase responders and phase log
  string log_s = "";
  int    done_evts = 0;
  always @(posedge clk) begin
    if (rst_n && done_evt) done_evts++;
    if (recv_start) begin log_s = {log_s, "R"}; fork begin
      repeat ($urandom_range(1, 6)) @(posedge clk); #1 recv_done = 1; @(posedge clk); #1 recv_done = 0;
    end join_none end
    if (exec_start) begin log_s = {log_s, "E"}; fork begin
      repeat ($urandom_range(1, 6)) @(posedge clk); #1 exec_done = 1; @(posedge clk); #1 exec_done = 0;
    end join_none end
    if (send_start) begin log_s = {log_s, "S"}; fork begin
      repeat ($urandom_range(1, 6)) @(posedge clk); #1 send_done = 1; @(posedge clk); #1 send_done = 0;
    end join_none end
  end

  task automatic wr(input logic [AW-1:0] a, input logic [31:0] d);
    reg_we = 1; reg_waddr = a; reg_wdata = d; reg_wstrb = 4'hF;
    @(posedge clk); #1 reg_we = 0;
  endtask

  // combinational read, then the read strobe for one cycle
  task automatic rd(input logic [AW-1:0] a, output logic [31:0] d);
    reg_raddr = a; reg_re = 1; #1 d = reg_rdata;
    @(posedge clk); #1 reg_re = 0;
  endtask

  initial begin
    logic [31:0] v;
    int polls;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    rd(AW'(REG_CTRL), v);
    check(v[2:0] == 3'b100, "reset: idle, not done, not started");
    for (int run = 0; run < 50; run++) begin
      log_s = "";
      wr(AW'(REG_CTRL), 32'h1);
      @(posedge clk); #1;
      rd(AW'(REG_CTRL), v);
      check(v[0] && !v[2], "start reads 1 and idle 0 during a run");
      polls = 0;
      do begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 rd(AW'(REG_CTRL), v);
        polls++;
      end while (!v[1] && polls < 1000);
      check(v[1] && v[2] && !v[0], "done, idle, start cleared at the end");
      rd(AW'(REG_CTRL), v);
      check(!v[1], "done cleared by reading CTRL");
      check(log_s == "RES", $sformatf("phase order %s", log_s));
      check(done_evts == run + 1, "one done_evt per run");
    end
    // interrupt register decode
    for (int t = 0; t < 30; t++) begin
      logic [1:0] sel;
      sel = 2'($urandom_range(1, 3));
      reg_we = 1; reg_waddr = AW'(sel * 4); reg_wdata = 32'($urandom); reg_wstrb = 4'h1;
      #1;
      check(gie_we == (sel == 1) && ier_we == (sel == 2) && isr_w1c == (sel == 3),
            "interrupt register strobes");
      check(irq_wdata == reg_wdata[0], "interrupt write data");
      @(posedge clk); #1 reg_we = 0;
      #1 check(!gie_we && !ier_we && !isr_w1c, "strobes only with reg_we");
      gie = 1'($urandom); ier = 1'($urandom); isr = 1'($urandom);
      rd(AW'(REG_GIE), v); check(v == {31'd0, gie}, "read GIE");
      rd(AW'(REG_IER), v); check(v == {31'd0, ier}, "read IER");
      rd(AW'(REG_ISR), v); check(v == {31'd0, isr}, "read ISR");
    end
    rd(AW'(6'h10), v);
    check(v == 0, "unmapped reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
