// tb_plc_system_prog: end-to-end test of the PLC System IP with a longer
// program than the default one.
//
// The IP is built with a 14-instruction program that reads back outputs it
// has just written, contains a NOP and pushes six times onto a 4-entry
// accumulator stack. The testbench plays processor and DMA as in
// tb_plc_system, interprets the program itself on each random relay image,
// and compares the image streamed back. The program phase must take
// 2*(#LD+#ANI)+#OUT+#NOP+1 = 24 cycles, and the stack must be seen full.
module tb_plc_system_prog;
  import plc_pkg::*;
  localparam int unsigned N_RELAY = 32, N_BEATS = 16, RUNS = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0]  s_axi_awaddr = 0, s_axi_araddr = 0;
  logic        s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready = 0;
  logic [15:0] s_axis_tdata = 0, m_axis_tdata;
  logic        s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic        m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic        irq;

  localparam int unsigned LEN = 14, DEPTH = 4;
  localparam instr_t PROG [LEN] = '{
    '{OP_LD,  DEV_X, 8'd3},  '{OP_ANI, DEV_X, 8'd5},  '{OP_OUT, DEV_Y, 8'd0},
    '{OP_LD,  DEV_Y, 8'd0},  '{OP_ANI, DEV_X, 8'd7},  '{OP_OUT, DEV_Y, 8'd3},
    '{OP_LD,  DEV_X, 8'd15}, '{OP_NOP, DEV_X, 8'd0},  '{OP_ANI, DEV_Y, 8'd3},
    '{OP_OUT, DEV_Y, 8'd15}, '{OP_LD,  DEV_X, 8'd0},  '{OP_LD,  DEV_X, 8'd2},
    '{OP_LD,  DEV_X, 8'd4},  '{OP_OUT, DEV_Y, 8'd7}};

  plc_system #(.PROG_LEN(LEN), .PROG(PROG), .STACK_DEPTH(DEPTH)) dut (.*);

  function automatic logic [N_RELAY-1:0] interpret(logic [N_RELAY-1:0] img);
    logic acc = 0;
    int i;
    foreach (PROG[k]) begin
      i = (PROG[k].dev == DEV_Y) ? 16 + int'(PROG[k].num) : int'(PROG[k].num);
      case (PROG[k].op)
        OP_LD:  acc = img[i];
        OP_ANI: acc = acc & ~img[i];
        OP_OUT: img[i] = acc;
        default: ;
      endcase
    end
    return img;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [5:0] addr, input logic [31:0] data);
    bit aw_done = 0, w_done = 0;
    s_axi_awaddr = addr; s_axi_wdata = data; s_axi_awvalid = 1; s_axi_wvalid = 1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (s_axi_awvalid && s_axi_awready) aw_done = 1;
      if (s_axi_wvalid && s_axi_wready) w_done = 1;
      #1;
      if (aw_done) s_axi_awvalid = 0;
      if (w_done)  s_axi_wvalid = 0;
    end
    s_axi_bready = 1;
    do @(posedge clk); while (!s_axi_bvalid);
    #1 s_axi_bready = 0;
  endtask

  task automatic axi_read(input logic [5:0] addr, output logic [31:0] data);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    #1 s_axi_arvalid = 0; s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_rvalid);
    data = s_axi_rdata;
    #1 s_axi_rready = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_in_gap = 0, n_in_bp = 0, n_out_bp = 0, n_irq = 0, n_done_clr = 0;
  int n_push = 0, exec_cycles = 0;
  bit in_recv = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_recv && !s_axis_tvalid) n_in_gap++;
    if (s_axis_tvalid && !s_axis_tready) n_in_bp++;
    if (m_axis_tvalid && !m_axis_tready) n_out_bp++;
    if (dut.u_coproc.busy) exec_cycles++;
    if (dut.u_coproc.done && dut.u_coproc.stack_depth == DEPTH) n_push++;
  end

  // ---------------- DMA: stream source and sink ----------------
  logic [15:0] beats_in [N_BEATS];
  logic [15:0] beats_out [N_BEATS];
  int          n_out;
  bit          tlast_ok;

  task automatic stream_in(input bit gaps);
    in_recv = 1;
    for (int k = 0; k < N_BEATS; k++) begin
      while (gaps && $urandom_range(2) == 0) begin
        s_axis_tvalid = 0; @(posedge clk); #1;
      end
      s_axis_tvalid = 1; s_axis_tdata = beats_in[k]; s_axis_tlast = (k == N_BEATS - 1);
      do @(posedge clk); while (!s_axis_tready);
      #1;
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
    in_recv = 0;
  endtask

  task automatic stream_out(input bit stall);
    n_out = 0; tlast_ok = 1;
    while (n_out < N_BEATS) begin
      m_axis_tready = stall ? 1'($urandom) : 1'b1;
      @(posedge clk);
      if (m_axis_tvalid && m_axis_tready) begin
        beats_out[n_out] = m_axis_tdata;
        if (m_axis_tlast != (n_out == N_BEATS - 1)) tlast_ok = 0;
        n_out++;
      end
      #1;
    end
    m_axis_tready = 0;
  endtask

  initial begin
    logic [31:0] v;
    logic [N_RELAY-1:0] img, exp_img;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    axi_read(REG_CTRL, v);
    check(v[2:0] == 3'b100, "idle after reset");
    axi_write(REG_GIE, 1);
    axi_write(REG_IER, 1);
    for (int run = 0; run < RUNS; run++) begin
      bit early, gaps, stall;
      early = (run % 3 == 1); gaps = (run % 2 == 1); stall = (run % 4 >= 2);
      foreach (beats_in[k]) beats_in[k] = 16'($urandom);
      for (int k = 0; k < N_BEATS; k++) begin
        img[2*k] = beats_in[k][0]; img[2*k+1] = beats_in[k][8];
      end
      exp_img = interpret(img);
      exec_cycles = 0;
      if (early) begin
        // the DMA starts before the processor sets Start
        fork
          stream_in(gaps);
          begin repeat (6) @(posedge clk); #1 axi_write(REG_CTRL, 1); end
          stream_out(stall);
        join
      end else begin
        axi_write(REG_CTRL, 1);
        fork
          stream_in(gaps);
          stream_out(stall);
        join
      end
      check(tlast_ok, "tlast only on the last beat");
      for (int k = 0; k < N_BEATS; k++)
        check(beats_out[k] == {7'd0, exp_img[2*k+1], 7'd0, exp_img[2*k]},
              $sformatf("run %0d beat %0d: %h exp %h", run, k, beats_out[k],
                        {7'd0, exp_img[2*k+1], 7'd0, exp_img[2*k]}));
      check(exec_cycles == 24, $sformatf("program phase %0d cycles", exec_cycles));
      begin
        int w = 0;
        while (!irq && w < 100) begin @(posedge clk); #1; w++; end
      end
      check(irq, "irq raised at the end of the run");
      if (irq) n_irq++;
      axi_read(REG_CTRL, v);
      check(v[1] && v[2], "done and idle");
      axi_read(REG_CTRL, v);
      check(!v[1], "done cleared on read");
      if (!v[1]) n_done_clr++;
      axi_write(REG_ISR, 1);
      repeat (2) @(posedge clk); #1;
      check(!irq, "irq cleared");
    end
    check(n_in_gap > 0,  "mechanism: input gaps");
    check(n_in_bp > 0,   "mechanism: input back-pressure");
    check(n_out_bp > 0,  "mechanism: output back-pressure");
    check(n_irq > 0,     "mechanism: interrupt");
    check(n_done_clr > 0, "mechanism: done cleared on read");
    check(n_push > 0,    "mechanism: accumulator stack full");
    $display("mechanisms: in_gap=%0d in_bp=%0d out_bp=%0d irq=%0d done_clr=%0d stack_full=%0d",
             n_in_gap, n_in_bp, n_out_bp, n_irq, n_done_clr, n_push);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
