// tb_plc_coproc: self-checking test of the PLC co-processor.
//
// Two instances: one with the default program (LD X1 / ANI X2 / OUT Y1) and
// one with a longer program that reads back its own outputs, contains a NOP
// and pushes more often than its 4-entry stack holds. Each instance is
// attached to a behavioural relay memory with one cycle of read latency.
// For random relay images the test interprets the program itself and
// compares the final image, Acc, the stack and the stack depth, and checks
// that each run takes 2*(#LD+#ANI)+#OUT+#NOP+1 cycles from start to done.
module tb_plc_coproc;
  import plc_pkg::*;

  localparam int unsigned N_X = 16, N_Y = 16, N_RELAY = N_X + N_Y;
  localparam int unsigned LEN_B = 14, DEPTH_B = 4;
  localparam instr_t PROG_A [3] = '{
    '{OP_LD, DEV_X, 8'd1}, '{OP_ANI, DEV_X, 8'd2}, '{OP_OUT, DEV_Y, 8'd1}};
  localparam instr_t PROG_B [LEN_B] = '{
    '{OP_LD,  DEV_X, 8'd3},  '{OP_ANI, DEV_X, 8'd5},  '{OP_OUT, DEV_Y, 8'd0},
    '{OP_LD,  DEV_Y, 8'd0},  '{OP_ANI, DEV_X, 8'd7},  '{OP_OUT, DEV_Y, 8'd3},
    '{OP_LD,  DEV_X, 8'd15}, '{OP_NOP, DEV_X, 8'd0},  '{OP_ANI, DEV_Y, 8'd3},
    '{OP_OUT, DEV_Y, 8'd15}, '{OP_LD,  DEV_X, 8'd0},  '{OP_LD,  DEV_X, 8'd2},
    '{OP_LD,  DEV_X, 8'd4},  '{OP_OUT, DEV_Y, 8'd7}};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- instance A: default program ----------------
  logic       a_start, a_busy, a_done, a_en, a_we, a_wd, a_rd, a_acc;
  logic [4:0] a_idx;
  logic [3:0] a_sd;
  logic [7:0] a_stk;
  logic       mem_a [N_RELAY];

  plc_coproc dut_a (
    .clk, .rst_n, .start(a_start), .busy(a_busy), .done(a_done),
    .mem_en(a_en), .mem_we(a_we), .mem_idx(a_idx), .mem_wdata(a_wd), .mem_rdata(a_rd),
    .acc(a_acc), .stack_depth(a_sd), .acc_stack(a_stk));

  always_ff @(posedge clk) if (a_en) begin
    a_rd <= mem_a[a_idx];
    if (a_we) mem_a[a_idx] <= a_wd;
  end

  // ---------------- instance B: long program ----------------
  logic       b_start, b_busy, b_done, b_en, b_we, b_wd, b_rd, b_acc;
  logic [4:0] b_idx;
  logic [2:0] b_sd;
  logic [DEPTH_B-1:0] b_stk;
  logic       mem_b [N_RELAY];

  plc_coproc #(.N_X(N_X), .N_Y(N_Y), .PROG_LEN(LEN_B), .PROG(PROG_B),
               .STACK_DEPTH(DEPTH_B)) dut_b (
    .clk, .rst_n, .start(b_start), .busy(b_busy), .done(b_done),
    .mem_en(b_en), .mem_we(b_we), .mem_idx(b_idx), .mem_wdata(b_wd), .mem_rdata(b_rd),
    .acc(b_acc), .stack_depth(b_sd), .acc_stack(b_stk));

  always_ff @(posedge clk) if (b_en) begin
    b_rd <= mem_b[b_idx];
    if (b_we) mem_b[b_idx] <= b_wd;
  end

  // ---------------- reference interpreter ----------------
  typedef struct {
    logic [N_RELAY-1:0] img;
    logic acc;
    logic [7:0] stk;
    int   sp;
    int   cycles;
  } ref_t;

  function automatic int idx_of(instr_t i);
    return (i.dev == DEV_Y) ? N_X + int'(i.num) : int'(i.num);
  endfunction

  function automatic ref_t run_ref(logic [N_RELAY-1:0] img, instr_t prog [], int depth);
    ref_t r;
    r.img = img; r.acc = 0; r.stk = 0; r.sp = 0; r.cycles = 1;
    foreach (prog[k]) begin
      case (prog[k].op)
        OP_LD:  begin r.stk = {r.stk[6:0], r.acc}; if (r.sp < depth) r.sp++;
                      r.acc = r.img[idx_of(prog[k])]; r.cycles += 2; end
        OP_ANI: begin r.acc = r.acc & !r.img[idx_of(prog[k])]; r.cycles += 2; end
        OP_OUT: begin r.img[idx_of(prog[k])] = r.acc; r.cycles += 1; end
        default: r.cycles += 1;
      endcase
    end
    return r;
  endfunction

  function automatic logic [N_RELAY-1:0] pack_a();
    for (int i = 0; i < N_RELAY; i++) pack_a[i] = mem_a[i];
  endfunction
  function automatic logic [N_RELAY-1:0] pack_b();
    for (int i = 0; i < N_RELAY; i++) pack_b[i] = mem_b[i];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_RELAY-1:0] img;
    instr_t pa [], pb [];
    ref_t ra, rb;
    int ca, cb;
    bit seen_a, seen_b;
    pa = new[3];     foreach (pa[k]) pa[k] = PROG_A[k];
    pb = new[LEN_B]; foreach (pb[k]) pb[k] = PROG_B[k];
    a_start = 0; b_start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N_RELAY; i++) img[i] = 1'($urandom);
      if (t < 4) begin  // cover the whole truth table of Y1 = X1 & ~X2
        img[1] = t[0]; img[2] = t[1];
      end
      for (int i = 0; i < N_RELAY; i++) begin mem_a[i] = img[i]; mem_b[i] = img[i]; end
      ra = run_ref(img, pa, 8);
      rb = run_ref(img, pb, DEPTH_B);
      @(posedge clk); #1;
      check(!a_busy && !b_busy, "idle before start");
      a_start = 1; b_start = 1;
      @(posedge clk); #1;
      a_start = 0; b_start = 0;
      ca = 1; cb = 1; seen_a = 0; seen_b = 0;
      while (!(seen_a && seen_b)) begin
        if (a_done) seen_a = 1; else if (!seen_a) ca++;
        if (b_done) seen_b = 1; else if (!seen_b) cb++;
        @(posedge clk); #1;
      end
      check(ca == ra.cycles, $sformatf("A cycles %0d exp %0d", ca, ra.cycles));
      check(cb == rb.cycles, $sformatf("B cycles %0d exp %0d", cb, rb.cycles));
      check(pack_a() == ra.img, "A image");
      check(pack_b() == rb.img, "B image");
      check(mem_a[N_X+1] == (img[1] & ~img[2]), "A Y1 = X1 & ~X2");
      check(a_acc == ra.acc && b_acc == rb.acc, "acc");
      check(int'(a_sd) == ra.sp && int'(b_sd) == rb.sp, "stack depth");
      check(a_stk == ra.stk && b_stk == rb.stk[DEPTH_B-1:0], "stack contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
