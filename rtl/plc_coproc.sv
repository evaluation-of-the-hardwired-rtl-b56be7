// plc_coproc: PLC Co-processor, the hardwired form of a PLC instruction list.
//
// The PLC program is fixed at elaboration time by the PROG parameter; there
// is no instruction memory, so synthesis folds the program into the
// sequencer's logic. The circuit follows the instruction list one step at a
// time (a sequential design): a program counter walks PROG, and each step
// does what the stack-machine instruction does:
//   LD  : push Acc onto the accumulator stack, then Acc = relay
//   ANI : Acc = Acc & ~relay
//   OUT : relay = Acc
// Relays are read from and written to the relay image in BRAM through one
// memory port, so all operand accesses are serialized. The default program
// is "LD X1 / ANI X2 / OUT Y1", i.e. Y1 = X1 & ~X2.
//
// Interface: pulse start for one cycle while idle (busy=0). done pulses for
// one cycle when the program has finished; every write to the relay image
// has then completed. Acc and the stack are cleared at start.
//
// Timing: a read instruction (LD, ANI) takes two cycles, one to present the
// address and one to take the data; OUT and NOP take one. done follows the
// last instruction by one cycle, so a run lasts
//   2*(#LD + #ANI) + (#OUT + #NOP) + 1 cycles from the start pulse to done.
// The instruction semantics follow the reference design; the cycle timing, the
// stack depth, the saturating push on a full stack and the clearing of Acc
// at start are this design's own choices.
module plc_coproc
  import plc_pkg::*;
#(
  parameter int unsigned N_X         = N_X_DEFAULT,
  parameter int unsigned N_Y         = N_Y_DEFAULT,
  parameter int unsigned PROG_LEN    = 3,
  parameter instr_t      PROG [PROG_LEN] = '{
    '{op: OP_LD,  dev: DEV_X, num: 8'd1},
    '{op: OP_ANI, dev: DEV_X, num: 8'd2},
    '{op: OP_OUT, dev: DEV_Y, num: 8'd1}
  },
  parameter int unsigned STACK_DEPTH = 8,
  localparam int unsigned N_RELAY = N_X + N_Y,
  localparam int unsigned RIW     = (N_RELAY > 1) ? $clog2(N_RELAY) : 1,
  localparam int unsigned PCW     = (PROG_LEN > 1) ? $clog2(PROG_LEN) : 1,
  localparam int unsigned SPW     = $clog2(STACK_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // relay image port
  output logic           mem_en,
  output logic           mem_we,
  output logic [RIW-1:0] mem_idx,
  output logic           mem_wdata,
  input  logic           mem_rdata,
  // observation of the stack machine state (acc_stack[0] is the top)
  output logic           acc,
  output logic [SPW-1:0] stack_depth,
  output logic [STACK_DEPTH-1:0] acc_stack
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_EXEC, S_DONE} state_e;

  state_e         state;
  logic [PCW-1:0] pc;
  instr_t         cur;
  logic           acc_q;
  logic [STACK_DEPTH-1:0] stack_q;
  logic [SPW-1:0] sp_q;
  logic           last_instr;

  // Each operand must name an existing relay.
  for (genvar g = 0; g < PROG_LEN; g++) begin : g_chk
    if ((PROG[g].op != OP_NOP) &&
        (int'(PROG[g].num) >= ((PROG[g].dev == DEV_Y) ? N_Y : N_X))) begin : g_bad
      $error("plc_coproc: instruction %0d names a relay outside the image", g);
    end
  end

  assign cur        = PROG[pc];
  assign last_instr = (int'(pc) == PROG_LEN - 1);

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_idx   = RIW'(relay_index(cur.dev, cur.num, N_X));
    mem_wdata = acc_q;
    if (state == S_ISSUE) begin
      unique case (cur.op)
        OP_LD, OP_ANI: mem_en = 1'b1;
        OP_OUT: begin
          mem_en = 1'b1;
          mem_we = 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pc      <= '0;
      acc_q   <= 1'b0;
      stack_q <= '0;
      sp_q    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_ISSUE;
          pc      <= '0;
          acc_q   <= 1'b0;
          stack_q <= '0;
          sp_q    <= '0;
        end
        S_ISSUE: begin
          if (cur.op == OP_LD || cur.op == OP_ANI) begin
            state <= S_EXEC;
          end else if (last_instr) begin
            state <= S_DONE;
          end else begin
            pc <= pc + 1'b1;
          end
        end
        S_EXEC: begin
          if (cur.op == OP_LD) begin
            stack_q <= {stack_q[STACK_DEPTH-2:0], acc_q};
            if (int'(sp_q) < STACK_DEPTH) sp_q <= sp_q + 1'b1;
            acc_q <= mem_rdata;
          end else begin
            acc_q <= acc_q & ~mem_rdata;
          end
          if (last_instr) begin
            state <= S_DONE;
          end else begin
            state <= S_ISSUE;
            pc    <= pc + 1'b1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy        = (state != S_IDLE);
  assign done        = (state == S_DONE);
  assign acc         = acc_q;
  assign stack_depth = sp_q;
  assign acc_stack   = stack_q;

endmodule
