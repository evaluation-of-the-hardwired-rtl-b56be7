// plc_controller: run sequencing and control registers of the PLC System IP.
//
// Software starts a run by writing 1 to CTRL.start. A run has three phases,
// each handed to another block and ended by that block's done pulse:
//   RECV - the data converter takes the relay image from the input stream
//          and writes it into the relay BRAM;
//   EXEC - the co-processor runs the PLC program on the image in BRAM;
//   SEND - the data converter streams the image back out.
// At the end of SEND the controller sets CTRL.done, pulses done_evt (which
// sets the interrupt status) and returns to idle.
//
// Registers (32-bit, byte offsets from plc_pkg):
//   0x00 CTRL  [0] start: write 1 to request a run; reads 1 from the request
//                         until the run ends
//              [1] done : set at the end of a run, cleared when CTRL is read
//              [2] idle : 1 while no run is in progress
//   0x04 GIE, 0x08 IER, 0x0C ISR: bit 0 each, held in irq_gen (ISR: write 1
//              to clear). Other offsets read as 0.
// Register reads are combinational from reg_raddr; writes act on reg_we.
// The start/finish handshake with software and the order of the phases
// follow the reference design; the register layout is this design's own choice.
module plc_controller
  import plc_pkg::*;
#(
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  // register strobes from the AXI4-Lite slave
  input  logic          reg_we,
  input  logic [AW-1:0] reg_waddr,
  input  logic [31:0]   reg_wdata,
  input  logic [3:0]    reg_wstrb,
  input  logic          reg_re,
  input  logic [AW-1:0] reg_raddr,
  output logic [31:0]   reg_rdata,
  // interrupt register access
  output logic          gie_we,
  output logic          ier_we,
  output logic          isr_w1c,
  output logic          irq_wdata,
  input  logic          gie,
  input  logic          ier,
  input  logic          isr,
  output logic          done_evt,
  // phase control
  output logic          recv_start,
  input  logic          recv_done,
  output logic          exec_start,
  input  logic          exec_done,
  output logic          send_start,
  input  logic          send_done,
  output logic          idle
);

  typedef enum logic [1:0] {P_IDLE, P_RECV, P_EXEC, P_SEND} phase_e;

  phase_e phase;
  logic   start_q, done_q;
  logic   wr_b0;

  assign wr_b0     = reg_we && reg_wstrb[0];
  assign gie_we    = wr_b0 && (reg_waddr == AW'(REG_GIE));
  assign ier_we    = wr_b0 && (reg_waddr == AW'(REG_IER));
  assign isr_w1c   = wr_b0 && (reg_waddr == AW'(REG_ISR));
  assign irq_wdata = reg_wdata[0];
  assign idle      = (phase == P_IDLE);

  always_comb begin
    reg_rdata = '0;
    unique case (reg_raddr)
      AW'(REG_CTRL): reg_rdata[2:0] = {idle, done_q, start_q};
      AW'(REG_GIE):  reg_rdata[0]   = gie;
      AW'(REG_IER):  reg_rdata[0]   = ier;
      AW'(REG_ISR):  reg_rdata[0]   = isr;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= P_IDLE;
      start_q    <= 1'b0;
      done_q     <= 1'b0;
      done_evt   <= 1'b0;
      recv_start <= 1'b0;
      exec_start <= 1'b0;
      send_start <= 1'b0;
    end else begin
      done_evt   <= 1'b0;
      recv_start <= 1'b0;
      exec_start <= 1'b0;
      send_start <= 1'b0;
      if (reg_re && reg_raddr == AW'(REG_CTRL)) done_q <= 1'b0;
      if (wr_b0 && reg_waddr == AW'(REG_CTRL) && reg_wdata[0]) start_q <= 1'b1;
      unique case (phase)
        P_IDLE: if (start_q) begin
          phase      <= P_RECV;
          recv_start <= 1'b1;
        end
        P_RECV: if (recv_done) begin
          phase      <= P_EXEC;
          exec_start <= 1'b1;
        end
        P_EXEC: if (exec_done) begin
          phase      <= P_SEND;
          send_start <= 1'b1;
        end
        P_SEND: if (send_done) begin
          phase    <= P_IDLE;
          start_q  <= 1'b0;
          done_q   <= 1'b1;
          done_evt <= 1'b1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

endmodule
