// irq_gen: interrupt of the PLC System IP.
//
// Holds three one-bit registers seen by software: GIE (global interrupt
// enable), IER (enable of the "processing finished" interrupt) and ISR (its
// status). ISR is set by a done event and cleared by writing 1 to it; a set
// and a clear in the same cycle leave it set. The level interrupt output is
// irq = GIE & IER & ISR, registered. That the IP has an IRQ output raised at
// the end of processing follows the reference design; the register set is this
// design's own choice.
module irq_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic done_evt,
  input  logic gie_we,
  input  logic ier_we,
  input  logic isr_w1c,
  input  logic wdata,
  output logic gie,
  output logic ier,
  output logic isr,
  output logic irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gie <= 1'b0;
      ier <= 1'b0;
      isr <= 1'b0;
      irq <= 1'b0;
    end else begin
      if (gie_we) gie <= wdata;
      if (ier_we) ier <= wdata;
      if (done_evt)                isr <= 1'b1;
      else if (isr_w1c && wdata)   isr <= 1'b0;
      irq <= gie && ier && isr;
    end
  end

endmodule
