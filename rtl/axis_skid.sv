// axis_skid: AXI4-Stream register slice (two-entry skid buffer).
//
// Used for the AXI4-Stream input and output ports of the PLC System IP. It
// cuts every combinational path between its two sides: m_valid/m_data come
// from a register and s_ready comes from a register, so the block can sit
// right at the IP boundary. With m_ready held high it passes one beat per
// cycle with one cycle of latency; when the downstream side stalls, the one
// beat already in flight is caught in the skid register. The payload (data
// and tlast together) is W bits wide. The reference design names the stream ports
// only; their buffering is this design's own choice.
module axis_skid #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  // upstream
  input  logic [W-1:0] s_data,
  input  logic         s_valid,
  output logic         s_ready,
  // downstream
  output logic [W-1:0] m_data,
  output logic         m_valid,
  input  logic         m_ready
);

  logic [W-1:0] data_q, skid_q;
  logic         valid_q, skid_valid_q;

  assign s_ready = !skid_valid_q;
  assign m_valid = valid_q;
  assign m_data  = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= 1'b0;
      skid_valid_q <= 1'b0;
      data_q       <= '0;
      skid_q       <= '0;
    end else if (m_ready || !valid_q) begin
      // output register free this cycle: refill from skid first
      if (skid_valid_q) begin
        data_q       <= skid_q;
        valid_q      <= 1'b1;
        skid_valid_q <= 1'b0;
      end else begin
        valid_q <= s_valid;
        if (s_valid) data_q <= s_data;
      end
    end else if (s_valid && s_ready) begin
      // output stalled: park the incoming beat
      skid_q       <= s_data;
      skid_valid_q <= 1'b1;
    end
  end

  // A beat offered downstream must stay until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_valid && !m_ready) |=> (m_valid && $stable(m_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule
