// data_converter: relay image <-> 16-bit AXI4-Stream beats.
//
// On the stream, every relay is an 8-bit char, two chars to a 16-bit beat;
// in the relay image a relay is a single bit. On receive, each beat accepted
// from the input stream is unpacked: bit 0 of char c (beat bits [8c]) becomes
// the relay of that char, and all relays of a beat are written to the relay
// image in one cycle (port A of relay_mem, word = beat number). On send, the
// relays of one word are read and packed back into chars of value 0 or 1,
// and the beat is offered on the output stream, with tlast on the last beat.
//
// Interface: recv_start starts the receive of N_BEATS beats; recv_done
// pulses when the last one is written. send_start starts the send of
// N_BEATS beats; send_done pulses when the last one has been taken.
// Timing: receive takes one beat per cycle; send needs two cycles per beat
// (BRAM read, then present), plus any output back-pressure. That two chars
// are packed per 16-bit beat and that only one bit of each char is kept
// follows the reference design; which bit is kept, the char order in the beat (char
// 0 in the low byte) and the timing are this design's own choices.
module data_converter
  import plc_pkg::*;
#(
  parameter int unsigned N_RELAY = N_X_DEFAULT + N_Y_DEFAULT,
  localparam int unsigned BANKS   = CHARS_PER_BEAT,
  localparam int unsigned N_BEATS = (N_RELAY + BANKS - 1) / BANKS,
  localparam int unsigned WAW     = (N_BEATS > 1) ? $clog2(N_BEATS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              recv_start,
  output logic              recv_done,
  input  logic              send_start,
  output logic              send_done,
  // input stream
  input  logic [AXIS_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  // output stream
  output logic [AXIS_W-1:0] m_tdata,
  output logic              m_tvalid,
  output logic              m_tlast,
  input  logic              m_tready,
  // relay image, word port
  output logic              mem_en,
  output logic              mem_we,
  output logic [WAW-1:0]    mem_addr,
  output logic [BANKS-1:0]  mem_wdata,
  input  logic [BANKS-1:0]  mem_rdata
);

  typedef enum logic [2:0] {C_IDLE, C_RECV, C_RD, C_CAP, C_OUT} cstate_e;

  cstate_e        state;
  logic [WAW-1:0] beat;
  logic           last_beat;

  assign last_beat = (int'(beat) == N_BEATS - 1);

  always_comb begin
    s_tready  = (state == C_RECV);
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = beat;
    for (int c = 0; c < BANKS; c++) mem_wdata[c] = s_tdata[c*CHAR_W];
    unique case (state)
      C_RECV: begin
        mem_en = s_tvalid;
        mem_we = s_tvalid;
      end
      C_RD: mem_en = 1'b1;
      C_OUT: begin
        // fetch the next word as the current beat leaves
        if (m_tready && !last_beat) begin
          mem_en   = 1'b1;
          mem_addr = beat + 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      beat      <= '0;
      m_tdata   <= '0;
      m_tvalid  <= 1'b0;
      m_tlast   <= 1'b0;
      recv_done <= 1'b0;
      send_done <= 1'b0;
    end else begin
      recv_done <= 1'b0;
      send_done <= 1'b0;
      unique case (state)
        C_IDLE: begin
          beat <= '0;
          if (recv_start)      state <= C_RECV;
          else if (send_start) state <= C_RD;
        end
        C_RECV: if (s_tvalid) begin
          if (last_beat) begin
            state     <= C_IDLE;
            recv_done <= 1'b1;
          end
          beat <= beat + 1'b1;
        end
        C_RD: state <= C_CAP;
        C_CAP: begin
          for (int c = 0; c < BANKS; c++)
            m_tdata[c*CHAR_W +: CHAR_W] <= CHAR_W'(mem_rdata[c]);
          m_tvalid <= 1'b1;
          m_tlast  <= last_beat;
          state    <= C_OUT;
        end
        C_OUT: if (m_tready) begin
          m_tvalid <= 1'b0;
          m_tlast  <= 1'b0;
          if (last_beat) begin
            state     <= C_IDLE;
            send_done <= 1'b1;
          end else begin
            beat  <= beat + 1'b1;
            state <= C_CAP;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
