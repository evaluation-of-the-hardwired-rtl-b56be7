// plc_system: PLC System IP, a hardwired PLC program as an AXI peripheral.
//
// A PLC program (an instruction list for a stack-machine PLC) is turned
// into a fixed circuit, the co-processor, and wrapped so that a processor
// can use it like a function call: software sets Start over AXI4-Lite, a
// DMA engine streams the relay image (input relays X and output relays Y,
// one 8-bit char per relay, two chars per 16-bit beat) into the IP, the
// co-processor evaluates the program on the image, and the updated image is
// streamed back. The end of a run sets a done flag and can raise IRQ.
//
// Inside: axil_slave and plc_controller (registers and run sequencing),
// irq_gen, two axis_skid register slices at the stream ports,
// data_converter (chars <-> relay bits), relay_mem (the relay image in
// dual-port BRAM banks; port A serves the stream side, port B the
// co-processor) and plc_coproc.
//
// Timing of one run with N relays (N/2 beats) and the default program:
// receive takes one cycle per beat, the program 2*(#LD+#ANI)+#OUT+1
// cycles, send two cycles per beat; each phase hand-off costs one cycle.
// Block structure, stream width and the flow of a run follow the reference design;
// the register map, relay image layout and timing are this design's own.
module plc_system
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
  parameter int unsigned AXIL_AW     = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite control slave
  input  logic [AXIL_AW-1:0] s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [AXIL_AW-1:0] s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // AXI4-Stream in (relay image from the DMA)
  input  logic [AXIS_W-1:0]  s_axis_tdata,
  input  logic               s_axis_tvalid,
  output logic               s_axis_tready,
  input  logic               s_axis_tlast,
  // AXI4-Stream out (relay image back to the DMA)
  output logic [AXIS_W-1:0]  m_axis_tdata,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic               m_axis_tlast,
  // interrupt
  output logic               irq
);

  localparam int unsigned N_RELAY = N_X + N_Y;
  localparam int unsigned BANKS   = CHARS_PER_BEAT;
  localparam int unsigned N_BEATS = (N_RELAY + BANKS - 1) / BANKS;
  localparam int unsigned WAW     = (N_BEATS > 1) ? $clog2(N_BEATS) : 1;
  localparam int unsigned RIW     = (N_RELAY > 1) ? $clog2(N_RELAY) : 1;

  // register strobes
  logic               reg_we, reg_re;
  logic [AXIL_AW-1:0] reg_waddr, reg_raddr;
  logic [31:0]        reg_wdata, reg_rdata;
  logic [3:0]         reg_wstrb;

  // interrupt registers
  logic gie_we, ier_we, isr_w1c, irq_wdata, gie, ier, isr, done_evt;

  // phase control
  logic recv_start, recv_done, exec_start, exec_done, send_start, send_done;
  logic ctrl_idle, exec_busy;

  // streams between the port slices and the converter
  logic [AXIS_W-1:0] in_tdata, out_tdata;
  logic              in_tvalid, in_tready, in_tlast;
  logic              out_tvalid, out_tready, out_tlast;

  // relay image ports
  logic             a_en, a_we;
  logic [WAW-1:0]   a_addr;
  logic [BANKS-1:0] a_wdata, a_rdata;
  logic             b_en, b_we, b_wdata, b_rdata;
  logic [RIW-1:0]   b_idx;


  axil_slave #(.AW(AXIL_AW), .DW(32)) u_axil (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .reg_we, .reg_waddr, .reg_wdata, .reg_wstrb,
    .reg_re, .reg_raddr, .reg_rdata
  );

  plc_controller #(.AW(AXIL_AW)) u_ctrl (
    .clk, .rst_n,
    .reg_we, .reg_waddr, .reg_wdata, .reg_wstrb,
    .reg_re, .reg_raddr, .reg_rdata,
    .gie_we, .ier_we, .isr_w1c, .irq_wdata, .gie, .ier, .isr, .done_evt,
    .recv_start, .recv_done, .exec_start, .exec_done, .send_start, .send_done,
    .idle (ctrl_idle)
  );

  irq_gen u_irq (
    .clk, .rst_n, .done_evt,
    .gie_we, .ier_we, .isr_w1c, .wdata (irq_wdata),
    .gie, .ier, .isr, .irq
  );

  axis_skid #(.W(AXIS_W + 1)) u_axis_in (
    .clk, .rst_n,
    .s_data  ({s_axis_tlast, s_axis_tdata}),
    .s_valid (s_axis_tvalid),
    .s_ready (s_axis_tready),
    .m_data  ({in_tlast, in_tdata}),
    .m_valid (in_tvalid),
    .m_ready (in_tready)
  );

  data_converter #(.N_RELAY(N_RELAY)) u_conv (
    .clk, .rst_n,
    .recv_start, .recv_done, .send_start, .send_done,
    .s_tdata  (in_tdata),
    .s_tvalid (in_tvalid),
    .s_tready (in_tready),
    .m_tdata  (out_tdata),
    .m_tvalid (out_tvalid),
    .m_tlast  (out_tlast),
    .m_tready (out_tready),
    .mem_en    (a_en),
    .mem_we    (a_we),
    .mem_addr  (a_addr),
    .mem_wdata (a_wdata),
    .mem_rdata (a_rdata)
  );

  axis_skid #(.W(AXIS_W + 1)) u_axis_out (
    .clk, .rst_n,
    .s_data  ({out_tlast, out_tdata}),
    .s_valid (out_tvalid),
    .s_ready (out_tready),
    .m_data  ({m_axis_tlast, m_axis_tdata}),
    .m_valid (m_axis_tvalid),
    .m_ready (m_axis_tready)
  );

  relay_mem #(.N_RELAY(N_RELAY), .BANKS(BANKS)) u_mem (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_idx, .b_wdata, .b_rdata
  );

  plc_coproc #(
    .N_X(N_X), .N_Y(N_Y), .PROG_LEN(PROG_LEN), .PROG(PROG),
    .STACK_DEPTH(STACK_DEPTH)
  ) u_coproc (
    .clk, .rst_n,
    .start (exec_start),
    .busy  (exec_busy),
    .done  (exec_done),
    .mem_en    (b_en),
    .mem_we    (b_we),
    .mem_idx   (b_idx),
    .mem_wdata (b_wdata),
    .mem_rdata (b_rdata),
    .acc (), .stack_depth (), .acc_stack ()
  );

  // The relay image is owned by one side at a time: the co-processor only
  // touches it while the stream side is idle.
  a_port_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                !(a_en && b_en));
  // The co-processor runs only inside a run of the controller.
  a_exec_in_run: assert property (@(posedge clk) disable iff (!rst_n)
                                  exec_busy |-> !ctrl_idle);
  // Each run receives exactly one image; tlast, when driven, marks its end.
  logic in_tlast_seen;
  assign in_tlast_seen = in_tvalid && in_tready && in_tlast;
  a_tlast_end: assert property (@(posedge clk) disable iff (!rst_n)
                                in_tlast_seen |=> recv_done);

endmodule
