// axil_slave: AXI4-Lite slave front end of the PLC System IP.
//
// Turns AXI4-Lite transactions into simple register strobes. A write is
// accepted when both its address (AW) and its data (W) have been taken, in
// either order; reg_we then pulses for one cycle with the address, data and
// byte strobes, and the response (B, OKAY) is raised on the next cycle. A
// read pulses reg_re in the cycle AR is taken, samples reg_rdata in that same
// cycle and returns it on R one cycle later. One transaction of each kind is
// in flight at a time. Data is 32 bits wide as on the general-purpose port
// the IP is attached to; the address width is this design's own choice.
module axil_slave #(
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0]   s_axi_awaddr,
  input  logic            s_axi_awvalid,
  output logic            s_axi_awready,
  input  logic [DW-1:0]   s_axi_wdata,
  input  logic [DW/8-1:0] s_axi_wstrb,
  input  logic            s_axi_wvalid,
  output logic            s_axi_wready,
  output logic [1:0]      s_axi_bresp,
  output logic            s_axi_bvalid,
  input  logic            s_axi_bready,
  input  logic [AW-1:0]   s_axi_araddr,
  input  logic            s_axi_arvalid,
  output logic            s_axi_arready,
  output logic [DW-1:0]   s_axi_rdata,
  output logic [1:0]      s_axi_rresp,
  output logic            s_axi_rvalid,
  input  logic            s_axi_rready,
  // register side
  output logic            reg_we,
  output logic [AW-1:0]   reg_waddr,
  output logic [DW-1:0]   reg_wdata,
  output logic [DW/8-1:0] reg_wstrb,
  output logic            reg_re,
  output logic [AW-1:0]   reg_raddr,
  input  logic [DW-1:0]   reg_rdata
);

  logic            aw_held, w_held;
  logic [AW-1:0]   awaddr_q;
  logic [DW-1:0]   wdata_q;
  logic [DW/8-1:0] wstrb_q;
  logic [DW-1:0]   rdata_q;

  assign s_axi_awready = !aw_held && !s_axi_bvalid;
  assign s_axi_wready  = !w_held  && !s_axi_bvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_rdata   = rdata_q;

  assign reg_we    = aw_held && w_held;
  assign reg_waddr = awaddr_q;
  assign reg_wdata = wdata_q;
  assign reg_wstrb = wstrb_q;
  assign reg_re    = s_axi_arvalid && s_axi_arready;
  assign reg_raddr = s_axi_araddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held      <= 1'b0;
      w_held       <= 1'b0;
      awaddr_q     <= '0;
      wdata_q      <= '0;
      wstrb_q      <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      rdata_q      <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin
        aw_held  <= 1'b1;
        awaddr_q <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_held  <= 1'b1;
        wdata_q <= s_axi_wdata;
        wstrb_q <= s_axi_wstrb;
      end
      if (reg_we) begin
        aw_held      <= 1'b0;
        w_held       <= 1'b0;
        s_axi_bvalid <= 1'b1;
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      if (reg_re) begin
        rdata_q      <= reg_rdata;
        s_axi_rvalid <= 1'b1;
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a raised response stays until it is taken.
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axi_rvalid && !s_axi_rready) |=> (s_axi_rvalid && $stable(s_axi_rdata)));

endmodule
