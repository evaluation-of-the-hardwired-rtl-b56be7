// tb_axil_slave: self-checking test of the AXI4-Lite slave front end.
//
// A small register file in the testbench sits behind the register strobes.
// Writes are issued with AW before W, W before AW and both together, with
// random delays on BREADY and RREADY. The test checks that every write
// produces exactly one reg_we with the right address, data and strobes,
// that reads return the register file content one cycle after AR is taken,
// and that responses are OKAY. Assertions in the slave check that B and R
// stay valid until taken.
module tb_axil_slave;
  localparam int unsigned AW = 6, DW = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW-1:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic          s_axi_awvalid = 0, s_axi_awready;
  logic [DW-1:0] s_axi_wdata = 0;
  logic [3:0]    s_axi_wstrb = 0;
  logic          s_axi_wvalid = 0, s_axi_wready;
  logic [1:0]    s_axi_bresp, s_axi_rresp;
  logic          s_axi_bvalid, s_axi_bready = 0;
  logic          s_axi_arvalid = 0, s_axi_arready;
  logic [DW-1:0] s_axi_rdata;
  logic          s_axi_rvalid, s_axi_rready = 0;
  logic          reg_we, reg_re;
  logic [AW-1:0] reg_waddr, reg_raddr;
  logic [DW-1:0] reg_wdata, reg_rdata;
  logic [3:0]    reg_wstrb;

  logic [DW-1:0] regs [16];
  int            we_count = 0;

  axil_slave #(.AW(AW), .DW(DW)) dut (.*);

  assign reg_rdata = regs[reg_raddr[5:2]];
  always_ff @(posedge clk) if (reg_we) begin
    for (int b = 0; b < 4; b++) if (reg_wstrb[b]) regs[reg_waddr[5:2]][8*b +: 8] <= reg_wdata[8*b +: 8];
    we_count <= we_count + 1;
  end

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

  task automatic axi_write(input logic [AW-1:0] addr, input logic [31:0] data,
                           input logic [3:0] strb, input int order);
    bit aw_done, w_done;
    int n0;
    n0 = we_count;
    aw_done = 0; w_done = 0;
    s_axi_awaddr = addr; s_axi_wdata = data; s_axi_wstrb = strb;
    s_axi_awvalid = (order != 1); s_axi_wvalid = (order != 0);
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (s_axi_awvalid && s_axi_awready) aw_done = 1;
      if (s_axi_wvalid && s_axi_wready) w_done = 1;
      #1;
      if (aw_done) s_axi_awvalid = 0;
      if (w_done)  s_axi_wvalid = 0;
      if (order == 0 && aw_done && !w_done) s_axi_wvalid = 1;
      if (order == 1 && w_done && !aw_done) s_axi_awvalid = 1;
    end
    repeat ($urandom_range(3)) @(posedge clk);
    #1 s_axi_bready = 1;
    do @(posedge clk); while (!s_axi_bvalid);
    check(s_axi_bresp == 2'b00, "bresp OKAY");
    #1 s_axi_bready = 0;
    check(we_count == n0 + 1, "one reg_we per write");
  endtask

  task automatic axi_read(input logic [AW-1:0] addr, output logic [31:0] data);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    #1 s_axi_arvalid = 0;
    repeat ($urandom_range(3)) @(posedge clk);
    #1 s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_rvalid);
    data = s_axi_rdata;
    check(s_axi_rresp == 2'b00, "rresp OKAY");
    #1 s_axi_rready = 0;
  endtask

  initial begin
    logic [31:0] model [16];
    logic [31:0] d, v;
    logic [3:0]  st;
    int a;
    for (int i = 0; i < 16; i++) begin regs[i] = 32'($urandom); model[i] = regs[i]; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      a = $urandom_range(15);
      if ($urandom_range(1) == 0) begin
        d = $urandom; st = ($urandom_range(3) == 0) ? 4'($urandom) : 4'hF;
        axi_write(AW'(a * 4), d, st, t % 3);
        for (int b = 0; b < 4; b++) if (st[b]) model[a][8*b +: 8] = d[8*b +: 8];
      end else begin
        axi_read(AW'(a * 4), v);
        check(v == model[a], $sformatf("read reg %0d: %h exp %h", a, v, model[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
