// tb_relay_mem: self-checking test of the banked dual-port relay memory.
//
// Writes random relay images through the word port (A) and checks them
// relay by relay through the single-relay port (B), writes relays through
// port B and checks them word-wise through port A, and checks the one-cycle
// read latency and the read-before-write behaviour of both ports. A
// reference copy of the image is kept in the testbench.
module tb_relay_mem;
  localparam int unsigned N_RELAY = 32, BANKS = 2, DEPTH = N_RELAY / BANKS;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             a_en = 0, a_we = 0, b_en = 0, b_we = 0, b_wdata = 0, b_rdata;
  logic [3:0]       a_addr = 0;
  logic [1:0]       a_wdata = 0, a_rdata;
  logic [4:0]       b_idx = 0;
  logic [N_RELAY-1:0] model;

  relay_mem #(.N_RELAY(N_RELAY), .BANKS(BANKS)) dut (.*);

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

  initial begin
    logic [1:0] old;
    for (int round = 0; round < 20; round++) begin
      // fill through port A
      model = N_RELAY'({$urandom, $urandom});
      for (int w = 0; w < DEPTH; w++) begin
        @(posedge clk); #1;
        a_en = 1; a_we = 1; a_addr = 4'(w); a_wdata = model[2*w +: 2];
      end
      @(posedge clk); #1; a_en = 0; a_we = 0;
      // read every relay through port B
      for (int r = 0; r < N_RELAY; r++) begin
        b_en = 1; b_we = 0; b_idx = 5'(r);
        @(posedge clk); #1;
        b_en = 0;
        check(b_rdata == model[r], $sformatf("B read relay %0d", r));
        // data must hold while the port is disabled
        @(posedge clk); #1;
        check(b_rdata == model[r], "B read hold");
      end
      // flip random relays through port B (read-before-write)
      for (int k = 0; k < 8; k++) begin
        int r;
        r = $urandom_range(N_RELAY - 1);
        b_en = 1; b_we = 1; b_idx = 5'(r); b_wdata = ~model[r];
        @(posedge clk); #1;
        b_en = 0; b_we = 0;
        check(b_rdata == model[r], "B read-before-write");
        model[r] = ~model[r];
      end
      // read back word-wise through port A, with a write in the same access
      for (int w = 0; w < DEPTH; w++) begin
        old = model[2*w +: 2];
        a_en = 1; a_we = (w % 3 == 0); a_addr = 4'(w); a_wdata = 2'($urandom);
        @(posedge clk); #1;
        a_en = 0;
        check(a_rdata == old, $sformatf("A read word %0d", w));
        if (a_we) model[2*w +: 2] = a_wdata;
        a_we = 0;
      end
      for (int w = 0; w < DEPTH; w++) begin
        a_en = 1; a_addr = 4'(w);
        @(posedge clk); #1;
        a_en = 0;
        check(a_rdata == model[2*w +: 2], "A read after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
