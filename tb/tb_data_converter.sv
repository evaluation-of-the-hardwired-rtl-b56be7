// tb_data_converter: self-checking test of the stream <-> relay converter.
//
// A behavioural two-bank memory (one cycle read latency) stands for the
// relay BRAM. Receive: random 16-bit beats, with random gaps in tvalid, are
// sent in; the test checks that bit 0 of each char lands in the right relay
// and that, without gaps, N_BEATS beats take N_BEATS cycles. Send: the
// memory is filled with a random image and read out under random
// back-pressure; each beat must carry chars 0x00/0x01 for its two relays,
// tlast must mark only the last beat, and without back-pressure the send
// must take two cycles per beat.
module tb_data_converter;
  import plc_pkg::*;
  localparam int unsigned N_RELAY = 32, N_BEATS = N_RELAY / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        recv_start = 0, recv_done, send_start = 0, send_done;
  logic [15:0] s_tdata = 0, m_tdata;
  logic        s_tvalid = 0, s_tready, m_tvalid, m_tlast, m_tready = 0;
  logic        mem_en, mem_we;
  logic [3:0]  mem_addr;
  logic [1:0]  mem_wdata, mem_rdata;
  logic [1:0]  mem [N_BEATS];

  data_converter #(.N_RELAY(N_RELAY)) dut (.*);

  always_ff @(posedge clk) if (mem_en) begin
    mem_rdata <= mem[mem_addr];
    if (mem_we) mem[mem_addr] <= mem_wdata;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] beats [N_BEATS];
    logic [N_RELAY-1:0] img;
    int cyc, k;
    bit gaps, stall;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      gaps  = (round % 2 == 1);
      stall = (round % 4 >= 2);
      // ---------------- receive ----------------
      foreach (beats[b]) beats[b] = 16'($urandom);
      @(posedge clk); #1;
      recv_start = 1;
      @(posedge clk); #1;
      recv_start = 0;
      k = 0; cyc = 0;
      while (k < N_BEATS) begin
        s_tvalid = gaps ? 1'($urandom) : 1'b1;
        s_tdata  = beats[k];
        @(posedge clk);
        cyc++;
        if (s_tvalid && s_tready) k++;
        #1;
      end
      s_tvalid = 0;
      check(recv_done, "recv_done after last beat");
      if (!gaps) check(cyc == N_BEATS, $sformatf("receive cycles %0d", cyc));
      @(posedge clk); #1;
      check(!recv_done, "recv_done is a pulse");
      for (int b = 0; b < N_BEATS; b++)
        check(mem[b] == {beats[b][8], beats[b][0]}, $sformatf("relay word %0d", b));
      // ---------------- send ----------------
      img = N_RELAY'({$urandom, $urandom});
      for (int b = 0; b < N_BEATS; b++) mem[b] = img[2*b +: 2];
      send_start = 1;
      @(posedge clk); #1;
      send_start = 0;
      k = 0; cyc = 0;
      while (!send_done) begin
        m_tready = stall ? 1'($urandom) : 1'b1;
        #1;
        if (m_tvalid && m_tready) begin
          check(m_tdata == {7'd0, img[2*k+1], 7'd0, img[2*k]}, $sformatf("beat %0d", k));
          check(m_tlast == (k == N_BEATS - 1), "tlast");
          k++;
        end
        @(posedge clk); #1;
        cyc++;
      end
      m_tready = 0;
      check(k == N_BEATS, "beat count");
      if (!stall) check(cyc == 2 * N_BEATS + 1, $sformatf("send cycles %0d", cyc));
      @(posedge clk); #1;
      check(!m_tvalid, "output quiet after send");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
