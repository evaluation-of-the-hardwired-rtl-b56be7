// relay_mem: the relay image, held in a stack of dual-port BRAM banks.
//
// The relay image has N_RELAY 1-bit relays. It is split over BANKS banks
// (one per char of a stream beat, two for a 16-bit beat): relay r sits in
// bank r % BANKS at word r / BANKS. Port A is the stream side: one access
// reaches word a_addr of every bank at once, so a whole stream beat is
// written or read in one cycle. Port B is the co-processor side: it reaches
// a single relay by its flat index. Both ports read with one cycle of
// latency. That each port is driven independently (stream on one, the
// co-processor on the other) follows the reference design; the banking by char is
// this design's own choice.
module relay_mem #(
  parameter int unsigned N_RELAY = 32,
  parameter int unsigned BANKS   = 2,
  localparam int unsigned DEPTH  = (N_RELAY + BANKS - 1) / BANKS,
  localparam int unsigned WAW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RIW    = (N_RELAY > 1) ? $clog2(N_RELAY) : 1,
  localparam int unsigned BSW    = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic             clk,
  // port A: word access to all banks
  input  logic             a_en,
  input  logic             a_we,
  input  logic [WAW-1:0]   a_addr,
  input  logic [BANKS-1:0] a_wdata,
  output logic [BANKS-1:0] a_rdata,
  // port B: single relay access by flat index
  input  logic             b_en,
  input  logic             b_we,
  input  logic [RIW-1:0]   b_idx,
  input  logic             b_wdata,
  output logic             b_rdata
);

  logic [BSW-1:0]   b_bank, b_bank_q;
  logic [WAW-1:0]   b_word;
  logic [BANKS-1:0] b_rd_all;

  always_comb begin
    b_bank = BSW'(b_idx % RIW'(BANKS));
    b_word = WAW'(b_idx / RIW'(BANKS));
  end

  for (genvar g = 0; g < BANKS; g++) begin : g_bank
    dp_bram #(.WIDTH(1), .DEPTH(DEPTH)) u_bank (
      .clk     (clk),
      .a_en    (a_en),
      .a_we    (a_we),
      .a_addr  (a_addr),
      .a_wdata (a_wdata[g]),
      .a_rdata (a_rdata[g]),
      .b_en    (b_en && (b_bank == BSW'(g))),
      .b_we    (b_we),
      .b_addr  (b_word),
      .b_wdata (b_wdata),
      .b_rdata (b_rd_all[g])
    );
  end

  always_ff @(posedge clk) begin
    if (b_en) b_bank_q <= b_bank;
  end

  assign b_rdata = b_rd_all[b_bank_q];

endmodule
