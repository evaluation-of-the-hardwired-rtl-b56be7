// dp_bram: true dual-port block RAM, one clock.
//
// Each port has an enable, a write enable, an address and a write data bus.
// Reads are synchronous: the data of the address presented with en=1 appears
// on rdata on the next clock edge (read-before-write on a write). Both ports
// may write in the same cycle; on an address collision port B wins. The
// reference design only says the memory is a dual-port BRAM; the read latency of one
// cycle and the collision rule are this design's own choices, matching an
// FPGA block RAM.
module dp_bram #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
