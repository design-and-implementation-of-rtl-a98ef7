// bram_1r1w: simple dual-port block RAM, one synchronous read port and one
// write port, as one port pair of an FPGA block RAM is used in the tile.
//
// Timing: a write with we=1 lands at the rising edge. A read with re=1 samples
// raddr at the rising edge and presents the word on rdata after that edge;
// with re=0 rdata holds its value (used to freeze operands during a stall).
// When a read and a write hit the same address at the same edge the new word
// is returned (write-first bypass), so an instruction may read the result of
// the instruction just before it. The bypass is this design's choice; the
// description only gives the memory sizes.
module bram_1r1w #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (we && (waddr == raddr)) ? wdata : mem[raddr];
  end

endmodule
