// instr_memory: the tile's 512 x 72 instruction memory.
//
// One port is the tile's fetch port (synchronous read: the instruction at
// raddr appears one cycle after the edge, and holds while re=0); the other
// port is written by reconfiguration, so new code can be loaded while the
// tile runs. Size and the dual-port use follow the architecture description;
// a fetch of a word written at the same edge returns the old word (read-first),
// which is this design's choice.
module instr_memory
  import remorph_pkg::*;
#(
  parameter int unsigned DEPTH = IMEM_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [INSTR_W-1:0] wdata,
  input  logic               re,
  input  logic [AW-1:0]      raddr,
  output logic [INSTR_W-1:0] rdata
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
