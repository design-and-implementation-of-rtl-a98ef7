// data_memory: the tile's 512 x 48 data memory with two parallel read ports
// and one write port.
//
// As in the architecture description, it is built from two identical block
// RAMs: every write goes to both copies, and each copy serves one of the two
// read ports, so both operands of an instruction are read in the same cycle.
// Reads are synchronous (data one cycle after the address), both ports share
// one read enable, and a read of the address being written at the same edge
// returns the new word (see bram_1r1w).
module data_memory
  import remorph_pkg::*;
#(
  parameter int unsigned DEPTH = DMEM_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  // two read ports
  input  logic          re,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output word_t         rdata_a,
  output word_t         rdata_b
);

  bram_1r1w #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_copy_a (
    .clk, .we, .waddr, .wdata, .re, .raddr(raddr_a), .rdata(rdata_a)
  );

  bram_1r1w #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_copy_b (
    .clk, .we, .waddr, .wdata, .re, .raddr(raddr_b), .rdata(rdata_b)
  );

endmodule
