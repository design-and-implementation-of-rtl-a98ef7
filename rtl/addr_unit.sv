// addr_unit: base-address registers and effective-address generation.
//
// Loops in the tile run the same instructions on new data by moving base
// addresses and using register-indirect addressing, as the architecture
// description explains. Each of the three address fields of an instruction
// (destination, source a, source b) is either used directly or added, modulo
// the 512-word memory, to one of NBASE base registers. SETB loads a base
// register from the immediate and ADDB adds the immediate to it; both take
// effect at the edge where the instruction leaves the decode stage (upd=1),
// so the next instruction already sees the new base. Number of base registers
// and reset value 0 are this design's choices. Effective addresses are
// combinational from the instruction and the registers.
module addr_unit
  import remorph_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  instr_t ir,       // instruction in the decode stage
  input  logic   upd,      // instruction leaves decode this cycle
  output daddr_t ea_d,
  output daddr_t ea_a,
  output daddr_t ea_b
);

  daddr_t base [NBASE];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NBASE; i++) base[i] <= '0;
    end else if (upd) begin
      case (ir.op)
        OP_SETB: base[ir.bsel_d] <= ir.imm[DADDR_W-1:0];
        OP_ADDB: base[ir.bsel_d] <= base[ir.bsel_d] + ir.imm[DADDR_W-1:0];
        default: ;
      endcase
    end
  end

  assign ea_d = ir.ind_d ? daddr_t'(base[ir.bsel_d] + ir.dst)  : ir.dst;
  assign ea_a = ir.ind_a ? daddr_t'(base[ir.bsel_a] + ir.srca) : ir.srca;
  assign ea_b = ir.ind_b ? daddr_t'(base[ir.bsel_b] + ir.srcb) : ir.srcb;

endmodule
