// dsp_alu: the tile's execute unit, in the role of the DSP48E slice of the
// tile (Figure 1 of the architecture description).
//
// Purely combinational: given the opcode, the two 48-bit operands and the
// immediate field it returns the 48-bit result and the two flags the
// sequencer needs for conditional branches (operand a zero, operand a
// negative). The operation set (add, subtract, 25x18 signed multiply with an
// arithmetic right shift for fixed-point scaling, and/or/xor, shifts, move,
// move-immediate) is this design's reading of "arithmetic and logic operations
// on a 48 bit word"; the 25x18 multiplier size is that of a DSP48E.
module dsp_alu
  import remorph_pkg::*;
(
  input  opcode_e          op,
  input  word_t            a,
  input  word_t            b,
  input  logic [IMM_W-1:0] imm,
  output word_t            result,
  output logic             a_zero,
  output logic             a_neg
);

  logic signed [24:0] mul_a;
  logic signed [17:0] mul_b;
  logic signed [WORD_W-1:0] product;
  logic [5:0] shamt;

  assign mul_a   = a[24:0];
  assign mul_b   = b[17:0];
  assign product = WORD_W'(mul_a * mul_b);
  assign shamt   = imm[5:0];

  always_comb begin
    case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MUL:  result = word_t'(product >>> shamt);
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_SHL:  result = a << shamt;
      OP_SHR:  result = word_t'($signed(a) >>> shamt);
      OP_MOV:  result = a;
      OP_MOVI: result = word_t'($signed(imm));
      default: result = '0;
    endcase
  end

  assign a_zero = (a == '0);
  assign a_neg  = a[WORD_W-1];

endmodule
