// remorph_asm_pkg: helpers for testbenches that build tile instructions.
//
// Each function returns one 72-bit instruction in the encoding defined in
// remorph_pkg; modifiers set the remote bit or make an address field
// register-indirect. Used to write small test programs.
package remorph_asm_pkg;
  import remorph_pkg::*;

  function automatic instr_t i_op(opcode_e op, int d, int a, int b, int imm = 0);
    instr_t i;
    i = '0;
    i.op   = op;
    i.dst  = daddr_t'(d);
    i.srca = daddr_t'(a);
    i.srcb = daddr_t'(b);
    i.imm  = IMM_W'(imm);
    return i;
  endfunction

  function automatic instr_t i_movi(int d, int imm);
    return i_op(OP_MOVI, d, 0, 0, imm);
  endfunction

  function automatic instr_t i_br(opcode_e op, int a, int target);
    return i_op(op, 0, a, 0, target);
  endfunction

  function automatic instr_t i_setb(int bsel, int v);
    instr_t i;
    i = i_op(OP_SETB, 0, 0, 0, v);
    i.bsel_d = 2'(bsel);
    return i;
  endfunction

  function automatic instr_t i_addb(int bsel, int v);
    instr_t i;
    i = i_op(OP_ADDB, 0, 0, 0, v);
    i.bsel_d = 2'(bsel);
    return i;
  endfunction

  // which: 0 = destination, 1 = source a, 2 = source b
  function automatic instr_t ind(instr_t i, int which, int bsel);
    instr_t o;
    o = i;
    case (which)
      0: begin o.ind_d = 1'b1; o.bsel_d = 2'(bsel); end
      1: begin o.ind_a = 1'b1; o.bsel_a = 2'(bsel); end
      default: begin o.ind_b = 1'b1; o.bsel_b = 2'(bsel); end
    endcase
    return o;
  endfunction

  function automatic instr_t rem(instr_t i);
    instr_t o;
    o = i;
    o.remote = 1'b1;
    return o;
  endfunction

  function automatic instr_t i_halt();
    return i_op(OP_HALT, 0, 0, 0, 0);
  endfunction

endpackage
