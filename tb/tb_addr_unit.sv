// tb_addr_unit: random SETB/ADDB updates of the base registers and random
// direct/indirect address fields, compared with a reference register file.
module tb_addr_unit;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, upd;
  instr_t ir;
  daddr_t ea_d, ea_a, ea_b;
  int unsigned base_ref [4];
  int checks = 0, failures = 0;

  addr_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ea(logic ind, logic [1:0] bs, daddr_t f);
    return ind ? ((base_ref[bs] + f) % 512) : f;
  endfunction

  initial begin
    rst = 1; upd = 0; ir = '0;
    for (int i = 0; i < 4; i++) base_ref[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: ir = i_setb($urandom_range(0, 3), $urandom_range(0, 511));
        1: ir = i_addb($urandom_range(0, 3), $urandom_range(0, 511));
        default: ir = i_op(OP_ADD, $urandom_range(0, 511), $urandom_range(0, 511), $urandom_range(0, 511));
      endcase
      ir.ind_d = 1'($urandom); ir.ind_a = 1'($urandom); ir.ind_b = 1'($urandom);
      ir.bsel_a = 2'($urandom); ir.bsel_b = 2'($urandom);
      if (ir.op != OP_SETB && ir.op != OP_ADDB) ir.bsel_d = 2'($urandom);
      upd = $urandom_range(0, 3) != 0;
      #1;
      checks += 3;
      if (ea_d != daddr_t'(ea(ir.ind_d, ir.bsel_d, ir.dst)))  failures++;
      if (ea_a != daddr_t'(ea(ir.ind_a, ir.bsel_a, ir.srca))) failures++;
      if (ea_b != daddr_t'(ea(ir.ind_b, ir.bsel_b, ir.srcb))) failures++;
      if (upd && ir.op == OP_SETB) base_ref[ir.bsel_d] = ir.imm[8:0];
      if (upd && ir.op == OP_ADDB) base_ref[ir.bsel_d] = (base_ref[ir.bsel_d] + ir.imm[8:0]) % 512;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
