// tb_dsp_alu: random operands for every operation of the execute unit,
// compared with results computed here with plain integer arithmetic
// (the multiply uses 64-bit signed arithmetic on the sign-extended
// 25-bit and 18-bit operands).
module tb_dsp_alu;
  import remorph_pkg::*;
  opcode_e op;
  word_t a, b, result, expv;
  logic [IMM_W-1:0] imm;
  logic a_zero, a_neg;
  int checks = 0, failures = 0;
  longint sa, sb, prod;
  logic clk = 0;
  always #5 clk = ~clk;

  dsp_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(opcode_e o, word_t x, word_t y, logic [IMM_W-1:0] im);
    longint px, py;
    int sh;
    sh = int'(im[5:0]);
    px = longint'($signed(x[24:0]));
    py = longint'($signed(y[17:0]));
    case (o)
      OP_ADD:  return word_t'(x + y);
      OP_SUB:  return word_t'(x - y);
      OP_MUL:  return word_t'((px * py) >>> sh);
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_SHL:  return word_t'(x << sh);
      OP_SHR:  return word_t'(longint'($signed(x)) >>> sh);
      OP_MOV:  return x;
      OP_MOVI: return word_t'(longint'($signed(im)));
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      op  = opcode_e'($urandom_range(0, 17));
      a   = word_t'({$urandom, $urandom});
      b   = word_t'({$urandom, $urandom});
      if (n % 7 == 0) a = '0;
      imm = IMM_W'($urandom);
      if (op == OP_MUL || op == OP_SHL || op == OP_SHR) imm = IMM_W'($urandom_range(0, 47));
      #1;
      expv = model(op, a, b, imm);
      checks++;
      if (result !== expv) begin
        failures++;
        if (failures < 10) $display("op=%s a=%h b=%h imm=%h got %h exp %h", op.name(), a, b, imm, result, expv);
      end
      checks++;
      if (a_zero !== (a == 0) || a_neg !== a[47]) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
