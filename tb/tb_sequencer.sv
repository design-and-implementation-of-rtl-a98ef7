// tb_sequencer: drives random start/stop/stall and random execute-stage
// opcodes and flags, and compares pc, valid flags, branch decision and halt
// state every cycle with a reference model of the pipeline rules: a start
// loads pc and empties the pipeline, a stall freezes everything, a taken
// branch or a HALT in execute discards the two younger instructions.
// Also checks, on a directed sequence, the two-cycle start-up latency.
module tb_sequencer;
  import remorph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, start, stop, stall, a_zero, a_neg;
  iaddr_t start_pc, e_target, pc;
  opcode_e e_op;
  logic fetch_en, d_valid, d_fire, e_valid, taken, halted;
  // model
  logic m_run, m_dv, m_ev, m_taken;
  iaddr_t m_pc;
  int checks = 0, failures = 0, n_taken = 0, n_stall = 0, n_halt = 0;

  sequencer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic br(opcode_e o, logic z, logic ng);
    case (o)
      OP_JMP: return 1'b1;
      OP_BZ:  return z;
      OP_BNZ: return !z;
      OP_BLT: return ng;
      default: return 1'b0;
    endcase
  endfunction

  task automatic compare();
    m_taken = m_ev && br(e_op, a_zero, a_neg);
    checks++;
    if (pc !== m_pc || d_valid !== m_dv || e_valid !== m_ev || halted !== !m_run ||
        taken !== m_taken || fetch_en !== !stall ||
        d_fire !== (m_dv && !stall && !(m_taken || (m_ev && e_op == OP_HALT)))) begin
      failures++;
      if (failures < 10) $display("t=%0t pc=%0d/%0d dv=%b/%b ev=%b/%b", $time, pc, m_pc, d_valid, m_dv, e_valid, m_ev);
    end
  endtask

  task automatic model_step();
    logic fl, h;
    m_taken = m_ev && br(e_op, a_zero, a_neg);
    h  = m_ev && e_op == OP_HALT;
    fl = m_taken || h;
    if (start) begin m_run = 1; m_pc = start_pc; m_dv = 0; m_ev = 0; end
    else if (stop) begin m_run = 0; m_dv = 0; m_ev = 0; end
    else if (!stall) begin
      m_ev = m_dv && !fl;
      m_dv = m_run && !fl;
      if (m_taken) m_pc = e_target;
      else if (m_run && !h) m_pc = m_pc + 1;
      if (h) m_run = 0;
    end
  endtask

  initial begin
    rst = 1; start = 0; stop = 0; stall = 0; a_zero = 0; a_neg = 0;
    start_pc = 0; e_target = 0; e_op = OP_NOP;
    m_run = 0; m_dv = 0; m_ev = 0; m_pc = 0; m_taken = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // directed: start at 5, two cycles until the first instruction executes
    start = 1; start_pc = 9'd5;
    @(posedge clk); model_step(); @(negedge clk); start = 0;
    checks++; if (pc !== 9'd5 || d_valid || e_valid) failures++;
    @(posedge clk); model_step(); @(negedge clk);
    checks++; if (pc !== 9'd6 || !d_valid || e_valid) failures++;
    @(posedge clk); model_step(); @(negedge clk);
    checks++; if (pc !== 9'd7 || !e_valid) failures++;
    // random
    for (int n = 0; n < 20000; n++) begin
      start    = ($urandom_range(0, 60) == 0);
      stop     = !start && ($urandom_range(0, 200) == 0);
      start_pc = iaddr_t'($urandom);
      e_target = iaddr_t'($urandom);
      stall    = m_ev && ($urandom_range(0, 5) == 0);
      a_zero   = 1'($urandom);
      a_neg    = 1'($urandom);
      case ($urandom_range(0, 9))
        0: e_op = OP_JMP;
        1: e_op = OP_BZ;
        2: e_op = OP_BNZ;
        3: e_op = OP_BLT;
        4: e_op = ($urandom_range(0, 3) == 0) ? OP_HALT : OP_NOP;
        default: e_op = OP_ADD;
      endcase
      #1;
      compare();
      if (m_taken && !stall) n_taken++;
      if (stall) n_stall++;
      if (m_ev && e_op == OP_HALT && !stall && !start && !stop) n_halt++;
      @(posedge clk); model_step(); @(negedge clk);
    end
    if (n_taken == 0 || n_stall == 0 || n_halt == 0) failures++;
    $display("taken=%0d stalls=%0d halts=%0d", n_taken, n_stall, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
