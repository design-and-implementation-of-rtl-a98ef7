// tb_cgrm_tile: runs a test program on one tile and checks its results and
// timing against an instruction-level interpreter written here.
//
// The program walks two 16-word vectors with register-indirect addressing in
// a counted loop, uses add, subtract, multiply with shift, arithmetic shift,
// conditional and unconditional branches, sends every result over the link
// to the neighbour (captured here) and finally waits, by polling, for a flag
// that the west neighbour writes into its memory.
//   run 0: everything granted at once; the number of cycles from start to
//          halt must equal executed instructions + 2 (pipeline fill) + 2 per
//          taken branch, i.e. one instruction per cycle.
//   run 1: new data, link re-pointed from east to south, random grants from
//          the receiving neighbour, reconfiguration writes into the data
//          memory during the run, and the west neighbour's writes competing
//          with the tile for the memory port: results must be unchanged
//          and stalls must occur.
module tb_cgrm_tile;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  cfg_t cfg;
  wr_t  nb_wr [4];
  dir_e nb_dir [4];
  logic gnt_to [4];
  logic nb_gnt [4];
  wr_t  out_wr;
  dir_e out_dir, in_dir;
  logic halted, stalled, branched;

  cgrm_tile dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_nb_writes = 0;
  instr_t prog [32];
  int plen;
  longint unsigned mdl_mem [512];
  // expected and captured remote writes
  int unsigned exp_addr [$];
  word_t       exp_data [$];
  int unsigned got_addr [$];
  word_t       got_data [$];
  int exp_exec, exp_taken;
  logic random_grant;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- interpreter ----------------
  function automatic word_t rd(int unsigned a);
    return word_t'(mdl_mem[a % 512]);
  endfunction

  task automatic interpret();
    int unsigned pc, base [4], ea_d, ea_a, ea_b;
    instr_t i;
    word_t a, b, r;
    longint pa, pb;
    pc = 0; exp_exec = 0; exp_taken = 0;
    for (int k = 0; k < 4; k++) base[k] = 0;
    forever begin
      i = prog[pc];
      exp_exec++;
      ea_d = i.ind_d ? (base[i.bsel_d] + i.dst)  % 512 : i.dst;
      ea_a = i.ind_a ? (base[i.bsel_a] + i.srca) % 512 : i.srca;
      ea_b = i.ind_b ? (base[i.bsel_b] + i.srcb) % 512 : i.srcb;
      a = rd(ea_a); b = rd(ea_b);
      pa = longint'($signed(a[24:0])); pb = longint'($signed(b[17:0]));
      pc++;
      case (i.op)
        OP_HALT: break;
        OP_SETB: base[i.bsel_d] = i.imm[8:0];
        OP_ADDB: base[i.bsel_d] = (base[i.bsel_d] + i.imm[8:0]) % 512;
        OP_JMP:  begin pc = i.imm[8:0]; exp_taken++; end
        OP_BZ:   if (a == 0)  begin pc = i.imm[8:0]; exp_taken++; end
        OP_BNZ:  if (a != 0)  begin pc = i.imm[8:0]; exp_taken++; end
        OP_BLT:  if (a[47])   begin pc = i.imm[8:0]; exp_taken++; end
        default: begin
          case (i.op)
            OP_ADD:  r = a + b;
            OP_SUB:  r = a - b;
            OP_MUL:  r = word_t'((pa * pb) >>> i.imm[5:0]);
            OP_SHR:  r = word_t'(longint'($signed(a)) >>> i.imm[5:0]);
            OP_MOV:  r = a;
            OP_MOVI: r = word_t'(longint'($signed(i.imm)));
            default: r = '0;
          endcase
          if (i.remote) begin exp_addr.push_back(ea_d); exp_data.push_back(r); end
          else mdl_mem[ea_d] = r;
        end
      endcase
    end
  endtask

  // ---------------- program ----------------
  task automatic build_prog();
    plen = 0;
    prog[plen++] = i_setb(0, 0);                                   // 0
    prog[plen++] = i_movi(10, 16);                                 // 1 count
    prog[plen++] = i_movi(11, 1);                                  // 2 one
    prog[plen++] = i_movi(12, 0);                                  // 3 acc
    prog[plen++] = ind(ind(i_op(OP_ADD, 13, 100, 200), 1, 0), 2, 0); // 4 loop: t = x + y
    prog[plen++] = ind(i_op(OP_MUL, 14, 13, 200, 3), 2, 0);       // 5 t*y >>> 3
    prog[plen++] = ind(i_op(OP_SUB, 15, 14, 100), 2, 0);          // 6 - x
    prog[plen++] = rem(ind(i_op(OP_MOV, 0, 15, 0), 0, 0));        // 7 send r[i] to i
    prog[plen++] = i_op(OP_ADD, 12, 12, 15);                       // 8 acc += r
    prog[plen++] = i_addb(0, 1);                                   // 9
    prog[plen++] = i_op(OP_SUB, 10, 10, 11);                       // 10
    prog[plen++] = i_br(OP_BNZ, 10, 4);                            // 11
    prog[plen++] = rem(i_op(OP_MOV, 300, 12, 0));                  // 12
    prog[plen++] = i_op(OP_SHR, 16, 12, 0, 2);                     // 13
    prog[plen++] = rem(i_op(OP_MOV, 301, 16, 0));                  // 14
    prog[plen++] = i_br(OP_BLT, 16, 18);                           // 15
    prog[plen++] = i_movi(17, 5);                                  // 16
    prog[plen++] = i_br(OP_JMP, 0, 19);                            // 17
    prog[plen++] = i_movi(17, -7);                                 // 18
    prog[plen++] = rem(i_op(OP_MOV, 302, 17, 0));                  // 19
    prog[plen++] = i_br(OP_BZ, 50, 20);                            // 20 wait for flag
    prog[plen++] = i_op(OP_ADD, 18, 51, 52);                       // 21
    prog[plen++] = rem(i_op(OP_MOV, 303, 18, 0));                  // 22
    prog[plen++] = i_halt();                                       // 23
  endtask

  // ---------------- host port ----------------
  task automatic host(cfg_target_e t, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    cfg = '{valid: 1'b1, target: t, addr: 9'(addr), data: data};
    @(negedge clk);
    cfg.valid = 1'b0;
  endtask

  // captured remote writes, and grant generation on side out_dir
  always_ff @(posedge clk) begin
    if (out_wr.valid && nb_gnt[out_dir]) begin
      got_addr.push_back(out_wr.addr);
      got_data.push_back(out_wr.data);
    end
    if (stalled) n_stall++;
    if (nb_wr[DIR_W].valid && gnt_to[DIR_W]) n_nb_writes++;
  end

  always_comb begin
    for (int d = 0; d < 4; d++) nb_gnt[d] = 1'b0;
    nb_gnt[out_dir] = random_grant ? 1'($urandom_range(0, 2) == 0) : 1'b1;
  end

  task automatic run(int r);
    int cyc;
    word_t x, y;
    exp_addr.delete(); exp_data.delete(); got_addr.delete(); got_data.delete();
    for (int k = 0; k < 16; k++) begin
      x = word_t'($urandom_range(0, 60000));
      y = (r == 1) ? '0 : word_t'($urandom_range(0, 100));
      mdl_mem[100 + k] = x; mdl_mem[200 + k] = y;
      host(CFG_DMEM, 100 + k, INSTR_W'(x));
      host(CFG_DMEM, 200 + k, INSTR_W'(y));
    end
    if (r == 0) begin
      mdl_mem[50] = 1; mdl_mem[51] = 3; mdl_mem[52] = 4;
      host(CFG_DMEM, 50, 1); host(CFG_DMEM, 51, 3); host(CFG_DMEM, 52, 4);
    end else begin
      // flag cleared; the west neighbour will write 51, 52 and then 50
      mdl_mem[50] = 1; mdl_mem[51] = 1000; mdl_mem[52] = 234;
      host(CFG_DMEM, 50, 0);
      host(CFG_LINK, 0, INSTR_W'({DIR_S, DIR_W}));
      checks++;
      if (out_dir !== DIR_S) failures++;
    end
    interpret();
    host(CFG_CTRL, 0, 1);
    cyc = 0;
    if (r == 1) begin
      fork
        begin  // west neighbour traffic
          repeat (40) @(negedge clk);
          for (int k = 0; k < 3; k++) begin
            @(negedge clk);
            nb_wr[DIR_W] = '{valid: 1'b1, addr: 9'(k == 2 ? 50 : 51 + k),
                             data: (k == 0) ? word_t'(1000) : (k == 1) ? word_t'(234) : word_t'(1)};
            @(posedge clk);
            while (!gnt_to[DIR_W]) @(posedge clk);
            @(negedge clk);
            nb_wr[DIR_W].valid = 1'b0;
          end
        end
        begin  // reconfiguration writes during the run
          repeat (20) @(negedge clk);
          for (int k = 0; k < 30; k++) host(CFG_DMEM, 400 + k, INSTR_W'(k));
        end
      join_none
    end
    while (!halted) begin @(posedge clk); #1; cyc++; end
    if (r == 0) begin
      checks++;
      if (cyc != exp_exec + 2 + 2 * exp_taken) begin
        failures++;
        $display("run 0: %0d cycles, expected %0d", cyc, exp_exec + 2 + 2 * exp_taken);
      end
      $display("run 0: %0d instructions, %0d taken branches, %0d cycles", exp_exec, exp_taken, cyc);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (got_addr.size() != exp_addr.size()) begin
      failures++;
      $display("run %0d: %0d results, expected %0d", r, got_addr.size(), exp_addr.size());
    end
    for (int k = 0; k < exp_addr.size() && k < got_addr.size(); k++) begin
      checks++;
      if (got_addr[k] != exp_addr[k] || got_data[k] != exp_data[k]) begin
        failures++;
        $display("run %0d result %0d: @%0d %h, expected @%0d %h", r, k, got_addr[k], got_data[k], exp_addr[k], exp_data[k]);
      end
    end
  endtask

  initial begin
    rst = 1; cfg = '0; random_grant = 0;
    for (int d = 0; d < 4; d++) begin nb_wr[d] = '0; nb_dir[d] = dir_e'(d ^ 2); end
    repeat (3) @(negedge clk);
    rst = 0;
    build_prog();
    for (int k = 0; k < plen; k++) host(CFG_IMEM, k, INSTR_W'(prog[k]));
    checks++;
    if (!halted) failures++;
    run(0);
    checks++;
    if (n_stall != 0) failures++;
    random_grant = 1;
    run(1);
    checks += 2;
    if (n_stall == 0) failures++;
    if (n_nb_writes != 3) failures++;
    $display("stall cycles=%0d neighbour writes=%0d", n_stall, n_nb_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
