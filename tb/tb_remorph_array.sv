// tb_remorph_array: end-to-end run of the full 8 x 10 tile array at its
// default size, in two configuration epochs, in the manner of a pipelined
// FFT column structure.
//
// Every row receives a block of 8 words on the west input column. Column 0
// scales each word (x * coef >>> 4 + bias), then tile pairs (rows 2j, 2j+1)
// exchange half of their block over vertical links (epoch A) and halt.
// (Column 0 first takes its input from the west in epoch 0.) The
// runtime manager (this testbench) re-points column 0's links to the east
// and restarts it (epoch B), which sends the reordered block along the row;
// columns 1..9 each apply their own scale and bias and pass the block on,
// and column 9 delivers it on the east output. Meanwhile the testbench
// rewrites coefficients of columns 5..9 while the rest of the array runs,
// sets column 1's input links late so that column 0 stalls waiting for the
// link, and throttles the east output so the last column stalls.
// The east output is compared with values computed here; each mechanism
// (vertical exchange, link reconfiguration, link-wait stall, output
// back-pressure stall, write-first bypass, taken branch, reconfiguration
// during a run, halt) is counted and must occur.
module tb_remorph_array;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  localparam int ROWS = 8, COLS = 10, NT = ROWS * COLS, TW = $clog2(NT);
  localparam int EPA = 20;            // column-0 program: vertical exchange epoch
  localparam int EPB = 40;            // column-0 program: send-east epoch

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  cfg_t host_cfg;
  logic [TW-1:0] host_tile;
  wr_t  west_in [ROWS];
  logic west_in_gnt [ROWS];
  wr_t  east_out [ROWS];
  logic east_out_ready [ROWS];
  logic [NT-1:0] halted, stalled, branched;

  remorph_array dut (.*);

  int checks = 0, failures = 0;
  int n_vexch = 0, n_hwrites = 0, n_linkcfg = 0, n_linkwait = 0, n_bp_stall = 0;
  int n_bypass = 0, n_branch = 0, n_cfg_during_run = 0, n_east = 0;
  logic col1_linked;
  word_t coef [ROWS][COLS], bias [ROWS][COLS];
  word_t expv [ROWS][8];
  word_t got  [ROWS][8];
  int    got_n [ROWS];
  int    flag_seen [ROWS];
  instr_t prog [64];
  int plen;

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- programs ----------------
  task automatic prog_stage();          // columns 1..9
    plen = 0;
    prog[plen++] = i_br(OP_BZ, 8, 0);                                  // 0 wait for block
    prog[plen++] = i_movi(8, 0);
    prog[plen++] = i_setb(0, 0);
    prog[plen++] = i_movi(24, 8);
    prog[plen++] = ind(i_op(OP_MUL, 30, 0, 20, 4), 1, 0);              // 4
    prog[plen++] = i_op(OP_ADD, 31, 30, 22);                           // uses 4's result
    prog[plen++] = rem(ind(i_op(OP_MOV, 0, 31, 0), 0, 0));
    prog[plen++] = i_addb(0, 1);
    prog[plen++] = i_op(OP_SUB, 24, 24, 23);
    prog[plen++] = i_br(OP_BNZ, 24, 4);
    prog[plen++] = rem(i_movi(8, 1));
    prog[plen++] = i_halt();
  endtask

  task automatic emit_copy(int src, int dst, int n, int b);   // n words, base register b
    int top;
    prog[plen++] = i_setb(b, 0);
    prog[plen++] = i_movi(24, n);
    top = plen;
    prog[plen++] = rem(ind(ind(i_op(OP_MOV, dst, src, 0), 0, b), 1, b));
    prog[plen++] = i_addb(b, 1);
    prog[plen++] = i_op(OP_SUB, 24, 24, 23);
    prog[plen++] = i_br(OP_BNZ, 24, top);
  endtask

  task automatic prog_col0(bit odd);
    plen = 0;
    // epoch 0: take the block from the west input and scale it
    prog[plen++] = i_br(OP_BZ, 8, 0);
    prog[plen++] = i_movi(8, 0);
    prog[plen++] = i_setb(0, 0);
    prog[plen++] = i_movi(24, 8);
    prog[plen++] = ind(ind(i_op(OP_MUL, 30, 0, 20, 4), 0, 0), 1, 0);   // 4
    prog[plen++] = ind(ind(i_op(OP_ADD, 30, 30, 22), 0, 0), 1, 0);
    prog[plen++] = i_addb(0, 1);
    prog[plen++] = i_op(OP_SUB, 24, 24, 23);
    prog[plen++] = i_br(OP_BNZ, 24, 4);
    prog[plen++] = i_halt();
    while (plen < EPA) prog[plen++] = i_halt();
    // epoch A: vertical half exchange with the partner row
    emit_copy(odd ? 30 : 34, 40, 4, 1);          // send half to partner's 40..43
    prog[plen++] = rem(i_movi(9, 1));
    prog[plen++] = i_br(OP_BZ, 9, plen);         // wait for partner's half
    prog[plen++] = i_halt();
    while (plen < EPB) prog[plen++] = i_halt();
    // epoch B: send the reordered block east
    prog[plen++] = i_movi(9, 0);
    if (!odd) begin
      emit_copy(30, 0, 4, 1);                    // own low half -> 0..3
      emit_copy(40, 4, 4, 2);                    // partner's low half -> 4..7
    end else begin
      emit_copy(40, 0, 4, 1);                    // partner's high half -> 0..3
      emit_copy(34, 4, 4, 2);                    // own high half -> 4..7
    end
    prog[plen++] = rem(i_movi(8, 1));
    prog[plen++] = i_halt();
  endtask

  // ---------------- host port ----------------
  task automatic host(int tile, cfg_target_e t, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    host_cfg = '{valid: 1'b1, target: t, addr: 9'(addr), data: data};
    host_tile = TW'(tile);
    if (!(&halted)) n_cfg_during_run++;
    if (t == CFG_LINK) n_linkcfg++;
    @(negedge clk);
    host_cfg.valid = 1'b0;
  endtask

  function automatic word_t stage(word_t x, word_t c, word_t b);
    longint p;
    p = longint'($signed(x[24:0])) * longint'($signed(c[17:0]));
    return word_t'(p >>> 4) + b;
  endfunction

  // ---------------- monitors ----------------
  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (east_out[r].valid && east_out_ready[r]) begin
        n_east++;
        if (east_out[r].addr < 8) begin
          got[r][east_out[r].addr] <= east_out[r].data;
          got_n[r] <= got_n[r] + 1;
        end else if (east_out[r].addr == 8 && east_out[r].data == 1) flag_seen[r] <= flag_seen[r] + 1;
      end
      if (stalled[r * COLS + COLS - 1] && east_out[r].valid) n_bp_stall++;
      if (stalled[r * COLS] && !col1_linked) n_linkwait++;
    end
    for (int t = 0; t < NT; t++) if (branched[t]) n_branch++;
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      always_ff @(posedge clk) begin
        // a read sampling the address written at the same edge (bypass)
        if (dut.g_row[r].g_col[c].u_tile.fetch_en && dut.g_row[r].g_col[c].u_tile.mem_we &&
            (dut.g_row[r].g_col[c].u_tile.mem_waddr == dut.g_row[r].g_col[c].u_tile.ea_a ||
             dut.g_row[r].g_col[c].u_tile.mem_waddr == dut.g_row[r].g_col[c].u_tile.ea_b))
          n_bypass++;
        if (dut.g_row[r].g_col[c].u_tile.out_wr.valid && dut.g_row[r].g_col[c].u_tile.out_gnt) begin
          if (dut.g_row[r].g_col[c].u_tile.out_dir inside {DIR_N, DIR_S}) n_vexch++;
          else n_hwrites++;
        end
      end
    end
  end

  always_ff @(posedge clk)
    for (int r = 0; r < ROWS; r++) east_out_ready[r] <= ($urandom_range(0, 2) != 0);

  // ---------------- stimulus ----------------
  initial begin
    word_t x [ROWS][8];
    word_t t0 [ROWS][8];
    word_t v [8];
    int t;
    rst = 1; host_cfg = '0; host_tile = '0; col1_linked = 0;
    for (int r = 0; r < ROWS; r++) begin west_in[r] = '0; got_n[r] = 0; flag_seen[r] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;

    // load programs, constants and links
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        t = r * COLS + c;
        if (c == 0) prog_col0(r[0]); else prog_stage();
        for (int k = 0; k < plen; k++) host(t, CFG_IMEM, k, INSTR_W'(prog[k]));
        coef[r][c] = word_t'($urandom_range(8, 24));
        bias[r][c] = word_t'($urandom_range(0, 50));
        host(t, CFG_DMEM, 20, INSTR_W'(coef[r][c]));
        host(t, CFG_DMEM, 22, INSTR_W'(bias[r][c]));
        host(t, CFG_DMEM, 23, 1);
        host(t, CFG_DMEM, 8, 0);
        host(t, CFG_DMEM, 9, 0);
        if (c == 0)
          host(t, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_W}));
        else if (c == 1)
          host(t, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_N}));   // not yet linked to column 0
        else
          host(t, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_W}));
      end
    end
    // start every tile at pc 0
    for (int tt = 0; tt < NT; tt++) host(tt, CFG_CTRL, 0, 1);

    // coefficient reload of columns 5..9 while the array runs
    for (int r = 0; r < ROWS; r++)
      for (int c = 5; c < COLS; c++) begin
        coef[r][c] = word_t'($urandom_range(8, 24));
        host(r * COLS + c, CFG_DMEM, 20, INSTR_W'(coef[r][c]));
      end

    // input column
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < 8; k++) x[r][k] = word_t'($urandom_range(0, 1000));
    fork
      for (int r = 0; r < ROWS; r++) begin
        automatic int rr = r;
        fork
          for (int k = 0; k <= 8; k++) begin
            @(negedge clk);
            west_in[rr] = '{valid: 1'b1, addr: 9'(k), data: (k == 8) ? word_t'(1) : x[rr][k]};
            @(posedge clk); #1;
            while (!west_in_gnt[rr]) begin @(posedge clk); #1; end
            @(negedge clk);
            west_in[rr].valid = 1'b0;
          end
        join_none
      end
    join_none

    // expected output
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < 8; k++) t0[r][k] = stage(x[r][k], coef[r][0], bias[r][0]);
    for (int r = 0; r < ROWS; r++) begin
      for (int k = 0; k < 4; k++) begin
        if (!r[0]) begin v[k] = t0[r][k];         v[k + 4] = t0[r + 1][k];     end
        else       begin v[k] = t0[r - 1][k + 4]; v[k + 4] = t0[r][k + 4];     end
      end
      for (int c = 1; c < COLS; c++)
        for (int k = 0; k < 8; k++) v[k] = stage(v[k], coef[r][c], bias[r][c]);
      for (int k = 0; k < 8; k++) expv[r][k] = v[k];
    end

    // epoch change on column 0: vertical links between row pairs
    repeat (10) @(negedge clk);
    for (int r = 0; r < ROWS; r++) while (!halted[r * COLS]) @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      host(r * COLS, CFG_LINK, 0, r[0] ? INSTR_W'({DIR_N, DIR_N}) : INSTR_W'({DIR_S, DIR_S}));
      host(r * COLS, CFG_CTRL, EPA, 1);
    end
    // epoch change on column 0: links to the east
    repeat (10) @(negedge clk);
    for (int r = 0; r < ROWS; r++) while (!halted[r * COLS]) @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      host(r * COLS, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_W}));
      host(r * COLS, CFG_CTRL, EPB, 1);
    end
    // column 1 links are set late: column 0 waits on them
    repeat (30) @(negedge clk);
    for (int r = 0; r < ROWS; r++) host(r * COLS + 1, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_W}));
    col1_linked = 1;

    // wait for the whole array to finish
    repeat (5) @(negedge clk);
    while (!(&halted)) @(negedge clk);
    repeat (5) @(negedge clk);

    for (int r = 0; r < ROWS; r++) begin
      checks += 2;
      if (got_n[r] != 8) begin failures++; $display("row %0d: %0d words", r, got_n[r]); end
      if (flag_seen[r] != 1) failures++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (got[r][k] != expv[r][k]) begin
          failures++;
          $display("row %0d word %0d: %0d expected %0d", r, k, got[r][k], expv[r][k]);
        end
      end
    end
    $display("vertical exchanges=%0d horizontal writes=%0d link configs=%0d link-wait stalls=%0d",
             n_vexch, n_hwrites, n_linkcfg, n_linkwait);
    $display("output stalls=%0d bypasses=%0d taken branches=%0d cfg writes during run=%0d east words=%0d",
             n_bp_stall, n_bypass, n_branch, n_cfg_during_run, n_east);
    checks += 8;
    if (n_vexch != ROWS * 5) failures++;     // 4 words + flag per tile
    if (n_linkcfg == 0) failures++;
    if (n_linkwait == 0) failures++;
    if (n_bp_stall == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_branch == 0) failures++;
    if (n_cfg_during_run == 0) failures++;
    if (!(&halted)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
