// tb_fft16_workload: a 16-point radix-2 FFT mapped onto two tiles of one
// column (partition size M = 8, N/M = 2 rows), following the FFT mapping of
// the architecture study on a small scale.
//
// Decimation in frequency, Q14 fixed-point twiddles, fully unrolled code
// generated here. The first stage pairs points 8 apart, which live in
// different tiles: the tiles first exchange half of their points over
// vertical links, compute the stage, then exchange half again so that each
// tile holds one 8-point sub-transform, which it finishes locally.
// Twiddles for the first stage are preloaded. For the second stage tile 0
// derives them by squaring its own (w_2k = w_k^2), while tile 1 gets them
// reloaded by the runtime manager while it runs (w^(8..14) squared are not
// the ones it needs); later stages square again. After the transform the
// manager re-points both links east and restarts the tiles, which send the
// result out of the east edge under random back-pressure.
// The result is compared exactly with a fixed-point model of the same
// algorithm, and with a floating-point DFT within a tolerance.
module tb_fft16_workload;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  localparam int ROWS = 2, COLS = 1, NT = 2, TW = 1;
  localparam int EPO = 400;           // output epoch entry point
  localparam int Q = 14;
  localparam real PI = 3.14159265358979;

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

  remorph_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  instr_t prog [512];
  int plen;
  longint wr16 [16], wi16 [16], wr8 [8], wi8 [8];
  longint xr [16], xi [16];
  word_t got [ROWS][16];
  int got_n [ROWS];
  int n_exch = 0, n_bp = 0, cycles = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory map of a tile: slot s holds re at s, im at 16+s (slots 0..15);
  // twiddles re at 48+k, im at 56+k; reloaded twiddles re 64+k, im 72+k;
  // flags 40, 41 (exchanges), 42 (reload done); temporaries 100..107
  function automatic int RE(int s); return s;      endfunction
  function automatic int IM(int s); return 16 + s; endfunction

  task automatic bfly(int a, int b, int twr, int twi);
    prog[plen++] = i_op(OP_SUB, 102, RE(a), RE(b));
    prog[plen++] = i_op(OP_SUB, 103, IM(a), IM(b));
    prog[plen++] = i_op(OP_ADD, RE(a), RE(a), RE(b));
    prog[plen++] = i_op(OP_ADD, IM(a), IM(a), IM(b));
    prog[plen++] = i_op(OP_MUL, 104, 102, twr, Q);
    prog[plen++] = i_op(OP_MUL, 105, 103, twi, Q);
    prog[plen++] = i_op(OP_MUL, 106, 102, twi, Q);
    prog[plen++] = i_op(OP_MUL, 107, 103, twr, Q);
    prog[plen++] = i_op(OP_SUB, RE(b), 104, 105);
    prog[plen++] = i_op(OP_ADD, IM(b), 106, 107);
  endtask

  task automatic square(int twr, int twi);
    prog[plen++] = i_op(OP_MUL, 104, twr, twr, Q);
    prog[plen++] = i_op(OP_MUL, 105, twi, twi, Q);
    prog[plen++] = i_op(OP_MUL, 106, twr, twi, Q - 1);
    prog[plen++] = i_op(OP_SUB, twr, 104, 105);
    prog[plen++] = i_op(OP_MOV, twi, 106, 0);
  endtask

  task automatic exchange(int first, int dst, int flag);
    for (int k = 0; k < 4; k++) begin
      prog[plen++] = rem(i_op(OP_MOV, RE(dst + k), RE(first + k), 0));
      prog[plen++] = rem(i_op(OP_MOV, IM(dst + k), IM(first + k), 0));
    end
    prog[plen++] = rem(i_movi(flag, 1));
    prog[plen++] = i_br(OP_BZ, flag, plen);
  endtask

  // local slot of sub-transform point i
  function automatic int lmap(int t, int i);
    int m0 [8] = '{0, 1, 2, 3, 12, 13, 14, 15};
    int m1 [8] = '{12, 13, 14, 15, 4, 5, 6, 7};
    return (t == 0) ? m0[i] : m1[i];
  endfunction

  task automatic subfft(int t, int tb_r, int tb_i);
    for (int h = 4; h >= 1; h = h / 2) begin
      for (int g = 0; g < 8; g += 2 * h)
        for (int j = 0; j < h; j++)
          bfly(lmap(t, g + j), lmap(t, g + j + h), tb_r + j, tb_i + j);
      if (h > 1) for (int k = 0; k < h / 2; k++) square(tb_r + k, tb_i + k);
    end
  endtask

  task automatic build(int t);
    plen = 0;
    exchange(t == 0 ? 4 : 0, 8, 40);
    for (int k = 0; k < 4; k++)
      if (t == 0) bfly(k, 8 + k, 48 + k, 56 + k);
      else        bfly(8 + k, 4 + k, 48 + k, 56 + k);
    exchange(8, 12, 41);
    if (t == 0) begin
      for (int k = 0; k < 4; k++) square(48 + k, 56 + k);
      subfft(0, 48, 56);
    end else begin
      prog[plen++] = i_br(OP_BZ, 42, plen);
      subfft(1, 64, 72);
    end
    prog[plen++] = i_halt();
    if (plen > EPO) $fatal(1, "program too long");
    while (plen < EPO) prog[plen++] = i_halt();
    for (int i = 0; i < 8; i++) begin
      prog[plen++] = rem(i_op(OP_MOV, i, RE(lmap(t, i)), 0));
      prog[plen++] = rem(i_op(OP_MOV, 8 + i, IM(lmap(t, i)), 0));
    end
    prog[plen++] = i_halt();
  endtask

  // ---------------- reference: same algorithm in integer arithmetic ----------------
  function automatic longint mulq(longint a, longint b, int sh);
    return (a * b) >>> sh;
  endfunction

  task automatic m_bfly(ref longint r [16], ref longint i [16], input int a, int b, longint w_r, longint w_i);
    longint dr, di;
    dr = r[a] - r[b]; di = i[a] - i[b];
    r[a] = r[a] + r[b]; i[a] = i[a] + i[b];
    r[b] = mulq(dr, w_r, Q) - mulq(di, w_i, Q);
    i[b] = mulq(dr, w_i, Q) + mulq(di, w_r, Q);
  endtask

  task automatic m_square(ref longint w_r, ref longint w_i);
    longint s0, s1, s2;
    s0 = mulq(w_r, w_r, Q); s1 = mulq(w_i, w_i, Q); s2 = mulq(w_r, w_i, Q - 1);
    w_r = s0 - s1; w_i = s2;
  endtask

  function automatic int bitrev4(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  function automatic longint sx(word_t w);
    return longint'($signed(w));
  endfunction

  task automatic host(int tile, cfg_target_e t, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    host_cfg = '{valid: 1'b1, target: t, addr: 9'(addr), data: data};
    host_tile = TW'(tile);
    @(negedge clk);
    host_cfg.valid = 1'b0;
  endtask

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      east_out_ready[r] <= ($urandom_range(0, 1) == 1);
      if (east_out[r].valid && east_out_ready[r] && east_out[r].addr < 16) begin
        got[r][east_out[r].addr] <= east_out[r].data;
        got_n[r] <= got_n[r] + 1;
      end
      if (east_out[r].valid && !east_out_ready[r]) n_bp++;
    end
    if (dut.g_row[0].g_col[0].u_tile.out_wr.valid && dut.g_row[0].g_col[0].u_tile.out_dir == DIR_S &&
        dut.g_row[0].g_col[0].u_tile.out_gnt) n_exch++;
    if (!(&halted)) cycles++;
  end

  initial begin
    longint mr [16], mi [16], tr [4], ti [4], t8r [4], t8i [4];
    longint expr_ [16], expi_ [16];
    real fr, fi, err, maxerr;
    rst = 1; host_cfg = '0; host_tile = '0;
    for (int r = 0; r < ROWS; r++) begin west_in[r] = '0; got_n[r] = 0; end
    for (int k = 0; k < 16; k++) begin
      wr16[k] = longint'($rtoi($floor($cos(2.0 * PI * k / 16.0) * 16384.0 + 0.5)));
      wi16[k] = longint'($rtoi($floor(-$sin(2.0 * PI * k / 16.0) * 16384.0 + 0.5)));
    end
    for (int k = 0; k < 8; k++) begin wr8[k] = wr16[2 * k]; wi8[k] = wi16[2 * k]; end
    for (int k = 0; k < 16; k++) begin
      xr[k] = longint'($urandom_range(0, 40000)) - 20000;
      xi[k] = longint'($urandom_range(0, 40000)) - 20000;
    end
    repeat (3) @(negedge clk);
    rst = 0;

    for (int t = 0; t < 2; t++) begin
      build(t);
      for (int k = 0; k < plen; k++) host(t, CFG_IMEM, k, INSTR_W'(prog[k]));
      for (int s = 0; s < 8; s++) begin
        host(t, CFG_DMEM, RE(s), INSTR_W'(word_t'(xr[8 * t + s])));
        host(t, CFG_DMEM, IM(s), INSTR_W'(word_t'(xi[8 * t + s])));
      end
      for (int k = 0; k < 4; k++) begin
        host(t, CFG_DMEM, 48 + k, INSTR_W'(word_t'(wr16[4 * t + k])));
        host(t, CFG_DMEM, 56 + k, INSTR_W'(word_t'(wi16[4 * t + k])));
      end
      host(t, CFG_DMEM, 40, 0); host(t, CFG_DMEM, 41, 0); host(t, CFG_DMEM, 42, 0);
    end
    host(0, CFG_LINK, 0, INSTR_W'({DIR_S, DIR_S}));
    host(1, CFG_LINK, 0, INSTR_W'({DIR_N, DIR_N}));
    host(0, CFG_CTRL, 0, 1);
    host(1, CFG_CTRL, 0, 1);
    // reload of tile 1's second-stage twiddles while it runs
    for (int k = 0; k < 4; k++) begin
      repeat (12) @(negedge clk);   // about one word per 33 ns at 400 MHz
      host(1, CFG_DMEM, 64 + k, INSTR_W'(word_t'(wr8[k])));
      host(1, CFG_DMEM, 72 + k, INSTR_W'(word_t'(wi8[k])));
    end
    host(1, CFG_DMEM, 42, 1);
    checks++;
    if (&halted) failures++;        // the array must still be busy
    repeat (5) @(negedge clk);
    while (!(&halted)) @(negedge clk);
    $display("transform: %0d cycles", cycles);
    // output epoch
    host(0, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_S}));
    host(1, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_N}));
    host(0, CFG_CTRL, EPO, 1);
    host(1, CFG_CTRL, EPO, 1);
    repeat (5) @(negedge clk);
    while (!(&halted)) @(negedge clk);
    repeat (3) @(negedge clk);

    // fixed-point reference
    for (int k = 0; k < 16; k++) begin mr[k] = xr[k]; mi[k] = xi[k]; end
    for (int j = 0; j < 8; j++) m_bfly(mr, mi, j, j + 8, wr16[j], wi16[j]);
    for (int half = 0; half < 2; half++) begin
      for (int k = 0; k < 4; k++) begin
        if (half == 0) begin tr[k] = wr16[k]; ti[k] = wi16[k]; m_square(tr[k], ti[k]); end
        else begin tr[k] = wr8[k]; ti[k] = wi8[k]; end
      end
      for (int h = 4; h >= 1; h = h / 2) begin
        for (int g = 0; g < 8; g += 2 * h)
          for (int j = 0; j < h; j++) m_bfly(mr, mi, 8 * half + g + j, 8 * half + g + j + h, tr[j], ti[j]);
        if (h > 1) for (int k = 0; k < h / 2; k++) m_square(tr[k], ti[k]);
      end
    end

    maxerr = 0.0;
    for (int r = 0; r < 2; r++) begin
      checks++;
      if (got_n[r] != 16) begin failures++; $display("tile %0d sent %0d words", r, got_n[r]); end
      for (int i = 0; i < 8; i++) begin
        int p;
        p = 8 * r + i;
        checks++;
        if (sx(got[r][i]) != mr[p] || sx(got[r][8 + i]) != mi[p]) begin
          failures++;
          $display("position %0d: (%0d, %0d) expected (%0d, %0d)", p, sx(got[r][i]), sx(got[r][8 + i]), mr[p], mi[p]);
        end
        // floating-point DFT at the bit-reversed frequency
        fr = 0.0; fi = 0.0;
        for (int n = 0; n < 16; n++) begin
          fr += real'(xr[n]) * $cos(2.0 * PI * bitrev4(p) * n / 16.0) + real'(xi[n]) * $sin(2.0 * PI * bitrev4(p) * n / 16.0);
          fi += real'(xi[n]) * $cos(2.0 * PI * bitrev4(p) * n / 16.0) - real'(xr[n]) * $sin(2.0 * PI * bitrev4(p) * n / 16.0);
        end
        err = $sqrt((real'(sx(got[r][i])) - fr) ** 2 + (real'(sx(got[r][8 + i])) - fi) ** 2);
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 100.0) begin failures++; $display("position %0d: DFT error %f", p, err); end
      end
    end
    checks += 2;
    if (n_exch != 18) failures++;     // two exchanges of 8 words + flag
    if (n_bp == 0) failures++;
    $display("max error against floating-point DFT: %f; exchange words from tile 0: %0d; output stalls: %0d",
             maxerr, n_exch, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
