// tb_jpeg_dct_relink: the front of a JPEG encoder (level shift, 8-point
// DCT, quantisation) on a column of three tiles, with the heavy DCT process
// instantiated twice and fed alternately by re-linking the producer.
//
//   tile (0,0): DCT + quantise, instance A   -> east output row 0
//   tile (1,0): level shift (x - 128), fed from the west input column
//   tile (2,0): DCT + quantise, instance B   -> east output row 2
//
// For every block of 8 samples the runtime manager (this testbench) points
// the shift tile's output link north (even blocks) or south (odd blocks),
// restarts it and the chosen DCT tile, and streams the samples in from the
// west. A DCT tile holds 64 fixed cosine constants (Q12) and 8 quantiser
// reciprocals (Q16) loaded once, multiplies and accumulates each output,
// scales it back, quantises it and sends it east. While one DCT instance
// works on block k the shift tile and the other instance already handle
// block k+1; the test checks that the two instances were busy at the same
// time. Results are checked exactly against the same integer computation
// done here, and against a floating-point DCT within two quantisation steps
// (both scalings truncate towards minus infinity).
// The quantiser row (16 11 10 16 24 40 51 61) is the first row of the
// usual JPEG luminance table.
module tb_jpeg_dct_relink;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  localparam int ROWS = 3, COLS = 1, NT = 3, TW = 2, NBLK = 6;
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

  int checks = 0, failures = 0, n_relink = 0, n_overlap = 0;
  instr_t prog [512];
  int plen;
  longint cosq [8][8], recq [8];
  int qtab [8] = '{16, 11, 10, 16, 24, 40, 51, 61};
  int x [NBLK][8];
  word_t got [NBLK][8];
  int got_n [NBLK];
  int blk_of_row [ROWS];      // block currently produced by each DCT tile

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog_shift();
    plen = 0;
    prog[plen++] = i_br(OP_BZ, 8, 0);
    prog[plen++] = i_movi(8, 0);
    for (int n = 0; n < 8; n++) prog[plen++] = rem(i_op(OP_SUB, n, n, 23));   // x - 128 to the DCT tile
    prog[plen++] = rem(i_movi(8, 1));
    prog[plen++] = i_halt();
  endtask

  task automatic prog_dct();
    plen = 0;
    prog[plen++] = i_br(OP_BZ, 8, 0);
    prog[plen++] = i_movi(8, 0);
    for (int u = 0; u < 8; u++) begin
      prog[plen++] = i_op(OP_MUL, 40, 0, 100 + 8 * u, 0);
      for (int n = 1; n < 8; n++) begin
        prog[plen++] = i_op(OP_MUL, 41, n, 100 + 8 * u + n, 0);
        prog[plen++] = i_op(OP_ADD, 40, 40, 41);
      end
      prog[plen++] = i_op(OP_SHR, 42, 40, 0, 12);
      prog[plen++] = i_op(OP_MUL, 43, 42, 200 + u, 16);
      prog[plen++] = rem(i_op(OP_MOV, u, 43, 0));
    end
    prog[plen++] = rem(i_movi(8, 1));
    prog[plen++] = i_halt();
  endtask

  task automatic host(int tile, cfg_target_e t, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    host_cfg = '{valid: 1'b1, target: t, addr: 9'(addr), data: data};
    host_tile = TW'(tile);
    if (t == CFG_LINK && tile == 1) n_relink++;
    @(negedge clk);
    host_cfg.valid = 1'b0;
  endtask

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r += 2) begin
      east_out_ready[r] <= 1'b1;
      if (east_out[r].valid && east_out[r].addr < 8) begin
        got[blk_of_row[r]][east_out[r].addr] <= east_out[r].data;
        got_n[blk_of_row[r]] <= got_n[blk_of_row[r]] + 1;
      end
    end
    east_out_ready[1] <= 1'b1;
    if (!halted[0] && !halted[2]) n_overlap++;
  end

  initial begin
    longint acc, m;
    real fx, fq;
    int tgt;
    rst = 1; host_cfg = '0; host_tile = '0;
    for (int r = 0; r < ROWS; r++) begin west_in[r] = '0; blk_of_row[r] = 0; end
    for (int b = 0; b < NBLK; b++) begin
      got_n[b] = 0;
      for (int n = 0; n < 8; n++) x[b][n] = $urandom_range(0, 255);
    end
    for (int u = 0; u < 8; u++) begin
      for (int n = 0; n < 8; n++)
        cosq[u][n] = longint'($rtoi($floor(4096.0 * ((u == 0) ? $sqrt(0.125) : 0.5) *
                                    $cos((2.0 * n + 1.0) * u * PI / 16.0) + 0.5)));
      recq[u] = longint'((65536 + qtab[u] / 2) / qtab[u]);
    end
    repeat (3) @(negedge clk);
    rst = 0;

    prog_shift();
    for (int k = 0; k < plen; k++) host(1, CFG_IMEM, k, INSTR_W'(prog[k]));
    host(1, CFG_DMEM, 23, 128);
    host(1, CFG_DMEM, 8, 0);
    prog_dct();
    for (int t = 0; t < 3; t += 2) begin
      for (int k = 0; k < plen; k++) host(t, CFG_IMEM, k, INSTR_W'(prog[k]));
      for (int u = 0; u < 8; u++) begin
        for (int n = 0; n < 8; n++) host(t, CFG_DMEM, 100 + 8 * u + n, INSTR_W'(word_t'(cosq[u][n])));
        host(t, CFG_DMEM, 200 + u, INSTR_W'(word_t'(recq[u])));
      end
      host(t, CFG_DMEM, 8, 0);
    end
    host(0, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_S}));
    host(2, CFG_LINK, 0, INSTR_W'({DIR_E, DIR_N}));

    for (int b = 0; b < NBLK; b++) begin
      tgt = (b % 2 == 0) ? 0 : 2;
      while (!halted[1] || !halted[tgt]) @(negedge clk);
      host(1, CFG_LINK, 0, INSTR_W'({(tgt == 0) ? DIR_N : DIR_S, DIR_W}));   // reLink
      blk_of_row[tgt] = b;
      host(tgt, CFG_CTRL, 0, 1);
      host(1, CFG_CTRL, 0, 1);
      for (int n = 0; n <= 8; n++) begin
        @(negedge clk);
        west_in[1] = '{valid: 1'b1, addr: 9'(n), data: (n == 8) ? word_t'(1) : word_t'(x[b][n])};
        @(posedge clk); #1;
        while (!west_in_gnt[1]) begin @(posedge clk); #1; end
        @(negedge clk);
        west_in[1].valid = 1'b0;
      end
    end
    repeat (5) @(negedge clk);
    while (!(&halted)) @(negedge clk);
    repeat (3) @(negedge clk);

    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (got_n[b] != 8) begin failures++; $display("block %0d: %0d words", b, got_n[b]); end
      for (int u = 0; u < 8; u++) begin
        acc = 0;
        fx = 0.0;
        for (int n = 0; n < 8; n++) begin
          acc += longint'(x[b][n] - 128) * cosq[u][n];
          fx  += real'(x[b][n] - 128) * ((u == 0) ? $sqrt(0.125) : 0.5) * $cos((2.0 * n + 1.0) * u * PI / 16.0);
        end
        m = ((acc >>> 12) * recq[u]) >>> 16;
        fq = fx / qtab[u];
        checks += 2;
        if (longint'($signed(got[b][u])) != m) begin
          failures++;
          $display("block %0d coef %0d: %0d expected %0d", b, u, $signed(got[b][u]), m);
        end
        if ((real'(m) - fq) > 2.0 || (fq - real'(m)) > 2.0) begin
          failures++;
          $display("block %0d coef %0d: %0d far from %f", b, u, m, fq);
        end
      end
    end
    checks += 2;
    if (n_relink != NBLK) failures++;
    if (n_overlap == 0) failures++;
    $display("blocks=%0d relinks=%0d cycles with both DCT instances busy=%0d", NBLK, n_relink, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
