// sequencer: program counter and pipeline control of one tile.
//
// The tile runs a three-stage pipeline: fetch (the instruction memory is read
// at pc), decode (effective addresses are formed and both operands are read
// from the data memory) and execute (the DSP computes and the result is
// written). One instruction completes per cycle, matching one instruction per
// 2.5 ns clock at 400 MHz. This controller
//   - starts the tile at a given pc and stops it on command from the
//     reconfiguration port, or when a HALT reaches execute (halted=1);
//   - resolves BZ/BNZ/BLT/JMP in execute; a taken branch discards the two
//     younger instructions (two bubbles);
//   - freezes all stages while stall=1 (the execute-stage write was not
//     granted a memory write port, e.g. because the link is not yet set up).
// The pipeline depth, branch cost and stall rule are this design's choices;
// the description gives only the sequencer's name and its 'C' style loops.
module sequencer
  import remorph_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,       // begin execution at start_pc
  input  iaddr_t  start_pc,
  input  logic    stop,        // halt immediately
  input  logic    stall,       // execute stage cannot complete this cycle
  // execute stage
  input  opcode_e e_op,
  input  iaddr_t  e_target,
  input  logic    a_zero,
  input  logic    a_neg,
  // pipeline state
  output iaddr_t  pc,          // fetch address
  output logic    fetch_en,    // read enable for instruction and data memories
  output logic    d_valid,     // decode stage holds a live instruction
  output logic    d_fire,      // decode-stage instruction moves to execute
  output logic    e_valid,     // execute stage holds a live instruction
  output logic    taken,       // branch taken in execute this cycle
  output logic    halted
);

  logic running;
  logic halt_e;
  logic flush;

  always_comb begin
    taken = 1'b0;
    if (e_valid) begin
      case (e_op)
        OP_JMP: taken = 1'b1;
        OP_BZ:  taken = a_zero;
        OP_BNZ: taken = !a_zero;
        OP_BLT: taken = a_neg;
        default: taken = 1'b0;
      endcase
    end
  end

  assign halt_e   = e_valid && (e_op == OP_HALT);
  assign flush    = taken || halt_e;
  assign fetch_en = !stall;
  assign d_fire   = d_valid && !stall && !flush;
  assign halted   = !running;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      pc      <= '0;
      d_valid <= 1'b0;
      e_valid <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
      pc      <= start_pc;
      d_valid <= 1'b0;
      e_valid <= 1'b0;
    end else if (stop) begin
      running <= 1'b0;
      d_valid <= 1'b0;
      e_valid <= 1'b0;
    end else if (!stall) begin
      e_valid <= d_valid && !flush;
      d_valid <= running && !flush;
      if (halt_e)      running <= 1'b0;
      if (taken)       pc <= e_target;
      else if (running && !halt_e) pc <= pc + 1'b1;
    end
  end

  // A stalled instruction is always a live one.
  assert property (@(posedge clk) disable iff (rst) stall |-> e_valid);

endmodule
