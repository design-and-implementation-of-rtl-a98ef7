// cgrm_tile: one coarse-grain reconfigurable tile (processing element).
//
// The tile follows Figure 1 of the architecture: a sequencer, a 512 x 72
// instruction memory, a 512 x 48 data memory with two read ports (two block
// RAM copies) and a DSP-style execute unit, on a 48-bit word. Instructions
// are three-address and memory to memory: d = a op b, where a and b are read
// from the tile's own data memory and d is written either to the own memory
// or, with the remote bit, over the link into the neighbour's memory. Base
// registers give register-indirect addressing for loops.
//
// Pipeline (see sequencer): fetch, decode + operand read, execute + write;
// one instruction per cycle, two bubbles per taken branch, and a stall while
// the execute-stage write is not granted (memory port busy, or the link to
// the neighbour not established). Results of one instruction are visible to
// the next (write-first data memory).
//
// Interface: cfg is a reconfiguration write already routed to this tile
// (CFG_IMEM, CFG_DMEM, CFG_LINK, CFG_CTRL, see remorph_pkg). nb_wr/nb_dir
// are the four neighbours' outgoing writes and link directions (index N, E,
// S, W); gnt_to returns this tile's grant to each of them. out_wr/out_dir is
// this tile's outgoing write; nb_gnt[d] is the grant from the neighbour on
// side d, of which the one on side out_dir is used. halted, stalled and
// branched report the sequencer state (branched: a branch was taken).
// The instruction encoding, the pipeline and the stall/grant rules are this
// design's own; the memories, word width and link model are the document's.
module cgrm_tile
  import remorph_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  cfg_t   cfg,
  input  wr_t    nb_wr  [4],
  input  dir_e   nb_dir [4],
  output logic   gnt_to [4],
  input  logic   nb_gnt [4],
  output wr_t    out_wr,
  output dir_e   out_dir,
  output dir_e   in_dir,
  output logic   halted,
  output logic   stalled,
  output logic   branched
);

  // ---------------- fetch ----------------
  iaddr_t pc;
  logic   fetch_en;
  logic [INSTR_W-1:0] imem_q;

  instr_memory u_imem (
    .clk,
    .we    (cfg.valid && cfg.target == CFG_IMEM),
    .waddr (cfg.addr),
    .wdata (cfg.data),
    .re    (fetch_en),
    .raddr (pc),
    .rdata (imem_q)
  );

  // ---------------- decode ----------------
  instr_t ir_d;
  logic   d_fire, e_valid, taken;
  logic   d_valid;  // not needed outside the sequencer
  daddr_t ea_d, ea_a, ea_b;

  assign ir_d = instr_t'(imem_q);

  addr_unit u_addr (
    .clk, .rst,
    .ir   (ir_d),
    .upd  (d_fire),
    .ea_d, .ea_a, .ea_b
  );

  // ---------------- execute ----------------
  instr_t ir_e;
  daddr_t ea_d_e;
  word_t  opa, opb, result;
  logic   a_zero, a_neg;
  logic   stall;

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_e   <= '0;
      ea_d_e <= '0;
    end else if (!stall) begin
      ir_e   <= ir_d;
      ea_d_e <= ea_d;
    end
  end

  dsp_alu u_dsp (
    .op     (ir_e.op),
    .a      (opa),
    .b      (opb),
    .imm    (ir_e.imm),
    .result,
    .a_zero,
    .a_neg
  );

  // ---------------- write port and links ----------------
  wr_t    host_wr, local_wr, remote_wr;
  logic   local_gnt, remote_gnt, out_gnt;
  logic   mem_we;
  daddr_t mem_waddr;
  word_t  mem_wdata;
  logic   e_writes;

  assign e_writes = e_valid && writes_dest(ir_e.op);

  assign host_wr.valid  = cfg.valid && cfg.target == CFG_DMEM;
  assign host_wr.addr   = cfg.addr;
  assign host_wr.data   = cfg.data[WORD_W-1:0];

  assign local_wr.valid = e_writes && !ir_e.remote;
  assign local_wr.addr  = ea_d_e;
  assign local_wr.data  = result;

  assign out_wr.valid   = e_writes && ir_e.remote;
  assign out_wr.addr    = ea_d_e;
  assign out_wr.data    = result;

  link_switch u_link (
    .clk, .rst,
    .cfg_we      (cfg.valid && cfg.target == CFG_LINK),
    .cfg_in_dir  (dir_e'(cfg.data[1:0])),
    .cfg_out_dir (dir_e'(cfg.data[3:2])),
    .nb_wr,
    .nb_dir,
    .remote_gnt,
    .remote_wr,
    .nb_gnt      (gnt_to),
    .in_dir,
    .out_dir
  );

  dmem_write_arbiter u_arb (
    .host_wr, .local_wr, .remote_wr,
    .local_gnt, .remote_gnt,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata)
  );

  data_memory u_dmem (
    .clk,
    .we      (mem_we),
    .waddr   (mem_waddr),
    .wdata   (mem_wdata),
    .re      (fetch_en),
    .raddr_a (ea_a),
    .raddr_b (ea_b),
    .rdata_a (opa),
    .rdata_b (opb)
  );

  assign out_gnt = nb_gnt[out_dir];
  assign stall   = (local_wr.valid && !local_gnt) || (out_wr.valid && !out_gnt);
  assign stalled  = stall;
  assign branched = taken;

  // ---------------- sequencer ----------------
  sequencer u_seq (
    .clk, .rst,
    .start    (cfg.valid && cfg.target == CFG_CTRL && cfg.data[0]),
    .start_pc (cfg.addr),
    .stop     (cfg.valid && cfg.target == CFG_CTRL && !cfg.data[0]),
    .stall,
    .e_op     (ir_e.op),
    .e_target (ir_e.imm[IADDR_W-1:0]),
    .a_zero,
    .a_neg,
    .pc,
    .fetch_en,
    .d_valid,
    .d_fire,
    .e_valid,
    .taken,
    .halted
  );

endmodule
