// remorph_pkg: types and constants shared by the reMORPH-style tile array.
//
// The word width (48 bits), the data memory (512 words), the instruction
// memory (512 x 72 bits) and the four near-neighbour link directions follow
// the architecture description. The instruction encoding below is this
// design's own: a three-address, memory-to-memory format that fills the 72-bit
// instruction word with an opcode, per-operand indirect flags, base-register
// selects, three 9-bit addresses and a 29-bit immediate.
package remorph_pkg;

  localparam int unsigned WORD_W      = 48;   // data word
  localparam int unsigned DMEM_DEPTH  = 512;  // data memory words
  localparam int unsigned DADDR_W     = 9;
  localparam int unsigned INSTR_W     = 72;   // instruction word
  localparam int unsigned IMEM_DEPTH  = 512;  // instruction memory words
  localparam int unsigned IADDR_W     = 9;
  localparam int unsigned NBASE       = 4;    // base-address registers per tile
  localparam int unsigned IMM_W       = 29;

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [DADDR_W-1:0] daddr_t;
  typedef logic [IADDR_W-1:0] iaddr_t;

  // Link directions. A tile writes towards out_dir and accepts writes from in_dir.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  function automatic dir_e opposite(dir_e d);
    return dir_e'(d ^ 2'd2);
  endfunction

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,   // d = a + b
    OP_SUB  = 6'd2,   // d = a - b
    OP_MUL  = 6'd3,   // d = (a[24:0] * b[17:0]) >>> imm[5:0]   (signed, DSP48E-sized)
    OP_AND  = 6'd4,
    OP_OR   = 6'd5,
    OP_XOR  = 6'd6,
    OP_SHL  = 6'd7,   // d = a << imm[5:0]
    OP_SHR  = 6'd8,   // d = a >>> imm[5:0] (arithmetic)
    OP_MOV  = 6'd9,   // d = a           (copy, local or to the linked neighbour)
    OP_MOVI = 6'd10,  // d = sext(imm)
    OP_SETB = 6'd11,  // base[bsel_d] = imm[8:0]
    OP_ADDB = 6'd12,  // base[bsel_d] += imm[8:0]
    OP_BZ   = 6'd13,  // if a == 0 goto imm[8:0]
    OP_BNZ  = 6'd14,  // if a != 0 goto imm[8:0]
    OP_BLT  = 6'd15,  // if a <  0 goto imm[8:0]
    OP_JMP  = 6'd16,  // goto imm[8:0]
    OP_HALT = 6'd17   // stop and raise halted
  } opcode_e;

  typedef struct packed {
    opcode_e             op;      // [71:66]
    logic                remote;  // [65]  write the result into the linked neighbour
    logic                ind_d;   // [64]  destination address = base[bsel_d] + dst
    logic                ind_a;   // [63]
    logic                ind_b;   // [62]
    logic [1:0]          bsel_d;  // [61:60]
    logic [1:0]          bsel_a;  // [59:58]
    logic [1:0]          bsel_b;  // [57:56]
    daddr_t              dst;     // [55:47]
    daddr_t              srca;    // [46:38]
    daddr_t              srcb;    // [37:29]
    logic [IMM_W-1:0]    imm;     // [28:0]
  } instr_t;

  // A write travelling over a link (or the write port of a data memory).
  typedef struct packed {
    logic   valid;
    daddr_t addr;
    word_t  data;
  } wr_t;

  // Host reconfiguration targets.
  typedef enum logic [1:0] {
    CFG_IMEM = 2'd0,   // instruction memory word: addr, data[71:0]
    CFG_DMEM = 2'd1,   // data memory word: addr, data[47:0]
    CFG_LINK = 2'd2,   // data[1:0] = in_dir, data[3:2] = out_dir
    CFG_CTRL = 2'd3    // data[0] = 1: start at pc = addr;  data[0] = 0: stop
  } cfg_target_e;

  typedef struct packed {
    logic                valid;
    cfg_target_e         target;
    logic [IADDR_W-1:0]  addr;
    logic [INSTR_W-1:0]  data;
  } cfg_t;

  function automatic logic writes_dest(opcode_e op);
    case (op)
      OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_MOV, OP_MOVI: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

endpackage
