// remorph_array: a ROWS x COLS mesh of reconfigurable tiles with
// near-neighbour links that are changed at run time.
//
// This is the reconfigurable partition of the system: an array of
// coarse-grain tiles (cgrm_tile) in which every tile can write its own data
// memory or the memory of the one neighbour its link points to, so that data
// moves through the array semi-systolically, by explicit copy instructions.
// An application is run as a sequence of epochs; between and during epochs
// the runtime manager rewrites instruction memories, data memories (e.g.
// twiddle factors) and link directions of single tiles through the
// configuration port, while the other tiles keep computing.
//
// Tile t sits at row t / COLS, column t % COLS. The west edge of column 0 is
// the input column: west_in[r] writes into tile (r, 0) when that tile's
// in_dir is W, and west_in_gnt[r] acknowledges it in the same cycle. The east
// edge of the last column is the output: a remote write of tile (r, COLS-1)
// with out_dir E appears on east_out[r] and completes when
// east_out_ready[r] is 1. Links that point off the north or south edge are
// never granted. Per-tile halted/stalled/branched flags are brought out.
//
// Defaults follow the 1024-point FFT study: 8 tiles per column and up to 10
// columns (80 tiles). The boundary ports, the tile numbering and the
// configuration bus are this design's choices.
module remorph_array
  import remorph_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 10,
  localparam int unsigned NT = ROWS * COLS,
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // reconfiguration port
  input  cfg_t          host_cfg,
  input  logic [TW-1:0] host_tile,
  // input column (west edge) and output column (east edge)
  input  wr_t           west_in        [ROWS],
  output logic          west_in_gnt    [ROWS],
  output wr_t           east_out       [ROWS],
  input  logic          east_out_ready [ROWS],
  // status
  output logic [NT-1:0] halted,
  output logic [NT-1:0] stalled,
  output logic [NT-1:0] branched
);

  cfg_t tile_cfg [NT];
  wr_t  out_wr   [NT];
  dir_e out_dir  [NT];
  logic gnt_to   [NT][4];

  cfg_router #(.NTILES(NT)) u_cfg (
    .clk, .rst,
    .host_cfg,
    .host_tile,
    .tile_cfg
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned T = r * COLS + c;
      wr_t  nb_wr  [4];
      dir_e nb_dir [4];
      logic nb_gnt [4];
      dir_e in_dir_unused;

      // north
      if (r > 0) begin : g_n
        assign nb_wr[DIR_N]  = out_wr[T-COLS];
        assign nb_dir[DIR_N] = out_dir[T-COLS];
        assign nb_gnt[DIR_N] = gnt_to[T-COLS][DIR_S];
      end else begin : g_n_edge
        assign nb_wr[DIR_N]  = '0;
        assign nb_dir[DIR_N] = DIR_N;
        assign nb_gnt[DIR_N] = 1'b0;
      end
      // south
      if (r < ROWS - 1) begin : g_s
        assign nb_wr[DIR_S]  = out_wr[T+COLS];
        assign nb_dir[DIR_S] = out_dir[T+COLS];
        assign nb_gnt[DIR_S] = gnt_to[T+COLS][DIR_N];
      end else begin : g_s_edge
        assign nb_wr[DIR_S]  = '0;
        assign nb_dir[DIR_S] = DIR_S;
        assign nb_gnt[DIR_S] = 1'b0;
      end
      // west
      if (c > 0) begin : g_w
        assign nb_wr[DIR_W]  = out_wr[T-1];
        assign nb_dir[DIR_W] = out_dir[T-1];
        assign nb_gnt[DIR_W] = gnt_to[T-1][DIR_E];
      end else begin : g_w_edge
        assign nb_wr[DIR_W]  = west_in[r];
        assign nb_dir[DIR_W] = DIR_E;
        assign nb_gnt[DIR_W] = 1'b0;
        assign west_in_gnt[r] = gnt_to[T][DIR_W];
      end
      // east
      if (c < COLS - 1) begin : g_e
        assign nb_wr[DIR_E]  = out_wr[T+1];
        assign nb_dir[DIR_E] = out_dir[T+1];
        assign nb_gnt[DIR_E] = gnt_to[T+1][DIR_W];
      end else begin : g_e_edge
        assign nb_wr[DIR_E]  = '0;
        assign nb_dir[DIR_E] = DIR_E;
        assign nb_gnt[DIR_E] = east_out_ready[r];
        always_comb begin
          east_out[r]       = out_wr[T];
          east_out[r].valid = out_wr[T].valid && (out_dir[T] == DIR_E);
        end
      end

      cgrm_tile u_tile (
        .clk, .rst,
        .cfg      (tile_cfg[T]),
        .nb_wr,
        .nb_dir,
        .gnt_to   (gnt_to[T]),
        .nb_gnt,
        .out_wr   (out_wr[T]),
        .out_dir  (out_dir[T]),
        .in_dir   (in_dir_unused),
        .halted   (halted[T]),
        .stalled  (stalled[T]),
        .branched (branched[T])
      );
    end
  end

endmodule
