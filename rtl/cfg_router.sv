// cfg_router: delivers reconfiguration writes to the addressed tile.
//
// In the system the runtime manager (a soft processor) rewrites instruction
// memories, data memories and links through the configuration port at about
// 180 MB/s, one 48-bit data word per 33.3 ns. This block stands for the
// array side of that path: a write (tile index, target, address, data) is
// registered once and then appears as a one-cycle cfg valid at exactly one
// tile; all other tiles see valid=0, so they keep computing while one tile is
// reconfigured (partial reconfiguration). It accepts one write per cycle.
// The bus format and the one-cycle delay are this design's choices.
module cfg_router
  import remorph_pkg::*;
#(
  parameter int unsigned NTILES = 80,
  localparam int unsigned TW = (NTILES > 1) ? $clog2(NTILES) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  cfg_t          host_cfg,
  input  logic [TW-1:0] host_tile,
  output cfg_t          tile_cfg [NTILES]
);

  cfg_t          cfg_q;
  logic [TW-1:0] tile_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_q  <= '0;
      tile_q <= '0;
    end else begin
      cfg_q  <= host_cfg;
      tile_q <= host_tile;
    end
  end

  always_comb begin
    for (int t = 0; t < NTILES; t++) begin
      tile_cfg[t]       = cfg_q;
      tile_cfg[t].valid = cfg_q.valid && (int'(tile_q) == t);
    end
  end

endmodule
