// link_switch: one tile's slice of the fast programmable interconnect.
//
// Each tile is linked to one neighbour in one of the four principal
// directions at a time, and the links are changed at run time. This switch
// holds the tile's two link registers: out_dir, the neighbour this tile's
// remote writes go to, and in_dir, the neighbour allowed to write into this
// tile. Both are loaded by a reconfiguration write (cfg_we) and reset to
// out_dir=E, in_dir=W, a west-to-east chain.
// A link carries a write when both ends agree: the neighbour on side in_dir
// presents a valid write and its out_dir points back at this tile. The switch
// forwards that write as the remote request to the write arbiter and returns
// the arbiter's grant on the matching side only (nb_gnt). Combinational apart
// from the two registers. Register layout, reset value and the two-ended
// agreement rule are this design's choices.
module link_switch
  import remorph_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   cfg_we,
  input  dir_e   cfg_in_dir,
  input  dir_e   cfg_out_dir,
  input  wr_t    nb_wr  [4],   // writes offered by the neighbours N, E, S, W
  input  dir_e   nb_dir [4],   // those neighbours' out_dir
  input  logic   remote_gnt,   // from the write arbiter
  output wr_t    remote_wr,    // to the write arbiter
  output logic   nb_gnt [4],   // grant back to each neighbour
  output dir_e   in_dir,
  output dir_e   out_dir
);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_dir  <= DIR_W;
      out_dir <= DIR_E;
    end else if (cfg_we) begin
      in_dir  <= cfg_in_dir;
      out_dir <= cfg_out_dir;
    end
  end

  logic link_up;
  assign link_up = (nb_dir[in_dir] == opposite(in_dir));

  always_comb begin
    remote_wr       = nb_wr[in_dir];
    remote_wr.valid = nb_wr[in_dir].valid && link_up;
    for (int d = 0; d < 4; d++) nb_gnt[d] = 1'b0;
    nb_gnt[in_dir] = remote_gnt && link_up;
  end

endmodule
