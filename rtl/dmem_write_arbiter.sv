// dmem_write_arbiter: shares the single write port of a tile's data memory.
//
// A tile's memory can be written by three parties: the reconfiguration port
// (loading constants such as twiddle factors or copy-process variables), the
// tile itself, and the one neighbour whose link currently points into this
// tile (the architecture lets a tile write its own or its neighbour's
// memory). Priority is fixed: reconfiguration, then the local tile, then the
// neighbour. The reconfiguration write is always taken; a local or remote
// request that loses is not granted and the requester holds it (its pipeline
// stalls) until it wins. Combinational; the memory registers the write.
// The priority order and the stall are this design's choices.
module dmem_write_arbiter
  import remorph_pkg::*;
(
  input  wr_t    host_wr,
  input  wr_t    local_wr,
  input  wr_t    remote_wr,
  output logic   local_gnt,
  output logic   remote_gnt,
  output logic   we,
  output daddr_t waddr,
  output word_t  wdata
);

  always_comb begin
    local_gnt  = 1'b0;
    remote_gnt = 1'b0;
    we         = 1'b0;
    waddr      = host_wr.addr;
    wdata      = host_wr.data;
    if (host_wr.valid) begin
      we = 1'b1;
    end else if (local_wr.valid) begin
      we        = 1'b1;
      waddr     = local_wr.addr;
      wdata     = local_wr.data;
      local_gnt = 1'b1;
    end else if (remote_wr.valid) begin
      we         = 1'b1;
      waddr      = remote_wr.addr;
      wdata      = remote_wr.data;
      remote_gnt = 1'b1;
    end
  end

endmodule
