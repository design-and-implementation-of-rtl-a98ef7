// tb_cfg_router: sends random configuration writes to random tiles of a
// 12-tile router and checks that each appears one cycle later, unchanged, at
// exactly the addressed tile.
module tb_cfg_router;
  import remorph_pkg::*;
  localparam int NT = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  cfg_t host_cfg, prev_cfg;
  logic [3:0] host_tile, prev_tile;
  cfg_t tile_cfg [NT];
  int checks = 0, failures = 0;

  cfg_router #(.NTILES(NT)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; host_cfg = '0; host_tile = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      host_cfg = '{valid: 1'($urandom), target: cfg_target_e'($urandom),
                   addr: 9'($urandom), data: INSTR_W'({$urandom, $urandom, $urandom})};
      host_tile = 4'($urandom_range(0, NT - 1));
      prev_cfg = host_cfg; prev_tile = host_tile;
      @(negedge clk);
      host_cfg.valid = 0;
      #1;
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (tile_cfg[t].valid !== (prev_cfg.valid && t == int'(prev_tile))) failures++;
        if (tile_cfg[t].valid && (tile_cfg[t].target !== prev_cfg.target ||
            tile_cfg[t].addr !== prev_cfg.addr || tile_cfg[t].data !== prev_cfg.data)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
