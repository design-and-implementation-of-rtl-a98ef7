// tb_link_switch: programs random link directions, offers random writes
// from the four neighbours with random link directions, and checks that a
// write is forwarded only from side in_dir when that neighbour points back,
// and that the grant goes only to that side.
module tb_link_switch;
  import remorph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, cfg_we, remote_gnt;
  dir_e cfg_in_dir, cfg_out_dir, in_dir, out_dir;
  wr_t nb_wr [4];
  dir_e nb_dir [4];
  wr_t remote_wr;
  logic nb_gnt [4];
  int checks = 0, failures = 0, ups = 0;
  dir_e ri, ro;

  link_switch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cfg_we = 0; remote_gnt = 0; cfg_in_dir = DIR_N; cfg_out_dir = DIR_N;
    for (int d = 0; d < 4; d++) begin nb_wr[d] = '0; nb_dir[d] = DIR_N; end
    @(negedge clk); @(negedge clk);
    rst = 0;
    ri = DIR_W; ro = DIR_E;
    checks++;
    if (in_dir !== DIR_W || out_dir !== DIR_E) failures++;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 3) == 0);
      cfg_in_dir = dir_e'($urandom); cfg_out_dir = dir_e'($urandom);
      for (int d = 0; d < 4; d++) begin
        nb_wr[d] = '{valid: 1'($urandom), addr: daddr_t'($urandom), data: word_t'({$urandom, $urandom})};
        nb_dir[d] = ($urandom_range(0, 1) == 0) ? dir_e'(d ^ 2) : dir_e'($urandom);
      end
      remote_gnt = 1'($urandom);
      #1;
      checks += 3;
      if (in_dir !== ri || out_dir !== ro) failures++;
      if (remote_wr.valid !== (nb_wr[ri].valid && nb_dir[ri] == dir_e'(ri ^ 2))) failures++;
      if (remote_wr.addr !== nb_wr[ri].addr || remote_wr.data !== nb_wr[ri].data) failures++;
      if (remote_wr.valid) ups++;
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (nb_gnt[d] !== (d == int'(ri) && remote_gnt && nb_dir[ri] == dir_e'(ri ^ 2))) failures++;
      end
      @(posedge clk);
      if (cfg_we) begin ri = cfg_in_dir; ro = cfg_out_dir; end
    end
    if (ups == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
