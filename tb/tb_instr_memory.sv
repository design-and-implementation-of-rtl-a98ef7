// tb_instr_memory: writes random 72-bit words, fetches them back in random
// order, checks read-first behaviour on a same-address write and that the
// output holds while the fetch enable is low.
module tb_instr_memory;
  import remorph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [8:0] waddr, raddr;
  logic [INSTR_W-1:0] wdata, rdata, expq;
  logic [INSTR_W-1:0] ref_mem [512];
  int checks = 0, failures = 0;

  instr_memory dut (.*);

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; expq = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i);
      wdata = INSTR_W'({$urandom, $urandom, $urandom}); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) == 0;
      re = $urandom_range(0, 3) != 0;
      raddr = 9'($urandom_range(0, 511));
      waddr = ($urandom_range(0, 1) == 0) ? raddr : 9'($urandom_range(0, 511));
      wdata = INSTR_W'({$urandom, $urandom, $urandom});
      if (re) expq = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expq) begin failures++; $display("mismatch @%0d %h %h", raddr, rdata, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
