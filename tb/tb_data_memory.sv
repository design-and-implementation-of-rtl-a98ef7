// tb_data_memory: checks that both read ports of the data memory return the
// same contents as a reference array in the same cycle, with writes landing
// in both copies, write-first collisions on either port and read-enable hold.
module tb_data_memory;
  import remorph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [8:0] waddr, raddr_a, raddr_b;
  word_t wdata, rdata_a, rdata_b, ea, eb;
  word_t ref_mem [512];
  int checks = 0, failures = 0, coll = 0;

  data_memory dut (.*);

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr_a = 0; raddr_b = 0; wdata = 0; ea = 0; eb = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = word_t'({$urandom, $urandom}); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      re = $urandom_range(0, 4) != 0;
      waddr = 9'($urandom_range(0, 31));
      raddr_a = ($urandom_range(0, 3) == 0) ? waddr : 9'($urandom_range(0, 31));
      raddr_b = ($urandom_range(0, 3) == 0) ? waddr : 9'($urandom_range(0, 31));
      wdata = word_t'({$urandom, $urandom});
      if (re) begin
        ea = (we && waddr == raddr_a) ? wdata : ref_mem[raddr_a];
        eb = (we && waddr == raddr_b) ? wdata : ref_mem[raddr_b];
        if (we && (waddr == raddr_a || waddr == raddr_b)) coll++;
      end
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a !== ea) begin failures++; $display("port a mismatch %h %h", rdata_a, ea); end
      if (rdata_b !== eb) begin failures++; $display("port b mismatch %h %h", rdata_b, eb); end
    end
    if (coll == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
