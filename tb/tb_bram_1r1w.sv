// tb_bram_1r1w: random writes and reads of a 512 x 48 block RAM against a
// reference array, including same-address read/write collisions (write-first)
// and read-enable hold.
module tb_bram_1r1w;
  localparam int W = 48, D = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [8:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, expq;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0, collisions = 0;

  bram_1r1w #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // initialise
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = {$urandom, $urandom} & {W{1'b1}}; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      re = $urandom_range(0, 3) != 0;
      waddr = 9'($urandom_range(0, 15));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 9'($urandom_range(0, 15));
      wdata = {$urandom, $urandom} & {W{1'b1}};
      if (re) begin
        expq = (we && waddr == raddr) ? wdata : ref_mem[raddr];
        if (we && waddr == raddr) collisions++;
      end
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expq) begin
        failures++;
        $display("mismatch raddr=%0d got %h exp %h", raddr, rdata, expq);
      end
    end
    if (collisions == 0) failures++;
    $display("collisions=%0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
