// tb_dmem_write_arbiter: all combinations of host, local and remote requests
// with random addresses and data; checks the fixed priority
// host > local > remote, the grants and the selected write.
module tb_dmem_write_arbiter;
  import remorph_pkg::*;
  wr_t host_wr, local_wr, remote_wr;
  logic local_gnt, remote_gnt, we;
  daddr_t waddr;
  word_t wdata;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dmem_write_arbiter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 800; n++) begin
      host_wr   = '{valid: n[0], addr: daddr_t'($urandom), data: word_t'({$urandom, $urandom})};
      local_wr  = '{valid: n[1], addr: daddr_t'($urandom), data: word_t'({$urandom, $urandom})};
      remote_wr = '{valid: n[2], addr: daddr_t'($urandom), data: word_t'({$urandom, $urandom})};
      #1;
      checks += 3;
      if (we !== (n[0] | n[1] | n[2])) failures++;
      if (local_gnt !== (!n[0] && n[1])) failures++;
      if (remote_gnt !== (!n[0] && !n[1] && n[2])) failures++;
      if (we) begin
        checks++;
        if (n[0]) begin
          if (waddr !== host_wr.addr || wdata !== host_wr.data) failures++;
        end else if (n[1]) begin
          if (waddr !== local_wr.addr || wdata !== local_wr.data) failures++;
        end else begin
          if (waddr !== remote_wr.addr || wdata !== remote_wr.data) failures++;
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
