// tb_ssm_translator: checks the routing vector (addr_j XOR destination) for
// every row/destination pair, the one-cycle destination word with flag, its
// repetition on a new attempt, and the one-cycle data replication.
module tb_ssm_translator;
  import iln_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  ssm_cmd_t cmd;
  logic [2:0] addr_j, rv;
  logic flag_in, flag_out, rv_ready, dest_sent;
  logic [31:0] data_in, data_out;
  ssm_translator dut (.clk, .rst_n, .cmd, .addr_j, .flag_in, .data_in, .flag_out, .data_out,
                      .rv, .rv_ready, .dest_sent);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(); @(posedge clk); #1; endtask
  int nflag;
  initial begin
    cmd = '0; addr_j = 0; flag_in = 0; data_in = 0;
    step(); rst_n = 1;
    for (int j = 0; j < 8; j++) for (int d = 0; d < 8; d++) begin
      cmd = '0; cmd.clear = 1; step();
      cmd = '0; cmd.h_make_rv = 1; addr_j = 3'(j);
      step(); check(!rv_ready, "no vector without flag");
      flag_in = 1; data_in = 32'hA5000000 | d; step(); flag_in = 0; data_in = 32'h1;
      check(rv_ready && rv == 3'(j ^ d), $sformatf("rv for j=%0d d=%0d", j, d));
    end
    // destination send, twice (two attempts)
    for (int a = 0; a < 2; a++) begin
      cmd = '0; cmd.e_seek_port = 1; step();
      cmd = '0; cmd.g_send_dest = 1; nflag = 0;
      for (int c = 0; c < 5; c++) begin
        step();
        if (flag_out) begin nflag++; check(data_out == 32'hA5000007, "destination word"); end
      end
      check(nflag == 1, $sformatf("attempt %0d: destination flag %0d cycles (1 expected)", a, nflag));
      check(dest_sent, "dest_sent");
    end
    // data replication: one cycle latency
    cmd = '0; cmd.f_send_data = 1;
    for (int k = 0; k < 6; k++) begin
      flag_in = (k != 3); data_in = 32'h100 + k;
      @(posedge clk); #1;
      check(flag_out == (k != 3) && (!flag_out || data_out == 32'h100 + k),
            $sformatf("word %0d replicated one cycle later", k));
    end
    flag_in = 0; cmd = '0; cmd.clear = 1; step();
    check(!flag_out && !rv_ready && rv == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
