// tb_ssm_timer: measures the cycles from switching a timed function on to
// expired for A, B and C, and checks that a start pulse and a change of
// function restart the count.
module tb_ssm_timer;
  import iln_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  ssm_cmd_t cmd;
  logic start, expired;
  ssm_timer #(.T_OPSEL(8), .T_NEXT(12), .T_DEST(40)) dut (.clk, .rst_n, .cmd, .start, .expired);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(); @(posedge clk); #1; endtask
  function automatic int measure_dummy(); return 0; endfunction
  int n;
  task automatic measure(input int which, output int cycles);
    cmd = '0; step();
    cmd = '0;
    if (which == 0) cmd.a_opsel_wait = 1; else if (which == 1) cmd.b_next_wait = 1; else cmd.c_dest_wait = 1;
    cycles = 0;
    while (!expired && cycles < 200) begin step(); cycles++; end
  endtask
  initial begin
    cmd = '0; start = 0;
    step(); rst_n = 1; step();
    measure(0, n); check(n == 9, $sformatf("A expires after %0d cycles (9 expected)", n));
    measure(1, n); check(n == 13, $sformatf("B expires after %0d cycles (13 expected)", n));
    measure(2, n); check(n == 41, $sformatf("C expires after %0d cycles (41 expected)", n));
    // restart by start pulse
    cmd = '0; step(); cmd.a_opsel_wait = 1;
    repeat (6) step();
    start = 1; step(); start = 0;
    n = 0; while (!expired && n < 200) begin step(); n++; end
    check(n == 8, $sformatf("restart: %0d more cycles (8 expected)", n));
    // function change restarts: A -> B
    cmd = '0; step(); cmd.a_opsel_wait = 1; repeat (6) step();
    cmd = '0; cmd.b_next_wait = 1;
    n = 0; while (!expired && n < 200) begin step(); n++; end
    check(n == 13, $sformatf("A->B restarts: %0d cycles (13 expected)", n));
    cmd = '0; #1 check(!expired, "no expiry without a timed function");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
