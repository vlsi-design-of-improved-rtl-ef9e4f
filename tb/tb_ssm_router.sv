// tb_ssm_router: for every routing vector in a middle stage and in the last
// stage, refuses every port (by time-out) and checks the order in which the
// router asks for ports against the bit-wise routing order (cube ports with
// a 1 in the routing vector, lowest first, then straight; last stage: straight
// only when the vector is zero), and that no_port follows the last candidate.
// Then checks a grant, the hold of the port outside routing, and the move to
// the next candidate after a failed path.
module tb_ssm_router;
  import iln_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  ssm_cmd_t cmd;
  logic [2:0] rv;
  logic [1:0] addr_i;
  logic prt_gnt, expired, new_attempt, port_granted, no_port;
  prt_req_t prt_req;
  ssm_router dut (.clk, .rst_n, .cmd, .rv, .addr_i, .prt_gnt, .expired, .prt_req,
                  .new_attempt, .port_granted, .no_port);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(); @(posedge clk); #1; endtask

  // reference order as a list of ports
  function automatic int ref_order(input logic [2:0] v, input logic [1:0] st, output int ord[4]);
    int n = 0;
    if (st == 3) begin
      if (v == 0) begin ord[0] = 3; n = 1; end
    end else begin
      for (int p = 0; p < 3; p++) if (v[p]) begin ord[n] = p; n++; end
      ord[n] = 3; n++;
    end
    return n;
  endfunction

  int ord[4], nref, got[8], ngot, guard;
  bit stuck;
  initial begin
    cmd = '0; rv = 0; addr_i = 0; prt_gnt = 0; expired = 0;
    step(); rst_n = 1; step();
    for (int st = 0; st < 4; st++) for (int v = 0; v < 8; v++) begin
      cmd = '0; cmd.clear = 1; step();
      rv = 3'(v); addr_i = 2'(st); cmd = '0; cmd.e_seek_port = 1;
      nref = ref_order(3'(v), 2'(st), ord);
      ngot = 0; guard = 0;
      #1;
      while (!no_port && guard < 50) begin
        if (new_attempt) check(!prt_req.valid, "request raised after the attempt pulse");
        step(); guard++;
        if (prt_req.valid) begin
          if (ngot < 8) got[ngot] = int'(prt_req.port);
          ngot++;
          expired = 1; step(); expired = 0;   // refuse: time-out
          check(!prt_req.valid, "request dropped after time-out");
        end
        #1;
      end
      check(no_port, $sformatf("stage %0d rv=%03b: no_port at the end", st, v));
      stuck = (ngot != nref);
      for (int k = 0; k < nref && !stuck; k++) if (got[k] != ord[k]) stuck = 1;
      check(!stuck, $sformatf("stage %0d rv=%03b: %0d ports tried, order as the algorithm", st, v, ngot));
    end
    // grant and hold
    cmd = '0; cmd.clear = 1; step();
    rv = 3'b110; addr_i = 1; cmd = '0; cmd.e_seek_port = 1;
    step();
    check(prt_req.valid && prt_req.port == 1, "first choice cube 1");
    prt_gnt = 1; #1 check(port_granted, "grant seen");
    step(); cmd = '0;  // FSM leaves routing
    repeat (5) begin step(); check(prt_req.valid && prt_req.port == 1, "port held outside routing"); end
    // failed path: back to routing
    cmd.e_seek_port = 1; step(); prt_gnt = 0;
    check(!prt_req.valid, "held port released for one cycle");
    step(); check(prt_req.valid && prt_req.port == 2, "next candidate cube 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
