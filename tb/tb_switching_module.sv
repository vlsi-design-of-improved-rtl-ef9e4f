// tb_switching_module: the four SSMs of one SM, each between its own
// preceding-equipment model and next-equipment model, with a port-selector
// model that grants every request one cycle later. Four sessions run at the
// same time from SE(0,3); each SSM must choose the first port of its own
// routing vector and deliver its own packet. Then every SSM is used again
// with random destinations, and enable is dropped mid-session to check that
// it resets every SSM.
module tb_switching_module;
  import iln_pkg::*;
  logic clk = 0, enable = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  fwd_t [3:0] smi_fwd, ssm_fwd;
  logic [3:0] smi_ack, ssm_ack, prt_gnt;
  prt_req_t [3:0] prt_req;
  switching_module dut (.clk, .enable, .addr_i(2'd0), .addr_j(3'd3), .smi_fwd, .smi_ack,
                        .ssm_fwd, .ssm_ack, .prt_req, .prt_gnt);

  logic       start [4];
  logic [2:0] dest [4];
  logic       busy [4], done [4], ok [4], nacked [4], tout [4];
  int         susp [4], k_words [4], k_sess [4], k_congs [4];
  logic [31:0] k_dest [4], k_mem [4][64];
  int         first_port [4];
  logic       ssm_idle [4];
  for (genvar k = 0; k < 4; k++) begin : g_k
    tb_source u_src (.clk, .rst_n(enable), .start(start[k]), .dest(dest[k]), .len(16'd6),
                     .tag(8'(k + 16)), .src(8'(k)), .fwd(smi_fwd[k]), .ack(smi_ack[k]),
                     .busy(busy[k]), .done(done[k]), .ok(ok[k]), .nacked(nacked[k]),
                     .timed_out(tout[k]), .suspends(susp[k]));
    always_ff @(posedge clk) prt_gnt[k] <= prt_req[k].valid && enable;
    tb_sink u_snk (.clk, .rst_n(enable), .fwd(ssm_fwd[k]), .ack(ssm_ack[k]), .mute(1'b0),
                   .refuse(1'b0), .congest_at(-1), .congest_len(0), .dest_word(k_dest[k]),
                   .words(k_words[k]), .sessions(k_sess[k]), .congestions(k_congs[k]),
                   .mem(k_mem[k]));
    assign ssm_idle[k] = dut.g_ssm[k].u_ssm.u_control.state == ST_IDLE;
    logic v_q = 0;
    always @(posedge clk) begin
      if (prt_req[k].valid && !v_q && first_port[k] < 0) first_port[k] = int'(prt_req[k].port);
      v_q = prt_req[k].valid;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int first_choice(input int d);
    int rv = 3 ^ d;
    for (int p = 0; p < 3; p++) if (rv[p]) return p;
    return 3;
  endfunction

  task automatic all_four();
    int n = 0;
    for (int k = 0; k < 4; k++) begin first_port[k] = -1; start[k] = 1; end
    @(posedge clk); #1 for (int k = 0; k < 4; k++) start[k] = 0;
    while ((busy[0] || busy[1] || busy[2] || busy[3]) && n < 3000) begin @(posedge clk); n++; end
    repeat (4) @(posedge clk);
  endtask

  function automatic bit data_ok(input int k);
    if (k_words[k] != 6) return 0;
    for (int w = 0; w < 6; w++) if (k_mem[k][w] != {8'(k + 16), 8'(k), 16'(w)}) return 0;
    return 1;
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) begin start[k] = 0; first_port[k] = -1; end
    repeat (3) @(posedge clk);
    #1 enable = 1;
    repeat (3) @(posedge clk);
    dest = '{3, 2, 1, 7};
    all_four();
    for (int k = 0; k < 4; k++) begin
      check(ok[k] && data_ok(k), $sformatf("SSM %0d delivered its packet", k));
      check(first_port[k] == first_choice(dest[k]),
            $sformatf("SSM %0d to %0d: first port %0d (%0d expected)", k, dest[k], first_port[k], first_choice(dest[k])));
      check(k_dest[k][2:0] == dest[k], $sformatf("SSM %0d destination forwarded", k));
    end
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < 4; k++) dest[k] = 3'($urandom);
      all_four();
      for (int k = 0; k < 4; k++)
        check(ok[k] && data_ok(k) && first_port[k] == first_choice(dest[k]),
              $sformatf("round %0d SSM %0d", r, k));
    end
    // enable low resets every SSM
    for (int k = 0; k < 4; k++) start[k] = 1;
    @(posedge clk); #1 for (int k = 0; k < 4; k++) start[k] = 0;
    repeat (12) @(posedge clk);
    #1 enable = 0; #1;
    for (int k = 0; k < 4; k++)
      check(ssm_idle[k] && !ssm_fwd[k].req && !smi_ack[k],
            $sformatf("SSM %0d reset by enable", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
