// tb_sub_switching_module: one SSM between a preceding-equipment model and a
// next-equipment model, with a port-selector model that grants only the
// ports in gnt_ok. The next-equipment model can be made dead or refusing per
// output port. Checks, for an SSM in stage 1 row 0:
//   - a clean session 0 -> 7: state sequence, two-cycle ACK, first choice
//     cube 0, destination forwarded, data intact with one cycle of latency;
//   - port refused by the selector: cube 1 after timer A;
//   - dead next equipment: next port after timer B;
//   - NACK from the next equipment: next port at once;
//   - nothing works: every candidate tried, one-cycle NACK back;
//   - congestion: SUSPEND, AckOut low, packet still whole;
//   - a destination with rv = 000 goes straight.
module tb_sub_switching_module;
  import iln_pkg::*;
  localparam int T_OPSEL = 8, T_NEXT = 12;
  logic clk = 0, enable = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  fwd_t up, down;
  logic ack_out, ack_in, prt_gnt;
  prt_req_t prt_req;
  sub_switching_module #(.T_OPSEL(T_OPSEL), .T_NEXT(T_NEXT), .T_DEST(300)) dut (
    .clk, .enable, .addr_i(2'd1), .addr_j(3'd0),
    .req_in(up.req), .ack_out, .flag_in(up.flag), .data_in(up.data),
    .prt_req, .prt_gnt, .req_out(down.req), .ack_in,
    .flag_out(down.flag), .data_out(down.data)
  );

  // preceding equipment
  logic start = 0, busy, done, ok, nacked, tout;
  logic [2:0] dest; logic [15:0] len; logic [7:0] tag;
  int susp;
  tb_source u_src (.clk, .rst_n(enable), .start, .dest, .len, .tag, .src(8'd5), .fwd(up),
                   .ack(ack_out), .busy, .done, .ok, .nacked, .timed_out(tout), .suspends(susp));

  // port selector model: grant one cycle after a request for an allowed port
  logic [3:0] gnt_ok = 4'hF, dead = 0, refuse = 0;
  always_ff @(posedge clk) prt_gnt <= prt_req.valid && gnt_ok[prt_req.port] && enable;

  // next equipment
  int cong_at = -1, cong_len = 0, k_words, k_sess, k_congs;
  logic [31:0] k_dest, k_mem [64];
  tb_sink u_snk (.clk, .rst_n(enable), .fwd(down), .ack(ack_in), .mute(dead[prt_req.port]),
                 .refuse(refuse[prt_req.port]), .congest_at(cong_at), .congest_len(cong_len),
                 .dest_word(k_dest), .words(k_words), .sessions(k_sess), .congestions(k_congs),
                 .mem(k_mem));

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // monitors: state changes, ports sought, request times, AckOut runs
  ssm_state_t trace[$];
  int sought[$], asked[$], t_seek[$], runs[$];
  int cyc = 0, run = 0;
  logic req_q = 0, valid_q = 0, flag_q = 0;
  logic [31:0] data_q;
  int lat_errors = 0;
  ssm_state_t st_q = ST_IDLE;
  always @(posedge clk) begin
    cyc++;
    if (dut.state != st_q) trace.push_back(dut.state);
    st_q = dut.state;
    if (prt_req.valid && !valid_q) begin sought.push_back(int'(prt_req.port)); t_seek.push_back(cyc); end
    valid_q = prt_req.valid;
    if (down.req && !req_q) asked.push_back(int'(prt_req.port));
    req_q = down.req;
    if (ack_out) run++;
    else if (run > 0) begin runs.push_back(run); run = 0; end
    if (dut.state == ST_TRANSPORT && (down.flag != flag_q || (flag_q && down.data != data_q)))
      lat_errors++;
    flag_q = up.flag; data_q = up.data;
  end

  task automatic clear_mon();
    trace.delete(); sought.delete(); asked.delete(); t_seek.delete(); runs.delete(); lat_errors = 0;
  endtask

  task automatic session(input int d, input int l, input int t);
    int n = 0;
    clear_mon();
    dest = 3'(d); len = 16'(l); tag = 8'(t);
    start = 1; @(posedge clk); #1 start = 0;
    while (busy && n < 5000) begin @(posedge clk); n++; end
    repeat (6) @(posedge clk);
    if (run > 0) begin runs.push_back(run); run = 0; end
  endtask

  function automatic bit data_ok(input int t, input int l);
    if (k_words != l) return 0;
    for (int k = 0; k < l; k++) if (k_mem[k] != {8'(t), 8'd5, 16'(k)}) return 0;
    return 1;
  endfunction

  function automatic string qs(input int q[$]);
    string s = "";
    foreach (q[k]) s = {s, $sformatf("%0d ", q[k])};
    return s;
  endfunction

  ssm_state_t exp_trace[$];
  initial begin
    dest = 0; len = 0; tag = 0;
    repeat (3) @(posedge clk);
    #1 enable = 1;
    repeat (3) @(posedge clk);

    // clean session: 0 -> 7 at (1,0): rv = 111, first choice cube 0
    session(7, 8, 1);
    exp_trace = '{ST_ACKNOWLEDGE, ST_TRANSLATION, ST_ROUTING, ST_REQUEST,
                  ST_DESTINATION, ST_TRANSPORT, ST_TERMINATION, ST_READY};
    check(ok && !nacked, "clean session completed");
    check(trace == exp_trace, "state sequence ACKNOWLEDGE..TRANSPORT, TERMINATION, READY");
    if (trace != exp_trace) foreach (trace[k]) $display("  state %s", trace[k].name());
    check(runs.size() == 2 && runs[0] == 2, $sformatf("two-cycle ACK then the held path ACK (runs %s)", qs(runs)));
    check(sought.size() == 1 && sought[0] == 0, "first choice is cube 0");
    check(k_dest[2:0] == 3'd7 && k_dest[31:24] == 8'd0, "destination word forwarded");
    check(data_ok(1, 8), "data intact");
    check(lat_errors == 0, "data replicated one cycle later");

    // selector refuses cube 0: cube 1 after timer A
    gnt_ok = 4'b1110;
    session(7, 4, 2);
    check(ok && data_ok(2, 4), "session through cube 1");
    check(sought.size() == 2 && sought[0] == 0 && sought[1] == 1, $sformatf("sought %s", qs(sought)));
    check(t_seek.size() == 2 && t_seek[1] - t_seek[0] == T_OPSEL + 2,
          $sformatf("alternate after %0d cycles", t_seek.size() == 2 ? t_seek[1] - t_seek[0] : -1));
    gnt_ok = 4'hF;

    // dead next equipment on cube 0: cube 1 after timer B
    dead = 4'b0001;
    session(7, 4, 3);
    check(ok && data_ok(3, 4), "session around the dead link");
    check(asked.size() == 2 && asked[0] == 0 && asked[1] == 1, $sformatf("requested on %s", qs(asked)));
    dead = 0;

    // NACK from the next equipment on cube 0 and cube 1: cube 2
    refuse = 4'b0011;
    session(7, 4, 4);
    check(ok && data_ok(4, 4), "session after two NACKs");
    check(asked.size() == 3 && asked[2] == 2, $sformatf("requested on %s", qs(asked)));
    refuse = 0;

    // nothing works: all four candidates tried, one-cycle NACK
    dead = 4'b0101; refuse = 4'b1010;
    session(7, 4, 5);
    check(nacked && !ok, "NACK to the preceding equipment");
    check(asked.size() == 4 && asked[0] == 0 && asked[1] == 1 && asked[2] == 2 && asked[3] == 3,
          $sformatf("all candidates tried in order (%s)", qs(asked)));
    check(runs.size() == 2 && runs[0] == 2 && runs[1] == 1, $sformatf("ACK 2 cycles, NACK 1 cycle (runs %s)", qs(runs)));
    check(trace[trace.size() - 3] == ST_NEG_ACK, "NEG_ACK state visited");
    dead = 0; refuse = 0;

    // congestion: SUSPEND and AckOut low
    cong_at = 3; cong_len = 6;
    session(7, 12, 6);
    check(ok && data_ok(6, 12), "suspended packet whole");
    check(ST_SUSPEND inside {trace} && k_congs == 1, "SUSPEND visited");
    check(susp > 0, "preceding equipment held back");
    cong_at = -1;

    // rv = 000 goes straight (dest 0 at row 0)
    session(0, 3, 7);
    check(ok && sought.size() == 1 && sought[0] == 3 && data_ok(7, 3), "rv 000: straight port");

    // one-hot commands: rv 010 -> cube 1 first
    session(2, 3, 8);
    check(ok && sought[0] == 1, "rv 010: cube 1 first");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
