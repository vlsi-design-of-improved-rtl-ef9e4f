// tb_ssm_control: drives the response bus by hand and checks every
// transition of the eleven-state FSM and the command row of each state
// (functions A..M and clear), including the alternate-port loops from
// REQUEST and DESTINATION, the suspend/resume loop, the congestion time-out,
// and the termination on a withdrawn request from every session state.
module tb_ssm_control;
  import iln_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  ssm_rsp_t rsp;
  ssm_cmd_t cmd;
  ssm_state_t state;
  ssm_control dut (.clk, .rst_n, .rsp, .cmd, .state);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(); @(posedge clk); #1; endtask

  // expected command row: {clear, A, B, C, D, E, F, G, H, I, J, K, L, M}
  function automatic ssm_cmd_t row(input ssm_state_t s);
    ssm_cmd_t c = '0;
    case (s)
      ST_IDLE, ST_TERMINATION: c.clear = 1;
      ST_READY:       c.m_sense_req = 1;
      ST_ACKNOWLEDGE: begin c.j_send_ack = 1; c.m_sense_req = 1; end
      ST_TRANSLATION: begin c.h_make_rv = 1; c.m_sense_req = 1; end
      ST_ROUTING:     begin c.a_opsel_wait = 1; c.e_seek_port = 1; c.m_sense_req = 1; end
      ST_REQUEST:     begin c.b_next_wait = 1; c.d_send_req = 1; c.k_sense_next = 1; c.m_sense_req = 1; end
      ST_DESTINATION: begin c.c_dest_wait = 1; c.d_send_req = 1; c.g_send_dest = 1;
                            c.l_sense_path = 1; c.m_sense_req = 1; end
      ST_TRANSPORT:   begin c.d_send_req = 1; c.f_send_data = 1; c.j_send_ack = 1;
                            c.l_sense_path = 1; c.m_sense_req = 1; end
      ST_SUSPEND:     begin c.c_dest_wait = 1; c.d_send_req = 1; c.f_send_data = 1;
                            c.l_sense_path = 1; c.m_sense_req = 1; end
      ST_NEG_ACK:     c.i_send_nack = 1;
      default:        c.clear = 1;
    endcase
    return c;
  endfunction

  // apply a response for one cycle and check the next state and its command row
  task automatic go(input ssm_rsp_t r, input ssm_state_t exp, input string w);
    rsp = r; step();
    check(state == exp, $sformatf("%s: state %s (%s expected)", w, state.name(), exp.name()));
    check(cmd == row(state), $sformatf("%s: command row of %s", w, state.name()));
  endtask

  ssm_rsp_t r0, r;
  ssm_state_t sess[7];
  initial begin
    r0 = '0; r0.req_present = 1; rsp = '0;
    step();
    check(state == ST_IDLE && cmd == row(ST_IDLE), "IDLE during reset");
    rst_n = 1;
    go('0, ST_READY, "IDLE->READY");
    go('0, ST_READY, "READY waits");
    r = r0; r.req_arrived = 1; go(r, ST_ACKNOWLEDGE, "request");
    go(r0, ST_ACKNOWLEDGE, "ACK pulse in progress");
    r = r0; r.ack_sent = 1;    go(r, ST_TRANSLATION, "ACK sent");
    go(r0, ST_TRANSLATION, "waiting for the destination");
    r = r0; r.rv_ready = 1;    go(r, ST_ROUTING, "routing vector ready");
    go(r0, ST_ROUTING, "seeking a port");
    r = r0; r.port_granted = 1; go(r, ST_REQUEST, "port granted");
    r = r0; r.next_nack = 1;   go(r, ST_ROUTING, "NACK on request: alternate port");
    r = r0; r.port_granted = 1; go(r, ST_REQUEST, "second port");
    r = r0; r.expired = 1;     go(r, ST_ROUTING, "silence on request: alternate port");
    r = r0; r.port_granted = 1; go(r, ST_REQUEST, "third port");
    r = r0; r.next_ack = 1;    go(r, ST_DESTINATION, "next equipment acknowledged");
    r = r0; r.next_nack = 1;   go(r, ST_ROUTING, "NACK on destination");
    r = r0; r.port_granted = 1; go(r, ST_REQUEST, "fourth port");
    r = r0; r.next_ack = 1;    go(r, ST_DESTINATION, "ack");
    r = r0; r.expired = 1;     go(r, ST_ROUTING, "no path answer");
    r = r0; r.port_granted = 1; go(r, ST_REQUEST, "port");
    r = r0; r.next_ack = 1;    go(r, ST_DESTINATION, "ack");
    r = r0; r.next_ack = 1;    go(r, ST_TRANSPORT, "path established");
    go(r0, ST_TRANSPORT, "transport");
    r = r0; r.congested = 1;   go(r, ST_SUSPEND, "congestion");
    go(r, ST_SUSPEND, "still congested");
    go(r0, ST_TRANSPORT, "congestion over");
    r = r0; r.congested = 1;   go(r, ST_SUSPEND, "congestion again");
    r.expired = 1;             go(r, ST_NEG_ACK, "congestion too long");
    go('0, ST_TERMINATION, "NEG_ACK lasts one cycle");
    go('0, ST_READY, "TERMINATION -> READY");
    // no port at all
    r = r0; r.req_arrived = 1; go(r, ST_ACKNOWLEDGE, "request");
    r = r0; r.ack_sent = 1;    go(r, ST_TRANSLATION, "ack");
    r = r0; r.rv_ready = 1;    go(r, ST_ROUTING, "rv");
    r = r0; r.no_port = 1;     go(r, ST_NEG_ACK, "no port left");
    go('0, ST_TERMINATION, "terminate");
    go('0, ST_READY, "ready");
    // request withdrawn in every session state
    sess = '{ST_ACKNOWLEDGE, ST_TRANSLATION, ST_ROUTING, ST_REQUEST, ST_DESTINATION,
             ST_TRANSPORT, ST_SUSPEND};
    for (int k = 0; k < 7; k++) begin
      r = r0; r.req_arrived = 1; go(r, ST_ACKNOWLEDGE, "request");
      if (k >= 1) begin r = r0; r.ack_sent = 1; go(r, ST_TRANSLATION, "ack"); end
      if (k >= 2) begin r = r0; r.rv_ready = 1; go(r, ST_ROUTING, "rv"); end
      if (k >= 3) begin r = r0; r.port_granted = 1; go(r, ST_REQUEST, "port"); end
      if (k >= 4) begin r = r0; r.next_ack = 1; go(r, ST_DESTINATION, "ack"); end
      if (k >= 5) begin r = r0; r.next_ack = 1; go(r, ST_TRANSPORT, "path"); end
      if (k >= 6) begin r = r0; r.congested = 1; go(r, ST_SUSPEND, "congestion"); end
      r = '0; r.next_ack = 1; r.port_granted = 1;   // withdrawal wins over progress
      go(r, ST_TERMINATION, $sformatf("request withdrawn in %s", sess[k].name()));
      go('0, ST_READY, "back to READY");
    end
    // asynchronous reset
    r = r0; r.req_arrived = 1; go(r, ST_ACKNOWLEDGE, "request");
    #2 rst_n = 0; #1 check(state == ST_IDLE, "asynchronous reset to IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
