// ssm_control: the control unit of a sub switching module. An eleven-state
// FSM sequences one packet session at one SE input port and drives the
// functional units (sensor, translator, router, request, timer) through a
// one-hot command bus; the units answer on a response bus.
//
// Session: READY waits for a request; ACKNOWLEDGE returns a two-cycle ACK;
// TRANSLATION takes the destination and builds the routing vector; ROUTING
// obtains an SE output port from the port selector; REQUEST raises the
// request to the next equipment and waits for its ACK; DESTINATION sends the
// destination and waits for the path-established ACK (held high) or a NACK;
// TRANSPORT replicates the data, SUSPEND holds while the next equipment has
// withdrawn its ACK; NEG_ACK returns a one-cycle NACK when no port is left;
// TERMINATION clears the units and returns to READY. A failed REQUEST or
// DESTINATION goes back to ROUTING to try the next alternate port. Whenever
// the preceding equipment drops its request during a session the FSM goes
// through TERMINATION to READY. IDLE is held while enable (the asynchronous
// reset) is low.
//
// The states, the transitions and the command of each state follow the
// document's state description and command table (functions A..M). Cells the
// table leaves as don't care are driven low, with one exception: F (send
// data) stays on in SUSPEND so that words already in flight drain to the
// next equipment while the preceding one stops sending. A congestion that
// outlasts timer C ends the session through NEG_ACK, which is this design's
// way of "terminating the session with signalling to the preceding
// equipment".
module ssm_control
  import iln_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ssm_rsp_t   rsp,
  output ssm_cmd_t   cmd,
  output ssm_state_t state
);

  ssm_state_t nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      ST_IDLE:        nxt = ST_READY;
      ST_READY:       if (rsp.req_arrived) nxt = ST_ACKNOWLEDGE;
      ST_ACKNOWLEDGE: if (rsp.ack_sent)    nxt = ST_TRANSLATION;
      ST_TRANSLATION: if (rsp.rv_ready)    nxt = ST_ROUTING;
      ST_ROUTING: begin
        if (rsp.port_granted) nxt = ST_REQUEST;
        else if (rsp.no_port) nxt = ST_NEG_ACK;
      end
      ST_REQUEST: begin
        if (rsp.next_ack)                        nxt = ST_DESTINATION;
        else if (rsp.next_nack || rsp.expired)   nxt = ST_ROUTING;
      end
      ST_DESTINATION: begin
        if (rsp.next_ack)                        nxt = ST_TRANSPORT;
        else if (rsp.next_nack || rsp.expired)   nxt = ST_ROUTING;
      end
      ST_TRANSPORT:   if (rsp.congested) nxt = ST_SUSPEND;
      ST_SUSPEND: begin
        if (!rsp.congested)   nxt = ST_TRANSPORT;
        else if (rsp.expired) nxt = ST_NEG_ACK;
      end
      ST_NEG_ACK:     nxt = ST_TERMINATION;
      ST_TERMINATION: nxt = ST_READY;
      default:        nxt = ST_IDLE;
    endcase

    // request withdrawn by the preceding equipment: end the session
    if (state inside {ST_ACKNOWLEDGE, ST_TRANSLATION, ST_ROUTING, ST_REQUEST,
                      ST_DESTINATION, ST_TRANSPORT, ST_SUSPEND} && !rsp.req_present)
      nxt = ST_TERMINATION;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= nxt;
  end

  // Command table: one row per state.
  always_comb begin
    cmd = '0;
    unique case (state)
      ST_IDLE:        cmd.clear = 1'b1;
      ST_READY:       cmd.m_sense_req = 1'b1;
      ST_ACKNOWLEDGE: begin cmd.j_send_ack = 1'b1; cmd.m_sense_req = 1'b1; end
      ST_TRANSLATION: begin cmd.h_make_rv  = 1'b1; cmd.m_sense_req = 1'b1; end
      ST_ROUTING: begin
        cmd.a_opsel_wait = 1'b1; cmd.e_seek_port = 1'b1; cmd.m_sense_req = 1'b1;
      end
      ST_REQUEST: begin
        cmd.b_next_wait = 1'b1; cmd.d_send_req = 1'b1; cmd.k_sense_next = 1'b1;
        cmd.m_sense_req = 1'b1;
      end
      ST_DESTINATION: begin
        cmd.c_dest_wait = 1'b1; cmd.d_send_req = 1'b1; cmd.g_send_dest = 1'b1;
        cmd.l_sense_path = 1'b1; cmd.m_sense_req = 1'b1;
      end
      ST_TRANSPORT: begin
        cmd.d_send_req = 1'b1; cmd.f_send_data = 1'b1; cmd.j_send_ack = 1'b1;
        cmd.l_sense_path = 1'b1; cmd.m_sense_req = 1'b1;
      end
      ST_SUSPEND: begin
        cmd.c_dest_wait = 1'b1; cmd.d_send_req = 1'b1; cmd.f_send_data = 1'b1;
        cmd.l_sense_path = 1'b1; cmd.m_sense_req = 1'b1;
      end
      ST_NEG_ACK:     cmd.i_send_nack = 1'b1;
      ST_TERMINATION: cmd.clear = 1'b1;
      default:        cmd.clear = 1'b1;
    endcase
  end

endmodule
