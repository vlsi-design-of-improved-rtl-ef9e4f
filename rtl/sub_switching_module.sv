// sub_switching_module (SSM): switches the packets arriving at one input port
// of a switching element. One SSM sits behind each SE input port.
//
// It is a small processor split into a control unit (ssm_control, an
// eleven-state FSM) and functional units that obey its one-hot commands:
//   sensor     - request, ACK and NACK signalling (ssm_sensor)
//   translator - destination capture, routing vector, data path (ssm_translator)
//   router     - output-port requests to the port selector (ssm_router)
//   timer      - response time-outs (ssm_timer)
//   request    - the ReqOut register, set by command D and cleared otherwise;
//                it is a single flip-flop and lives in this module.
//
// Port handshake (preceding equipment -> SSM -> next equipment):
//   1. ReqIn rises and stays high for the whole session.
//   2. AckOut pulses high for two cycles: this SSM is available.
//   3. The preceding equipment sends the destination word with FlagIn.
//   4. The SSM gets an output port from the selector, raises ReqOut, waits
//      for the next equipment's two-cycle ACK, sends the destination with
//      FlagOut, and waits for the next equipment to hold AckIn high (path
//      established) or to pulse it for one cycle (NACK). On NACK or silence
//      it tries the next port; with none left it pulses AckOut for one cycle.
//   5. Path established: AckOut follows AckIn and FlagIn/DataIn are
//      replicated on FlagOut/DataOut one cycle later. AckIn low suspends
//      (AckOut low) until AckIn returns.
//   6. ReqIn falls: the SSM drops ReqOut and returns to READY.
// The ports and the sequence are the document's; the cycle-level timing of
// each step is this design's.
module sub_switching_module
  import iln_pkg::*;
#(
  parameter int unsigned T_OPSEL = 8,
  parameter int unsigned T_NEXT  = 12,
  parameter int unsigned T_DEST  = 2000
) (
  input  logic              clk,
  input  logic              enable,     // from the address generator; low = reset
  input  logic [1:0]        addr_i,
  input  logic [LOG_N-1:0]  addr_j,
  input  logic              req_in,
  output logic              ack_out,
  input  logic              flag_in,
  input  logic [DATA_W-1:0] data_in,
  output prt_req_t          prt_req,
  input  logic              prt_gnt,
  output logic              req_out,
  input  logic              ack_in,
  output logic              flag_out,
  output logic [DATA_W-1:0] data_out
);

  ssm_cmd_t         cmd;
  ssm_rsp_t         rsp;
  ssm_state_t       state;
  logic [LOG_N-1:0] rv;
  logic             new_attempt;

  ssm_control u_control (
    .clk, .rst_n(enable), .rsp, .cmd, .state
  );

  ssm_sensor u_sensor (
    .clk, .rst_n(enable), .cmd, .req_in, .ack_in, .ack_out,
    .req_arrived(rsp.req_arrived), .req_present(rsp.req_present),
    .ack_sent(rsp.ack_sent), .next_ack(rsp.next_ack), .next_nack(rsp.next_nack),
    .congested(rsp.congested)
  );

  ssm_translator u_translator (
    .clk, .rst_n(enable), .cmd, .addr_j, .flag_in, .data_in, .flag_out, .data_out,
    .rv, .rv_ready(rsp.rv_ready), .dest_sent(rsp.dest_sent)
  );

  ssm_router u_router (
    .clk, .rst_n(enable), .cmd, .rv, .addr_i, .prt_gnt, .expired(rsp.expired),
    .prt_req, .new_attempt, .port_granted(rsp.port_granted), .no_port(rsp.no_port)
  );

  ssm_timer #(.T_OPSEL(T_OPSEL), .T_NEXT(T_NEXT), .T_DEST(T_DEST)) u_timer (
    .clk, .rst_n(enable), .cmd, .start(new_attempt), .expired(rsp.expired)
  );

  // Request unit (function D).
  always_ff @(posedge clk or negedge enable) begin
    if (!enable) req_out <= 1'b0;
    else         req_out <= cmd.d_send_req & ~cmd.clear;
  end

  // A request may only go out on a port that the selector holds for us.
  a_req_needs_port: assert property (@(posedge clk) disable iff (!enable)
    req_out |-> prt_req.valid);

endmodule
