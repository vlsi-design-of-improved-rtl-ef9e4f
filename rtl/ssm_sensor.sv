// ssm_sensor: the signalling unit of a sub switching module (SSM). It watches
// the request wire from the preceding equipment and the acknowledge wire from
// the next one, and drives the acknowledge wire back to the preceding one.
//
// Signalling conventions (from the document):
//   positive ACK sent  : AckOut high for two clock cycles (function J outside
//                        a held path); once the path is held (J with L) the
//                        next equipment's AckIn is passed straight back.
//   negative ACK sent  : AckOut high for one clock cycle (function I).
//   ACK sensed         : AckIn high in two consecutive samples; the two sample
//                        registers are then cleared.
//   NACK sensed        : sample register two = 1 and register one = 0, i.e. an
//                        isolated one-cycle pulse.
// The two-register pulse generator (one/two registers, output = one XOR two)
// and the two-register AckIn sampler follow the document's logic diagrams.
// Own choices: a new request is only accepted after ReqIn has been seen low
// since the last session (so a request still high after a NACK is not taken
// as a new one), the NACK pulse is driven for the single cycle the control
// FSM stays in NEG-ACK, and AckOut is combinational from the registers.
//
// Timing: ack_sent rises in the second cycle of the ACK pulse, so the FSM
// leaves ACKNOWLEDGE exactly when the pulse ends. next_ack/next_nack are
// valid one cycle after the last AckIn sample they depend on.
module ssm_sensor
  import iln_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,      // SSM enable, active low reset
  input  ssm_cmd_t cmd,
  input  logic     req_in,
  input  logic     ack_in,
  output logic     ack_out,
  output logic     req_arrived,
  output logic     req_present,
  output logic     ack_sent,
  output logic     next_ack,
  output logic     next_nack,
  output logic     congested
);

  logic armed;               // ReqIn seen low since the last session
  logic tx_one, tx_two;      // ACK pulse generator registers
  logic rx_one, rx_two;      // AckIn sample registers
  logic pulse_mode, sensing;

  assign pulse_mode = cmd.j_send_ack & ~cmd.l_sense_path;
  assign sensing    = cmd.k_sense_next | cmd.l_sense_path;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed  <= 1'b0;
      tx_one <= 1'b0;
      tx_two <= 1'b0;
      rx_one <= 1'b0;
      rx_two <= 1'b0;
    end else begin
      // request arming
      if (!req_in)          armed <= 1'b1;
      else if (pulse_mode)  armed <= 1'b0;

      // positive acknowledgment pulse: one gets 1 then 0, two follows one
      if (pulse_mode && !cmd.clear) begin
        tx_one <= ~(tx_one | tx_two);
        tx_two <= tx_one;
      end else begin
        tx_one <= 1'b0;
        tx_two <= 1'b0;
      end

      // acknowledgment sensing
      if (!sensing || cmd.clear || (rx_one && rx_two)) begin
        rx_one <= 1'b0;
        rx_two <= 1'b0;
      end else begin
        rx_one <= ack_in;
        rx_two <= rx_one;
      end
    end
  end

  assign req_present = req_in;
  assign req_arrived = cmd.m_sense_req & req_in & armed;
  assign ack_sent    = pulse_mode & ~tx_one & tx_two;
  assign next_ack    = sensing & rx_one & rx_two;
  assign next_nack   = sensing & rx_two & ~rx_one;
  assign congested   = cmd.l_sense_path & ~ack_in;

  assign ack_out = (pulse_mode & (tx_one ^ tx_two))
                 | (cmd.j_send_ack & cmd.l_sense_path & ack_in)
                 | cmd.i_send_nack;

endmodule
