// tb_ssm_sensor: drives the sensor's command bus directly and checks the
// signalling conventions: a two-cycle ACK pulse with ack_sent in its second
// cycle, a one-cycle NACK, ACK sensing (two high samples), NACK sensing
// (isolated one-cycle pulse, also right after a sensed ACK), pass-through of
// AckIn on a held path, congestion, and request arming.
module tb_ssm_sensor;
  import iln_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  ssm_cmd_t cmd;
  logic req_in, ack_in, ack_out, req_arrived, req_present, ack_sent, next_ack, next_nack, congested;
  ssm_sensor dut (.clk, .rst_n, .cmd, .req_in, .ack_in, .ack_out, .req_arrived, .req_present,
                  .ack_sent, .next_ack, .next_nack, .congested);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(); @(posedge clk); #1; endtask

  int hi, sent_at;
  initial begin
    cmd = '0; req_in = 0; ack_in = 0;
    step(); rst_n = 1; step();
    // request sensing: READY (M)
    cmd.m_sense_req = 1;
    check(!req_arrived, "no request yet");
    req_in = 1; #1;
    check(req_arrived && req_present, "request sensed");
    // ACKNOWLEDGE: J + M
    cmd.j_send_ack = 1;
    hi = 0; sent_at = -1;
    for (int c = 0; c < 6; c++) begin
      #1;
      if (ack_out) hi++;
      if (ack_sent && sent_at < 0) sent_at = c;
      if (ack_sent) cmd.j_send_ack = 0;   // FSM leaves on ack_sent
      step();
    end
    check(hi == 2, $sformatf("ACK pulse %0d cycles (2 expected)", hi));
    check(sent_at == 2, $sformatf("ack_sent in cycle %0d (2 expected)", sent_at));
    #1 check(!req_arrived, "request consumed, not sensed again while still high");
    // NACK: I for one cycle
    cmd = '0; cmd.i_send_nack = 1; #1;
    check(ack_out, "NACK high");
    step(); cmd = '0; #1;
    check(!ack_out, "NACK one cycle only");
    // request re-armed only after ReqIn low
    cmd.m_sense_req = 1; #1;
    check(!req_arrived, "stale request ignored");
    req_in = 0; step(); req_in = 1; #1;
    check(req_arrived, "new request after ReqIn low");

    // sensing an ACK: K, AckIn high for two cycles
    cmd = '0; cmd.k_sense_next = 1; step();
    ack_in = 1; step(); #1 check(!next_ack, "one high sample is no ACK");
    step(); #1 check(next_ack && !next_nack, "ACK sensed after two high samples");
    ack_in = 0; step(); #1 check(!next_ack && !next_nack, "registers cleared after ACK");
    step(); step(); #1 check(!next_nack, "no NACK from the tail of an ACK");
    // sensing a NACK: L, one-cycle pulse
    cmd = '0; cmd.l_sense_path = 1; step();
    ack_in = 1; step(); ack_in = 0; step(); #1;
    check(next_nack && !next_ack, "NACK sensed");
    // held path: J + L passes AckIn, congestion reported
    cmd = '0; cmd.j_send_ack = 1; cmd.l_sense_path = 1;
    ack_in = 1; #1 check(ack_out && !congested, "AckIn passed back");
    ack_in = 0; #1 check(!ack_out && congested, "congestion reported, AckOut low");
    cmd = '0; cmd.k_sense_next = 1; ack_in = 1; step(); cmd.clear = 1; step(); cmd.clear = 0; #1;
    check(!next_ack && !next_nack, "clear empties the sample registers");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
