// ssm_router: picks the SE output port for a packet and asks the output port
// selector (OPSel) for it, moving on to an alternate port when the one it
// wants is refused or leads nowhere.
//
// Candidate ports, in the order they are tried (bit-wise routing algorithm):
//   - the cube ports p whose routing-vector bit rv[p] is 1, lowest p first;
//     each of them corrects one mismatching address bit;
//   - then the straight port, which leaves the mismatch to later stages.
// In the last stage (addr_i = N_STAGES-1) only the straight port is sought,
// and only when rv = 0; otherwise there is no candidate. A port is tried once
// per packet. The intelligent-routing extension of the algorithm (setting
// extra rv bits) is not built, as in the document's own design.
//
// Handshake with the OPSel: prt_req = {valid, port}. While the control FSM
// issues E (seek port) the router is in one of three steps:
//   IDLE : choose the next candidate, raise prt_req, pulse new_attempt (timer
//          restart); with no candidate left, raise no_port.
//   SEEK : prt_gnt -> port_granted, go to HELD; timer expired -> drop the
//          request and go back to IDLE.
//   HELD : the port was granted but the path failed; on re-entering routing
//          the port is released for one cycle and the next candidate follows.
// prt_req stays valid outside routing while HELD, so the path is kept through
// request, destination and transport. clear empties everything.
//
// The candidate order is the document's; its first-choice example (000 to
// 111: cube 0, cube 1, cube 2, then straight) sets it. Trying the straight
// port as the last alternate follows the document's fault-tolerance
// demonstration; never trying a cube port whose rv bit is 0 is this design's
// reading of "without the intelligent routing technique".
module ssm_router
  import iln_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ssm_cmd_t         cmd,
  input  logic [LOG_N-1:0] rv,
  input  logic [1:0]       addr_i,
  input  logic             prt_gnt,
  input  logic             expired,
  output prt_req_t         prt_req,
  output logic             new_attempt,
  output logic             port_granted,
  output logic             no_port
);

  typedef enum logic [1:0] {R_IDLE, R_SEEK, R_HELD} r_step_t;

  r_step_t              step;
  logic [SE_PORTS-1:0]  tried;
  logic [1:0]           port_q;
  logic [SE_PORTS-1:0]  cand;
  logic                 have_cand;
  logic [1:0]           next_port;

  always_comb begin
    cand = '0;
    if (addr_i == 2'(N_STAGES - 1)) begin
      cand[STRAIGHT] = (rv == '0);
    end else begin
      cand[LOG_N-1:0] = rv;
      cand[STRAIGHT]  = 1'b1;
    end
    cand = cand & ~tried;

    have_cand = |cand;
    next_port = '0;
    for (int p = SE_PORTS - 1; p >= 0; p--)
      if (cand[p]) next_port = 2'(p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step   <= R_IDLE;
      tried  <= '0;
      port_q <= '0;
    end else if (cmd.clear) begin
      step   <= R_IDLE;
      tried  <= '0;
      port_q <= '0;
    end else if (cmd.e_seek_port) begin
      unique case (step)
        R_IDLE: if (have_cand) begin
          port_q            <= next_port;
          tried[next_port]  <= 1'b1;
          step              <= R_SEEK;
        end
        R_SEEK: begin
          if (prt_gnt)      step <= R_HELD;
          else if (expired) step <= R_IDLE;
        end
        R_HELD: step <= R_IDLE;
        default: step <= R_IDLE;
      endcase
    end
  end

  assign prt_req.valid = (step == R_SEEK) || (step == R_HELD);
  assign prt_req.port  = port_q;
  assign new_attempt   = cmd.e_seek_port && step == R_IDLE && have_cand;
  assign no_port       = cmd.e_seek_port && step == R_IDLE && !have_cand;
  assign port_granted  = cmd.e_seek_port && step == R_SEEK && prt_gnt;

endmodule
