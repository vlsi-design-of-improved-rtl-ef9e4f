// output_port_selector (OPSel): connects the four SSMs of a switching element
// to its four output ports and resolves contention between SSMs that want the
// same port.
//
// Each output port has a selector (opsel_selector) and an access controller
// (opsel_outport). The controller scans the SSMs cyclically; the first SSM
// found asking for the port gets it (prt_gnt) and its 34 forward wires
// (request, flag, data) are switched to the port, while the port's backward
// acknowledge wire is switched to that SSM's ack input. A free port drives
// zeros. One SSM holds at most one port at a time.
//
// Interface: per SSM a port request {valid, port[1:0]}, a grant and the
// forward/backward pipe; per output port the forward/backward pipe. The grant
// is registered; data and acknowledge pass through combinationally once the
// port is locked. Structure follows the document's port selector diagram.
module output_port_selector
  import iln_pkg::*;
(
  input  logic                      clk,
  input  logic                      enable,
  input  prt_req_t [SE_PORTS-1:0]   prt_req,
  output logic     [SE_PORTS-1:0]   prt_gnt,
  input  fwd_t     [SE_PORTS-1:0]   ssm_fwd,
  output logic     [SE_PORTS-1:0]   ssm_ack,
  output fwd_t     [SE_PORTS-1:0]   seo_fwd,
  input  logic     [SE_PORTS-1:0]   seo_ack
);

  logic [SE_PORTS-1:0][1:0] sel;
  logic [SE_PORTS-1:0]      locked;
  logic [SE_PORTS-1:0]      hit;
  fwd_t [SE_PORTS-1:0]      fwd_sel;

  for (genvar o = 0; o < SE_PORTS; o++) begin : g_port
    opsel_selector #(.MY_PORT(o)) u_selector (
      .sel(sel[o]), .prt_req, .ssm_fwd, .hit(hit[o]), .fwd_sel(fwd_sel[o])
    );
    opsel_outport u_outport (
      .clk, .rst_n(enable), .hit(hit[o]), .sel(sel[o]), .locked(locked[o])
    );
    assign seo_fwd[o] = locked[o] ? fwd_sel[o] : '0;
  end

  always_comb begin
    prt_gnt = '0;
    ssm_ack = '0;
    for (int o = 0; o < SE_PORTS; o++) begin
      if (locked[o]) begin
        prt_gnt[sel[o]] = 1'b1;
        ssm_ack[sel[o]] = seo_ack[o];
      end
    end
  end

  // An SSM asks for one port, so no two ports may be locked to the same SSM.
  for (genvar a = 0; a < SE_PORTS; a++) begin : g_chk
    for (genvar b = a + 1; b < SE_PORTS; b++) begin : g_pair
      a_one_port_per_ssm: assert property (@(posedge clk) disable iff (!enable)
        !(locked[a] && locked[b] && sel[a] == sel[b]));
    end
  end

endmodule
