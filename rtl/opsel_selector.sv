// opsel_selector: the sampling multiplexer in front of one output port of the
// output port selector. The OUTPORT that owns it sets sel; the selector then
// presents that SSM's forward pipe (request, flag, data) and reports whether
// that SSM's port request is valid and names this output port.
//
// One selector per output port, as in the document's port selector diagram.
// Purely combinational.
module opsel_selector
  import iln_pkg::*;
#(
  parameter int unsigned MY_PORT = 0
) (
  input  logic [1:0]                sel,
  input  prt_req_t [SE_PORTS-1:0]   prt_req,
  input  fwd_t     [SE_PORTS-1:0]   ssm_fwd,
  output logic                      hit,
  output fwd_t                      fwd_sel
);

  prt_req_t r;

  assign r       = prt_req[sel];
  assign hit     = r.valid && (r.port == 2'(MY_PORT));
  assign fwd_sel = ssm_fwd[sel];

endmodule
