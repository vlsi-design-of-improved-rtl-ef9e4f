// opsel_outport: the access controller of one SE output port (OUTPORT).
//
// While the port is free it steps sel through the SSMs, one per clock cycle,
// so the selector samples their port requests in cyclic order. When the
// sampled SSM asks for this port (hit) the OUTPORT stops stepping, holds sel
// on that SSM and raises locked, which is the port grant. It stays locked
// until that SSM withdraws or changes its request; it then resumes the scan
// at the next SSM. A request for a port that is locked is ignored; the
// requesting SSM times out by itself.
//
// The cyclic sampling, the stop on a match and the grant are the document's.
// Resuming after the released owner (rather than at SSM 0) is this design's
// choice. Grant latency: one to SE_PORTS cycles after the request appears.
module opsel_outport
  import iln_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hit,
  output logic [1:0] sel,
  output logic       locked
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel    <= '0;
      locked <= 1'b0;
    end else if (!locked) begin
      if (hit) locked <= 1'b1;
      else     sel    <= sel + 2'd1;
    end else if (!hit) begin
      locked <= 1'b0;
      sel    <= sel + 2'd1;
    end
  end

endmodule
