// ssm_timer: the delay unit of a sub switching module. It bounds how long the
// SSM waits for an answer, so that a faulty or busy neighbour cannot hold it.
//
//   A (opsel wait) : limit T_OPSEL cycles for a port grant from the OPSel
//   B (next wait)  : limit T_NEXT cycles for the next equipment's ACK
//   C (dest wait)  : limit T_DEST cycles for the path-established ACK, and
//                    for how long a congestion may suspend a transport
// The counter restarts whenever the set of active functions changes or on
// the start pulse (a new port attempt), counts while one of A, B, C is on,
// and raises expired once it reaches the active limit.
//
// The three functions are the document's; it gives no cycle counts, so the
// limits are this design's: T_OPSEL covers one full scan of the four-port
// selector, T_NEXT the two-cycle ACK of the next SE plus sensing, and T_DEST
// the worst-case path search of all downstream stages.
module ssm_timer
  import iln_pkg::*;
#(
  parameter int unsigned T_OPSEL = 8,
  parameter int unsigned T_NEXT  = 12,
  parameter int unsigned T_DEST  = 2000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ssm_cmd_t cmd,
  input  logic     start,
  output logic     expired
);

  localparam int unsigned CW = $clog2(T_DEST + 2);

  logic [2:0]    fn, fn_q;
  logic [CW-1:0] cnt;
  logic [CW-1:0] limit;

  assign fn = {cmd.a_opsel_wait, cmd.b_next_wait, cmd.c_dest_wait};

  always_comb begin
    if (cmd.a_opsel_wait)     limit = CW'(T_OPSEL);
    else if (cmd.b_next_wait) limit = CW'(T_NEXT);
    else                      limit = CW'(T_DEST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fn_q <= '0;
    end else begin
      fn_q <= fn;
      if (cmd.clear || start || fn != fn_q || fn == '0) cnt <= '0;
      else if (cnt != limit)                            cnt <= cnt + 1'b1;
    end
  end

  assign expired = (fn != '0) && (fn == fn_q) && !start && (cnt == limit);

endmodule
