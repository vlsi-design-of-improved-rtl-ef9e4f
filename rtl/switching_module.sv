// switching_module (SM): the packet-switching part of a switching element. It
// holds one sub switching module (SSM) per SE input port; each SSM handles the
// sessions arriving on its port independently and reaches the SE outputs
// through the output port selector.
//
// Interface (per port k): smi_fwd[k]/smi_ack[k] is the SE input pipe
// (request, flag, 32-bit data in; acknowledge out). ssm_fwd[k]/ssm_ack[k],
// prt_req[k] and prt_gnt[k] form the 39-wire SM output pipe towards the port
// selector: the SSM's outgoing request, flag and data, the returning
// acknowledge, the 3-bit port request and the port grant. enable (from the
// address generator) resets every SSM while low. Structure follows the
// document's SM diagram.
module switching_module
  import iln_pkg::*;
#(
  parameter int unsigned T_OPSEL = 8,
  parameter int unsigned T_NEXT  = 12,
  parameter int unsigned T_DEST  = 2000
) (
  input  logic                    clk,
  input  logic                    enable,
  input  logic [1:0]              addr_i,
  input  logic [LOG_N-1:0]        addr_j,
  input  fwd_t     [SE_PORTS-1:0] smi_fwd,
  output logic     [SE_PORTS-1:0] smi_ack,
  output fwd_t     [SE_PORTS-1:0] ssm_fwd,
  input  logic     [SE_PORTS-1:0] ssm_ack,
  output prt_req_t [SE_PORTS-1:0] prt_req,
  input  logic     [SE_PORTS-1:0] prt_gnt
);

  for (genvar k = 0; k < SE_PORTS; k++) begin : g_ssm
    sub_switching_module #(.T_OPSEL(T_OPSEL), .T_NEXT(T_NEXT), .T_DEST(T_DEST)) u_ssm (
      .clk, .enable, .addr_i, .addr_j,
      .req_in(smi_fwd[k].req), .ack_out(smi_ack[k]),
      .flag_in(smi_fwd[k].flag), .data_in(smi_fwd[k].data),
      .prt_req(prt_req[k]), .prt_gnt(prt_gnt[k]),
      .req_out(ssm_fwd[k].req), .ack_in(ssm_ack[k]),
      .flag_out(ssm_fwd[k].flag), .data_out(ssm_fwd[k].data)
    );
  end

endmodule
