// switching_element (SE): the 4x4 crossbar switching processor from which the
// ILN network is built. Output ports 0, 1 and 2 lead to the 0-, 1- and 2-cube
// neighbours in the next stage, output port 3 is the straight link.
//
// Three parts:
//   address_generator    - finds the SE's (i, j) location from the preceding
//                          SE's address outputs, passes its own address and
//                          reset on, and raises the internal enable after the
//                          network-wide initialisation delay;
//   switching_module     - one SSM per input port, doing path establishment
//                          and cell transfer with the bit-wise routing
//                          algorithm;
//   output_port_selector - grants output ports to SSMs and resolves
//                          contention.
// The address seen by the switching module is i = addr_iv[2:1] and
// j = addr_jb, as in the document.
//
// Interface: reset_n is the asynchronous active-low reset from the preceding
// SE's reset_bar (or from the network reset for SE(0,0)); sign = 1 marks
// SE(0,0). Each SEI/SEO port is a 35-wire pipe, split here into a forward
// struct (request, flag, data) and a backward acknowledge bit.
module switching_element
  import iln_pkg::*;
#(
  parameter int unsigned NET_SIZE = N_SE,
  parameter int unsigned ROWS     = N_PORTS,
  parameter int unsigned T_OPSEL  = 8,
  parameter int unsigned T_NEXT   = 12,
  parameter int unsigned T_DEST   = 2000
) (
  input  logic                    clk,
  input  logic                    reset_n,
  input  logic                    sign,
  input  logic [2:0]              addr_i,
  input  logic [2:0]              addr_j,
  input  fwd_t     [SE_PORTS-1:0] sei_fwd,
  output logic     [SE_PORTS-1:0] sei_ack,
  output fwd_t     [SE_PORTS-1:0] seo_fwd,
  input  logic     [SE_PORTS-1:0] seo_ack,
  output logic [2:0]              addr_ih,
  output logic [2:0]              addr_iv,
  output logic [2:0]              addr_jb,
  output logic                    reset_bar
);

  logic                    enable;
  fwd_t     [SE_PORTS-1:0] ssm_fwd;
  logic     [SE_PORTS-1:0] ssm_ack;
  prt_req_t [SE_PORTS-1:0] prt_req;
  logic     [SE_PORTS-1:0] prt_gnt;

  address_generator #(.NET_SIZE(NET_SIZE), .ROWS(ROWS)) u_addgen (
    .clk, .reset_n, .sign, .addr_i_in(addr_i), .addr_j_in(addr_j),
    .enable, .reset_bar, .addr_ih, .addr_iv, .addr_jb
  );

  switching_module #(.T_OPSEL(T_OPSEL), .T_NEXT(T_NEXT), .T_DEST(T_DEST)) u_sm (
    .clk, .enable, .addr_i(addr_iv[2:1]), .addr_j(addr_jb),
    .smi_fwd(sei_fwd), .smi_ack(sei_ack),
    .ssm_fwd, .ssm_ack, .prt_req, .prt_gnt
  );

  output_port_selector u_opsel (
    .clk, .enable, .prt_req, .prt_gnt, .ssm_fwd, .ssm_ack,
    .seo_fwd, .seo_ack
  );

endmodule
