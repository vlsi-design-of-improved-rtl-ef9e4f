// iln_network: an 8 x 8 Improved Logical Neighborhood (ILN) switch fabric.
//
// The fabric is a multistage interconnection network of n+1 = 4 stages, each
// a column of N = 8 switching elements (SE). SE(i, j) output port p (p = 0..2)
// feeds the p-cube neighbour SE(i+1, j ^ 2^p) and output port 3 feeds the
// straight neighbour SE(i+1, j), so consecutive stages differ in at most one
// row-address bit. A packet from network input j enters SE(0, j) on its input
// port 0 and leaves SE(3, y) on its output port 3 to network output y. Every
// SE routes with the bit-wise routing algorithm: it prefers the cube links
// that correct a differing address bit and falls back to other links when a
// port is busy, a link or SE does not answer, or the next SE reports failure,
// giving up to n! distinct paths between an input and an output. No packet
// is buffered inside the fabric; sessions are circuit-like (path establishment
// then cell transfer).
//
// Initialisation: reset_n (asynchronous, active low) goes only to SE(0,0),
// whose sign input is tied high. Each SE computes its own (i, j) and passes
// address and reset on: the top row SE(i,0) feeds SE(i+1,0) through its
// horizontal outputs (addr_ih, addr_jb, reset_bar); every SE(i,j) feeds
// SE(i,j+1) below it through its vertical outputs (addr_iv, addr_jb,
// reset_bar). All SEs are switching about 100 cycles after reset_n rises;
// the fabric's users should wait 120 cycles, the document's figure.
//
// Input port wiring inside the fabric: SE(i+1, k) input port p (p = 0..2)
// receives the p-cube link from SE(i, k ^ 2^p), input port 3 the straight
// link from SE(i, k). The document's network drawing gives the links but not
// this port numbering, which is therefore this design's choice.
//
// Ports: nin_fwd/nin_ack and nout_fwd/nout_ack are the network's input and
// output pipes (request, flag, 32-bit data forward, acknowledge backward).
// link_fault[i][j][p] is a test input that is not part of the document's
// interface: when set, the link from SE(i,j) output p is cut in both
// directions, modelling a faulty link or a dead next SE. Tie it to zero in
// normal use.
//
// Timing: the acknowledge of an established path is passed back
// combinationally through every SE on the path (output port selector, then
// sensor), so ack has a combinational path from nout_ack to nin_ack across
// the four stages; request, flag and data take one register per SE. A lint
// tool that treats the sei_ack array as one signal reports it as circular
// logic; there is no loop, since each stage's ack depends only on the next
// stage's.
module iln_network
  import iln_pkg::*;
#(
  parameter int unsigned T_OPSEL = 8,
  parameter int unsigned T_NEXT  = 12,
  parameter int unsigned T_DEST  = 2000
) (
  input  logic                                            clk,
  input  logic                                            reset_n,
  input  fwd_t [N_PORTS-1:0]                              nin_fwd,
  output logic [N_PORTS-1:0]                              nin_ack,
  output fwd_t [N_PORTS-1:0]                              nout_fwd,
  input  logic [N_PORTS-1:0]                              nout_ack,
  input  logic [N_STAGES-2:0][N_PORTS-1:0][SE_PORTS-1:0]  link_fault
);

  // per-SE signals, indexed [stage][row]
  fwd_t [SE_PORTS-1:0] sei_fwd [N_STAGES][N_PORTS];
  logic [SE_PORTS-1:0] sei_ack [N_STAGES][N_PORTS];
  fwd_t [SE_PORTS-1:0] seo_fwd [N_STAGES][N_PORTS];
  logic [SE_PORTS-1:0] seo_ack [N_STAGES][N_PORTS];
  logic [2:0]          a_ih    [N_STAGES][N_PORTS];
  logic [2:0]          a_iv    [N_STAGES][N_PORTS];
  logic [2:0]          a_jb    [N_STAGES][N_PORTS];
  logic                rst_bar [N_STAGES][N_PORTS];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    for (genvar j = 0; j < N_PORTS; j++) begin : g_row
      logic       se_reset_n, se_sign;
      logic [2:0] se_ai, se_aj;

      // address and reset chain
      if (i == 0 && j == 0) begin : g_origin
        assign se_reset_n = reset_n;
        assign se_sign    = 1'b1;
        assign se_ai      = '0;
        assign se_aj      = '0;
      end else if (j == 0) begin : g_from_left
        assign se_reset_n = rst_bar[i-1][0];
        assign se_sign    = 1'b0;
        assign se_ai      = a_ih[i-1][0];
        assign se_aj      = a_jb[i-1][0];
      end else begin : g_from_above
        assign se_reset_n = rst_bar[i][j-1];
        assign se_sign    = 1'b0;
        assign se_ai      = a_iv[i][j-1];
        assign se_aj      = a_jb[i][j-1];
      end

      // packet links into this SE
      if (i == 0) begin : g_first
        always_comb begin
          sei_fwd[i][j]    = '0;
          sei_fwd[i][j][0] = nin_fwd[j];
        end
        assign nin_ack[j] = sei_ack[i][j][0];
      end else begin : g_inner
        for (genvar p = 0; p < SE_PORTS; p++) begin : g_in
          localparam int unsigned SRC = (p == STRAIGHT) ? j : (j ^ (1 << p));
          assign sei_fwd[i][j][p] = link_fault[i-1][SRC][p] ? '0 : seo_fwd[i-1][SRC][p];
        end
      end

      // acknowledge returning to this SE's outputs
      if (i == N_STAGES - 1) begin : g_last
        always_comb begin
          seo_ack[i][j]           = '0;
          seo_ack[i][j][STRAIGHT] = nout_ack[j];
        end
        assign nout_fwd[j] = seo_fwd[i][j][STRAIGHT];
      end else begin : g_mid
        for (genvar p = 0; p < SE_PORTS; p++) begin : g_out
          localparam int unsigned DST = (p == STRAIGHT) ? j : (j ^ (1 << p));
          assign seo_ack[i][j][p] = link_fault[i][j][p] ? 1'b0 : sei_ack[i+1][DST][p];
        end
      end

      switching_element #(.T_OPSEL(T_OPSEL), .T_NEXT(T_NEXT), .T_DEST(T_DEST)) u_se (
        .clk, .reset_n(se_reset_n), .sign(se_sign), .addr_i(se_ai), .addr_j(se_aj),
        .sei_fwd(sei_fwd[i][j]), .sei_ack(sei_ack[i][j]),
        .seo_fwd(seo_fwd[i][j]), .seo_ack(seo_ack[i][j]),
        .addr_ih(a_ih[i][j]), .addr_iv(a_iv[i][j]), .addr_jb(a_jb[i][j]),
        .reset_bar(rst_bar[i][j])
      );
    end
  end

endmodule
