// address_generator: works out where its switching element sits in the ILN
// network, passes that location on to the neighbouring SEs, and enables the
// rest of the SE once the whole network has had time to do the same.
//
// Operation (follows the address generator flow diagram): while reset_n is
// low everything is cleared. After reset_n rises the block takes three clock
// cycles:
//   1. capture sign, addr_i_in and addr_j_in;
//   2. compute (i, j): sign = 1 gives (0, 0); otherwise i = addr_i_in[2:1]
//      and j = addr_j_in, then addr_i_in[0] = 1 (preceding SE is the vertical
//      neighbour, same stage) increments j, addr_i_in[0] = 0 (preceding SE is
//      the horizontal neighbour, previous stage) increments i;
//   3. drive addr_ih = {i,0}, addr_iv = {i,1}, addr_jb = j and raise
//      reset_bar, which is the reset_n of the next SE in the chain.
// It then waits DELAY = 3 * (NET_SIZE - location) cycles, location = i*ROWS+j,
// before raising enable for the switching module and the port selector.
//
// The formula, the three-cycle figure and the address formats are the
// document's. The exact per-cycle split of the three steps and numbering the
// SE location row-major as i*ROWS + j are this design's choices.
//
// Interface: reset_n is asynchronous and active low; all else is synchronous
// to the rising edge of clk. Outputs hold until the next reset.
module address_generator #(
  parameter int unsigned NET_SIZE = 32,  // SEs in the network
  parameter int unsigned ROWS     = 8    // SEs per stage
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       sign,
  input  logic [2:0] addr_i_in,
  input  logic [2:0] addr_j_in,
  output logic       enable,
  output logic       reset_bar,
  output logic [2:0] addr_ih,
  output logic [2:0] addr_iv,
  output logic [2:0] addr_jb
);

  typedef enum logic [1:0] {AG_CAPTURE, AG_COMPUTE, AG_PUBLISH, AG_WAIT} ag_step_t;

  localparam int unsigned DW = $clog2(3 * NET_SIZE + 1) + 1;

  ag_step_t       step;
  logic           sign_q;
  logic [2:0]     ai_q, aj_q;
  logic [1:0]     i_q;
  logic [2:0]     j_q;
  logic [DW-1:0]  delay_q;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      step      <= AG_CAPTURE;
      sign_q    <= 1'b0;
      ai_q      <= '0;
      aj_q      <= '0;
      i_q       <= '0;
      j_q       <= '0;
      delay_q   <= '0;
      reset_bar <= 1'b0;
      enable    <= 1'b0;
    end else begin
      unique case (step)
        AG_CAPTURE: begin
          sign_q <= sign;
          ai_q   <= addr_i_in;
          aj_q   <= addr_j_in;
          step   <= AG_COMPUTE;
        end
        AG_COMPUTE: begin
          if (sign_q) begin
            i_q <= '0;
            j_q <= '0;
          end else if (ai_q[0]) begin
            i_q <= ai_q[2:1];
            j_q <= aj_q + 3'd1;
          end else begin
            i_q <= ai_q[2:1] + 2'd1;
            j_q <= aj_q;
          end
          step <= AG_PUBLISH;
        end
        AG_PUBLISH: begin
          reset_bar <= 1'b1;
          delay_q   <= DW'(3 * NET_SIZE) - DW'(3 * (int'(i_q) * ROWS + int'(j_q)));
          step      <= AG_WAIT;
        end
        AG_WAIT: begin
          if (delay_q != '0) delay_q <= delay_q - 1'b1;
          else               enable  <= 1'b1;
        end
      endcase
    end
  end

  // Output addresses are only meaningful once reset_bar is high.
  assign addr_ih = {i_q, 1'b0};
  assign addr_iv = {i_q, 1'b1};
  assign addr_jb = j_q;

endmodule
