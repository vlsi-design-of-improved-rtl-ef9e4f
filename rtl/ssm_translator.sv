// ssm_translator: the data-path unit of a sub switching module. It captures
// the destination address, forms the routing vector of the bit-wise routing
// algorithm (BRA), sends the destination address on to the next equipment and
// then replicates the packet data.
//
//   H (create routing vector): on the first cycle FlagIn is high, store the
//      data word as the destination and form rv = addr_j XOR dest[LOG_N-1:0].
//      rv_ready is high from the next cycle on.
//   G (send destination): drive the stored destination word with FlagOut for
//      one cycle; dest_sent is high from the next cycle on, as long as G
//      stays on, so each new port attempt sends the destination again.
//   F (send packet data): register DataIn/FlagIn onto DataOut/FlagOut, one
//      cycle of latency. If the preceding equipment drops its flag (because
//      the acknowledgment was withdrawn), the dropped flag is replicated.
// The clear command returns every register to zero.
//
// The functions and the XOR rule are the document's. Own choices: the
// destination port number sits in the low LOG_N bits of the address word (the
// rest of the word is forwarded untouched), the destination flag lasts one
// cycle, and the data path is a single register stage.
module ssm_translator
  import iln_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ssm_cmd_t          cmd,
  input  logic [LOG_N-1:0]  addr_j,
  input  logic              flag_in,
  input  logic [DATA_W-1:0] data_in,
  output logic              flag_out,
  output logic [DATA_W-1:0] data_out,
  output logic [LOG_N-1:0]  rv,
  output logic              rv_ready,
  output logic              dest_sent
);

  logic [DATA_W-1:0] dest_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dest_q    <= '0;
      rv        <= '0;
      rv_ready  <= 1'b0;
      dest_sent <= 1'b0;
      flag_out  <= 1'b0;
      data_out  <= '0;
    end else if (cmd.clear) begin
      dest_q    <= '0;
      rv        <= '0;
      rv_ready  <= 1'b0;
      dest_sent <= 1'b0;
      flag_out  <= 1'b0;
      data_out  <= '0;
    end else begin
      if (cmd.h_make_rv && flag_in && !rv_ready) begin
        dest_q   <= data_in;
        rv       <= addr_j ^ data_in[LOG_N-1:0];
        rv_ready <= 1'b1;
      end

      // dest_sent re-arms whenever G is off, so every alternate port
      // attempt sends the destination again
      dest_sent <= cmd.g_send_dest;
      if (cmd.g_send_dest && !dest_sent) begin
        flag_out  <= 1'b1;
        data_out  <= dest_q;
      end else if (cmd.f_send_data) begin
        flag_out <= flag_in;
        data_out <= flag_in ? data_in : '0;
      end else begin
        flag_out <= 1'b0;
        data_out <= '0;
      end
    end
  end

endmodule
