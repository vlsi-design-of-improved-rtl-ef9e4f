// tb_source: behavioural model of the preceding equipment of a port (the
// switch's input module, or an upstream SE as seen by one SE input). It plays
// one packet session per start pulse:
//   raise req; wait for the two-cycle ACK; send the destination word with
//   flag for one cycle; wait for the path-established ACK (held high) or a
//   one-cycle NACK; then send LEN data words with flag, pausing while ack is
//   low; drop req one cycle after the last word.
// Data word k of a packet is {tag, src, k[15:0]}. Results: done pulses at the
// end; ok = all words sent, nacked = a NACK came back, timed_out = no answer.
// suspends counts the cycles in which a send was held back by a low ack.
module tb_source
  import iln_pkg::*;
#(
  parameter int unsigned ACK_WAIT  = 40,
  parameter int unsigned PATH_WAIT = 20000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  dest,
  input  logic [15:0] len,
  input  logic [7:0]  tag,
  input  logic [7:0]  src,
  output fwd_t        fwd,
  input  logic        ack,
  output logic        busy,
  output logic        done,
  output logic        ok,
  output logic        nacked,
  output logic        timed_out,
  output int          suspends
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT_ACK, S_DEST, S_WAIT_PATH, S_SEND, S_END} s_t;
  s_t          st;
  logic        r1, r2;
  int          cnt;
  logic [15:0] idx, len_q;
  logic [2:0]  dest_q;
  logic [7:0]  tag_q;

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; fwd <= '0; r1 <= 0; r2 <= 0; cnt <= 0; idx <= 0; len_q <= 0;
      dest_q <= 0; tag_q <= 0; done <= 0; ok <= 0; nacked <= 0; timed_out <= 0;
      suspends <= 0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          fwd.req <= 1'b1; st <= S_WAIT_ACK; cnt <= 0; r1 <= 0; r2 <= 0;
          dest_q <= dest; len_q <= len; tag_q <= tag; idx <= 0;
          ok <= 0; nacked <= 0; timed_out <= 0;
        end
        S_WAIT_ACK: begin
          r1 <= ack; r2 <= r1; cnt <= cnt + 1;
          if (r1 && r2) begin
            st <= S_DEST; fwd.flag <= 1'b1;
            fwd.data <= {8'h00, tag_q, 13'h0, dest_q};
            r1 <= 0; r2 <= 0; cnt <= 0;
          end else if (cnt == ACK_WAIT) begin
            timed_out <= 1; st <= S_END; fwd.req <= 1'b0;
          end
        end
        S_DEST: begin
          fwd.flag <= 1'b0; fwd.data <= '0; st <= S_WAIT_PATH;
        end
        S_WAIT_PATH: begin
          cnt <= cnt + 1;
          if (r1 && r2) begin
            st <= S_SEND; r1 <= 0; r2 <= 0;
          end else begin
            r1 <= ack; r2 <= r1;
            if (r2 && !r1) begin
              nacked <= 1; st <= S_END; fwd.req <= 1'b0;
            end else if (cnt == PATH_WAIT) begin
              timed_out <= 1; st <= S_END; fwd.req <= 1'b0;
            end
          end
        end
        S_SEND: begin
          if (idx == len_q) begin
            fwd.flag <= 1'b0; fwd.data <= '0; fwd.req <= 1'b0; ok <= 1; st <= S_END;
          end else if (ack) begin
            fwd.flag <= 1'b1; fwd.data <= {tag_q, src, idx}; idx <= idx + 1;
          end else begin
            fwd.flag <= 1'b0; fwd.data <= '0; suspends <= suspends + 1;
          end
        end
        S_END: begin
          fwd <= '0; done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
