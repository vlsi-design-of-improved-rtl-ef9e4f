// tb_sink: behavioural model of the next equipment of a port (the switch's
// output module, or a downstream SE as seen by one SE output). Per session:
// on a new req it pulses ack for two cycles; on the destination word (flag)
// it records the word and either holds ack high (path established) or, when
// refuse is set, pulses ack for one cycle (NACK). With mute set it never
// answers at all (dead equipment). While the path is held it stores every
// flagged word (up to 64) and, when congest_at is reached once per session,
// drops ack for congest_len cycles; words still in flight are accepted.
// req falling ends the session.
module tb_sink
  import iln_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fwd_t        fwd,
  output logic        ack,
  input  logic        mute,
  input  logic        refuse,
  input  int          congest_at,   // word count at which to congest; -1 never
  input  int          congest_len,
  output logic [31:0] dest_word,
  output int          words,
  output int          sessions,
  output int          congestions,
  output logic [31:0] mem [64]
);
  typedef enum logic [2:0] {K_IDLE, K_ACK1, K_ACK2, K_WAIT_DEST, K_NACK, K_HOLD, K_WAIT_DROP} k_t;
  k_t   st;
  logic armed, congested_once;
  int   ccnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= K_IDLE; ack <= 0; armed <= 0; dest_word <= 0; words <= 0; sessions <= 0;
      congestions <= 0; congested_once <= 0; ccnt <= 0;
      for (int k = 0; k < 64; k++) mem[k] <= '0;
    end else begin
      if (!fwd.req) armed <= 1'b1;
      case (st)
        K_IDLE: if (fwd.req && armed && !mute) begin
          armed <= 0; ack <= 1; st <= K_ACK1; words <= 0; congested_once <= 0;
        end
        K_ACK1: st <= K_ACK2;
        K_ACK2: begin ack <= 0; st <= K_WAIT_DEST; end
        K_WAIT_DEST: begin
          if (!fwd.req) st <= K_IDLE;
          else if (fwd.flag) begin
            dest_word <= fwd.data;
            if (refuse) begin ack <= 1; st <= K_NACK; end
            else        begin ack <= 1; st <= K_HOLD; end
          end
        end
        K_NACK: begin ack <= 0; st <= K_WAIT_DROP; end
        K_HOLD: begin
          if (fwd.flag) begin
            if (words < 64) mem[words] <= fwd.data;
            words <= words + 1;
          end
          if (ccnt != 0) begin
            ccnt <= ccnt - 1;
            if (ccnt == 1) ack <= 1;
          end else if (!congested_once && congest_at >= 0 && words == congest_at && ack) begin
            ack <= 0; ccnt <= congest_len; congested_once <= 1; congestions <= congestions + 1;
          end
          if (!fwd.req) begin ack <= 0; ccnt <= 0; st <= K_IDLE; sessions <= sessions + 1; end
        end
        K_WAIT_DROP: if (!fwd.req) st <= K_IDLE;
        default: st <= K_IDLE;
      endcase
    end
  end
endmodule
