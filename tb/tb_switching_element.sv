// tb_switching_element: one SE between four input-module models and four
// next-equipment models. It checks:
//   - addressing: (i, j), the neighbour address outputs, reset_bar three
//     cycles after reset and enable after 3 * (32 - location) more cycles;
//   - switching: a packet 0 -> 7 at SE(0,0) goes out on cube-0 (SEO-0);
//   - alternate routing: with SEO-0's next equipment dead the packet goes out
//     on SEO-1; with all four dead every port is tried and a NACK returns;
//   - NACK from the next equipment: every port refuses, NACK returns;
//   - contention: SEI-0 and SEI-1 want the same port at once; one gets it,
//     the other moves to its next choice; both packets arrive;
//   - flow control: the next equipment withdraws its ACK mid-packet;
//   - last stage: SE(3,5) only uses its straight port, and refuses a packet
//     for a different row at once.
module tb_switching_element;
  import iln_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic reset_n = 0, sign = 1;
  logic [2:0] ai = 0, aj = 0;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  fwd_t [SE_PORTS-1:0] sei_fwd, seo_fwd;
  logic [SE_PORTS-1:0] sei_ack, seo_ack;
  logic [2:0] a_ih, a_iv, a_jb;
  logic rbar;

  switching_element dut (
    .clk, .reset_n, .sign, .addr_i(ai), .addr_j(aj), .sei_fwd, .sei_ack, .seo_fwd, .seo_ack,
    .addr_ih(a_ih), .addr_iv(a_iv), .addr_jb(a_jb), .reset_bar(rbar)
  );

  logic        s_start [SE_PORTS];
  logic [2:0]  s_dest  [SE_PORTS];
  logic [15:0] s_len   [SE_PORTS];
  logic [7:0]  s_tag   [SE_PORTS];
  logic        s_busy  [SE_PORTS], s_done [SE_PORTS], s_ok [SE_PORTS];
  logic        s_nack  [SE_PORTS], s_tout [SE_PORTS];
  int          s_susp  [SE_PORTS];
  logic        k_mute [SE_PORTS], k_refuse [SE_PORTS];
  int          k_cong_at [SE_PORTS], k_cong_len [SE_PORTS];
  logic [31:0] k_dest [SE_PORTS];
  int          k_words [SE_PORTS], k_sess [SE_PORTS], k_congs [SE_PORTS];
  logic [31:0] k_mem [SE_PORTS][64];
  int          req_seen [SE_PORTS];

  for (genvar p = 0; p < SE_PORTS; p++) begin : g_port
    tb_source u_src (
      .clk, .rst_n(reset_n), .start(s_start[p]), .dest(s_dest[p]), .len(s_len[p]),
      .tag(s_tag[p]), .src(8'(p)), .fwd(sei_fwd[p]), .ack(sei_ack[p]),
      .busy(s_busy[p]), .done(s_done[p]), .ok(s_ok[p]), .nacked(s_nack[p]),
      .timed_out(s_tout[p]), .suspends(s_susp[p])
    );
    tb_sink u_snk (
      .clk, .rst_n(reset_n), .fwd(seo_fwd[p]), .ack(seo_ack[p]), .mute(k_mute[p]),
      .refuse(k_refuse[p]), .congest_at(k_cong_at[p]), .congest_len(k_cong_len[p]),
      .dest_word(k_dest[p]), .words(k_words[p]), .sessions(k_sess[p]),
      .congestions(k_congs[p]), .mem(k_mem[p])
    );
    logic req_q = 0;
    always @(posedge clk) begin
      req_q <= seo_fwd[p].req;
      if (seo_fwd[p].req && !req_q) req_seen[p]++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic restart(input logic sg, input logic [2:0] i_in, input logic [2:0] j_in,
                         input int exp_i, input int exp_j);
    int n, t_rbar, t_en, loc;
    reset_n = 0; sign = sg; ai = i_in; aj = j_in;
    for (int p = 0; p < SE_PORTS; p++) begin
      s_start[p] = 0; k_mute[p] = 0; k_refuse[p] = 0; k_cong_at[p] = -1; k_cong_len[p] = 0;
      req_seen[p] = 0;
    end
    repeat (3) @(posedge clk);
    #1 reset_n = 1;
    n = 0; t_rbar = -1; t_en = -1;
    while (t_en < 0 && n < 400) begin
      @(posedge clk); n++;
      #1;
      if (rbar && t_rbar < 0) t_rbar = n;
      if (dut.enable && t_en < 0) t_en = n;
    end
    loc = exp_i * 8 + exp_j;
    check(a_ih == {2'(exp_i), 1'b0} && a_iv == {2'(exp_i), 1'b1} && a_jb == 3'(exp_j),
          $sformatf("address outputs ih=%b iv=%b jb=%b for (%0d,%0d)", a_ih, a_iv, a_jb, exp_i, exp_j));
    check(t_rbar == 3, $sformatf("reset_bar after %0d cycles (3 expected)", t_rbar));
    check(t_en == 4 + 3 * (32 - loc),
          $sformatf("enable after %0d cycles (%0d expected)", t_en, 4 + 3 * (32 - loc)));
    repeat (2) @(posedge clk);
  endtask

  task automatic send(input int p, input int d, input int len, input int tag);
    s_dest[p] = 3'(d); s_len[p] = 16'(len); s_tag[p] = 8'(tag);
    s_start[p] = 1;
    @(posedge clk);
    #1 s_start[p] = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin @(posedge clk); n++; end
    while (n < 5000 && (s_busy[0] || s_busy[1] || s_busy[2] || s_busy[3]));
    repeat (5) @(posedge clk);
  endtask

  function automatic logic words_ok(input int port, input int tag, input int src, input int len);
    if (k_words[port] != len) return 0;
    for (int k = 0; k < len; k++)
      if (k_mem[port][k] != {8'(tag), 8'(src), 16'(k)}) return 0;
    return 1;
  endfunction

  initial begin
    // ---- SE(0,0): addressing ----
    restart(1'b1, 3'b000, 3'b000, 0, 0);

    // ---- switching: 0 -> 7 leaves on cube-0 ----
    send(0, 7, 6, 11);
    wait_idle();
    check(s_ok[0], "0->7 established");
    check(req_seen[0] == 1 && req_seen[1] == 0 && req_seen[2] == 0 && req_seen[3] == 0,
          "0->7 requested only SEO-0 (cube 0)");
    check(k_dest[0][2:0] == 3'd7, "destination word forwarded");
    check(words_ok(0, 11, 0, 6), "0->7 data words intact on SEO-0");

    // ---- 0 -> 2 (rv = 010) leaves on cube-1 ----
    for (int p = 0; p < SE_PORTS; p++) req_seen[p] = 0;
    send(2, 2, 3, 12);
    wait_idle();
    check(s_ok[2] && req_seen[1] == 1 && req_seen[0] == 0 && words_ok(1, 12, 2, 3),
          "0->2 from SEI-2 leaves on SEO-1");

    // ---- 0 -> 0 (rv = 000) goes straight ----
    for (int p = 0; p < SE_PORTS; p++) req_seen[p] = 0;
    send(3, 0, 2, 13);
    wait_idle();
    check(s_ok[3] && req_seen[3] == 1 && req_seen[0] == 0 && words_ok(3, 13, 3, 2),
          "0->0 from SEI-3 leaves on the straight port");

    // ---- alternate routing around a dead next SE ----
    for (int p = 0; p < SE_PORTS; p++) req_seen[p] = 0;
    k_mute[0] = 1;
    send(0, 7, 4, 14);
    wait_idle();
    check(s_ok[0] && req_seen[0] == 1 && req_seen[1] == 1 && words_ok(1, 14, 0, 4),
          "dead SEO-0: packet rerouted to SEO-1");

    // ---- all next equipment dead: every port tried, NACK ----
    for (int p = 0; p < SE_PORTS; p++) begin req_seen[p] = 0; k_mute[p] = 1; end
    send(0, 7, 4, 15);
    wait_idle();
    check(s_nack[0] && !s_ok[0], "all ports dead: NACK to the input");
    check(req_seen[0] == 1 && req_seen[1] == 1 && req_seen[2] == 1 && req_seen[3] == 1,
          "all four output ports tried");

    // ---- all next equipment refuses the destination: NACK ----
    for (int p = 0; p < SE_PORTS; p++) begin req_seen[p] = 0; k_mute[p] = 0; k_refuse[p] = 1; end
    send(1, 7, 4, 16);
    wait_idle();
    check(s_nack[1] && req_seen[0] == 1 && req_seen[3] == 1, "NACKs from every next SE: NACK back");
    for (int p = 0; p < SE_PORTS; p++) k_refuse[p] = 0;

    // ---- contention: SEI-0 and SEI-1 both for destination 7 ----
    for (int p = 0; p < SE_PORTS; p++) req_seen[p] = 0;
    s_dest[0] = 7; s_len[0] = 5; s_tag[0] = 21;
    s_dest[1] = 7; s_len[1] = 5; s_tag[1] = 22;
    s_start[0] = 1; s_start[1] = 1;
    @(posedge clk); #1 s_start[0] = 0; s_start[1] = 0;
    wait_idle();
    check(s_ok[0] && s_ok[1], "both contending packets established");
    check((words_ok(0, 21, 0, 5) && words_ok(1, 22, 1, 5)) ||
          (words_ok(0, 22, 1, 5) && words_ok(1, 21, 0, 5)),
          "one packet on SEO-0, the other moved on to SEO-1");

    // ---- flow control ----
    k_cong_at[0] = 3; k_cong_len[0] = 5;
    send(0, 1, 10, 23);
    wait_idle();
    check(s_ok[0] && words_ok(0, 23, 0, 10), "suspended packet arrives whole");
    check(k_congs[0] >= 1 && s_susp[0] > 0, "input held back during the suspension");
    k_cong_at[0] = -1;

    // ---- last stage: SE(3,5) (preceding SE(2,5) horizontal) ----
    restart(1'b0, 3'b100, 3'b101, 3, 5);
    for (int p = 0; p < SE_PORTS; p++) req_seen[p] = 0;
    send(2, 5, 4, 31);
    wait_idle();
    check(s_ok[2] && req_seen[3] == 1 && req_seen[0] + req_seen[1] + req_seen[2] == 0 &&
          words_ok(3, 31, 2, 4), "last stage uses only the straight port");
    for (int p = 0; p < SE_PORTS; p++) req_seen[p] = 0;
    send(2, 4, 4, 32);
    wait_idle();
    check(s_nack[2] && req_seen[0] + req_seen[1] + req_seen[2] + req_seen[3] == 0,
          "last stage refuses a packet for another row without trying a port");

    // ---- vertical neighbour: preceding SE(1,2) gives SE(1,3) ----
    restart(1'b0, 3'b011, 3'b010, 1, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
