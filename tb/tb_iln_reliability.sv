// tb_iln_reliability: the terminal-reliability workload of the document
// (Fig 3.3) run on the 8 x 8 fabric. The document evaluates
// R_t = (1 - q^(m+1))^(m+1) for a link failure probability q; here the
// fabric itself is simulated with random link failures.
//
// How it works: for each failure probability q in {0.05, 0.1, 0.2, 0.3, 0.5}
// the testbench runs TRIALS trials. In each trial every inter-stage link
// (3 x 8 x 4 = 96 links, driven through the fabric's link_fault test input) is
// cut with probability q using $urandom, then one packet of LEN words is sent
// from a random input to a random output. Independently of the RTL, the
// testbench searches the cut network for a route the bit-wise routing
// algorithm may take: at stages 0..2 any surviving cube link that corrects a
// differing address bit, or the surviving straight link; at the last stage the
// straight output, only in the destination row. Because every SE tries all of
// its candidate ports before it gives up, the packet must arrive, whole and
// only at its destination, exactly when such a route exists, and must be
// refused with a NACK otherwise. Trials in which the first-choice route was
// cut but the packet still arrived count as alternate-path deliveries; at
// least one of those and at least one refusal must occur.
//
// Output: per q, the fraction of packets delivered, next to the document's
// analytical R_t for N = 8 (m = 3). These are reported, not checked; the
// analytical model and this fabric differ, e.g. only links fail here.
//
// Own choices (not mentioned in the document): the q values, TRIALS = 80 per
// q, packet length LEN = 4, and failures limited to inter-stage links.
module tb_iln_reliability;
  import iln_pkg::*;

  localparam int TRIALS = 80;
  localparam int LEN    = 4;
  localparam int NQ     = 5;
  localparam int Q_PERMILLE [NQ] = '{50, 100, 200, 300, 500};

  logic clk = 0;
  logic reset_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  fwd_t [N_PORTS-1:0] nin_fwd, nout_fwd;
  logic [N_PORTS-1:0] nin_ack, nout_ack;
  logic [N_STAGES-2:0][N_PORTS-1:0][SE_PORTS-1:0] link_fault;

  iln_network dut (
    .clk, .reset_n, .nin_fwd, .nin_ack, .nout_fwd, .nout_ack, .link_fault
  );

  logic        s_start [N_PORTS];
  logic [2:0]  s_dest  [N_PORTS];
  logic [15:0] s_len   [N_PORTS];
  logic [7:0]  s_tag   [N_PORTS];
  logic        s_busy  [N_PORTS], s_done [N_PORTS], s_ok [N_PORTS];
  logic        s_nack  [N_PORTS], s_tout [N_PORTS];
  int          s_susp  [N_PORTS];
  logic [31:0] k_dest  [N_PORTS];
  int          k_words [N_PORTS], k_sess [N_PORTS], k_congs [N_PORTS];
  logic [31:0] k_mem   [N_PORTS][64];

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    tb_source u_src (
      .clk, .rst_n(reset_n), .start(s_start[p]), .dest(s_dest[p]), .len(s_len[p]),
      .tag(s_tag[p]), .src(8'(p)), .fwd(nin_fwd[p]), .ack(nin_ack[p]),
      .busy(s_busy[p]), .done(s_done[p]), .ok(s_ok[p]), .nacked(s_nack[p]),
      .timed_out(s_tout[p]), .suspends(s_susp[p])
    );
    tb_sink u_snk (
      .clk, .rst_n(reset_n), .fwd(nout_fwd[p]), .ack(nout_ack[p]), .mute(1'b0),
      .refuse(1'b0), .congest_at(-1), .congest_len(0),
      .dest_word(k_dest[p]), .words(k_words[p]), .sessions(k_sess[p]),
      .congestions(k_congs[p]), .mem(k_mem[p])
    );
  end

  // ---------------- reference model: does a usable route survive? ----------------
  function automatic logic reachable(input int i, input int row, input int dst);
    int rv = row ^ dst;
    logic found = 0;
    if (i == N_STAGES - 1) return row == dst;
    for (int p = 0; p < SE_PORTS - 1; p++)
      if (rv[p] && !link_fault[i][row][p] && reachable(i + 1, row ^ (1 << p), dst)) found = 1;
    if (!link_fault[i][row][STRAIGHT] && reachable(i + 1, row, dst)) found = 1;
    return found;
  endfunction

  // the route the bit-wise algorithm takes first: lowest differing bit, else straight
  function automatic logic first_choice_cut(input int src, input int dst);
    int row = src;
    for (int i = 0; i < N_STAGES - 1; i++) begin
      int rv = row ^ dst;
      int p = STRAIGHT;
      for (int b = SE_PORTS - 2; b >= 0; b--) if (rv[b]) p = b;
      if (link_fault[i][row][p]) return 1;
      row = (p == STRAIGHT) ? row : row ^ (1 << p);
    end
    return 0;
  endfunction

  function automatic int total_sessions();
    int s = 0;
    for (int y = 0; y < N_PORTS; y++) s += k_sess[y];
    return s;
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int n_rerouted = 0, n_refused = 0;

  initial begin
    int src, dst, tag, sess_before, delivered, n;
    logic exp_ok, cut1, words_ok;
    real q, rt;

    link_fault = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      s_start[p] = 0; s_dest[p] = 0; s_len[p] = 0; s_tag[p] = 0;
    end
    repeat (4) @(posedge clk);
    reset_n = 1;
    repeat (120) @(posedge clk);

    tag = 1;
    for (int qi = 0; qi < NQ; qi++) begin
      delivered = 0;
      for (int t = 0; t < TRIALS; t++) begin
        for (int i = 0; i < N_STAGES - 1; i++)
          for (int j = 0; j < N_PORTS; j++)
            for (int p = 0; p < SE_PORTS; p++)
              link_fault[i][j][p] = $urandom_range(999) < Q_PERMILLE[qi];
        src = $urandom_range(N_PORTS - 1);
        dst = $urandom_range(N_PORTS - 1);
        exp_ok = reachable(0, src, dst);
        cut1 = first_choice_cut(src, dst);
        sess_before = total_sessions();

        @(negedge clk);
        s_dest[src] = 3'(dst); s_len[src] = 16'(LEN); s_tag[src] = 8'(tag);
        s_start[src] = 1;
        @(negedge clk);
        s_start[src] = 0;
        n = 0;
        while (s_busy[src] && n < 50000) begin @(posedge clk); n++; end
        repeat (10) @(posedge clk);

        words_ok = k_words[dst] == LEN;
        for (int k = 0; k < LEN; k++)
          if (k_mem[dst][k] != {8'(tag), 8'(src), 16'(k)}) words_ok = 0;

        if (exp_ok) begin
          check(s_ok[src] && !s_nack[src] && total_sessions() == sess_before + 1 && words_ok,
                $sformatf("q=%0d/1000 trial %0d: %0d -> %0d has a surviving route but was not delivered intact",
                          Q_PERMILLE[qi], t, src, dst));
          delivered++;
          if (cut1) n_rerouted++;
        end else begin
          check(s_nack[src] && !s_ok[src] && total_sessions() == sess_before,
                $sformatf("q=%0d/1000 trial %0d: %0d -> %0d has no route but was not refused with a NACK",
                          Q_PERMILLE[qi], t, src, dst));
          n_refused++;
        end
        tag = (tag == 255) ? 1 : tag + 1;
      end
      q  = Q_PERMILLE[qi] / 1000.0;
      rt = (1.0 - q ** (LOG_N + 1)) ** (LOG_N + 1);
      $display("reliability: q=%.2f delivered %0d/%0d = %.3f (analytical R_t for N=8: %.3f)",
               q, delivered, TRIALS, real'(delivered) / TRIALS, rt);
    end

    check(n_rerouted > 0, "some packets arrived over an alternate path around cut links");
    check(n_refused > 0, "some packets were refused because no route survived");
    $display("reliability: %0d alternate-path deliveries, %0d refusals", n_rerouted, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
