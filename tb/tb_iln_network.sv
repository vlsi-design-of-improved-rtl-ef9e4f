// tb_iln_network: end-to-end test of the 8 x 8 ILN fabric at its default
// parameters. Eight tb_source models play the switch's input modules and
// eight tb_sink models its output modules.
//
// Phases:
//   1. initialisation: after reset every SE must hold its own (i, j) and be
//      enabled within 120 cycles;
//   2. one packet 0 -> 7 must follow the path SE(0,0) -> SE(1,1) -> SE(2,3)
//      -> SE(3,7) (bit-wise routing, cube 0 first) and arrive intact, with a
//      data latency of one cycle per stage;
//   3. fault tolerance: with the first-choice link cut the packet must take
//      an alternate path; with every link of SE(0,0) cut it must be refused
//      with a NACK;
//   4. congestion: a sink withdraws its ACK mid-packet; transport must be
//      suspended and resumed with no word lost;
//   5. random traffic with all eight inputs starting together, so that
//      packets contend for ports; every packet must either be delivered
//      intact to its own output or be refused with a NACK.
// A monitor checks every data word at every output (right output, words in
// order) and counts the mechanisms seen inside the SEs: port refused by the
// selector, alternate routing, negative acknowledgment, suspension and
// termination. A mechanism that never happened counts as a failure.
module tb_iln_network;
  import iln_pkg::*;

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

  // ---------------- input and output module models ----------------
  logic        s_start [N_PORTS];
  logic [2:0]  s_dest  [N_PORTS];
  logic [15:0] s_len   [N_PORTS];
  logic [7:0]  s_tag   [N_PORTS];
  logic        s_busy  [N_PORTS], s_done [N_PORTS], s_ok [N_PORTS];
  logic        s_nack  [N_PORTS], s_tout [N_PORTS];
  int          s_susp  [N_PORTS];

  int          k_cong_at [N_PORTS], k_cong_len [N_PORTS];
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
      .refuse(1'b0), .congest_at(k_cong_at[p]), .congest_len(k_cong_len[p]),
      .dest_word(k_dest[p]), .words(k_words[p]), .sessions(k_sess[p]),
      .congestions(k_congs[p]), .mem(k_mem[p])
    );
  end

  // ---------------- data monitor at the outputs ----------------
  // tag -> expected output, next expected word index, words received
  logic [2:0]  exp_out [256];
  int          next_idx [256];
  int          cycle = 0;
  int          first_word_cycle [N_PORTS];
  always_ff @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    for (int y = 0; y < N_PORTS; y++) begin
      if (nout_fwd[y].flag && nout_fwd[y].data[31:24] != 8'h00) begin
        automatic int t = int'(nout_fwd[y].data[31:24]);
        automatic int ix = int'(nout_fwd[y].data[15:0]);
        checks++;
        if (exp_out[t] != 3'(y) || ix != next_idx[t]) begin
          failures++;
          $display("FAIL: word tag %0d idx %0d at output %0d (expected output %0d idx %0d)",
                   t, ix, y, exp_out[t], next_idx[t]);
        end
        next_idx[t] <= next_idx[t] + 1;
        if (first_word_cycle[y] < 0) first_word_cycle[y] <= cycle;
      end
    end
  end

  // ---------------- mechanism monitors inside the SEs ----------------
  int n_refused = 0, n_alternate = 0, n_negack = 0, n_suspend = 0, n_terminate = 0;
  int n_transport_entries = 0;
  logic [SE_PORTS-1:0] in_transport [N_STAGES][N_PORTS];
  logic                se_addr_ok   [N_STAGES][N_PORTS];
  logic                se_enabled   [N_STAGES][N_PORTS];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_mi
    for (genvar j = 0; j < N_PORTS; j++) begin : g_mj
      assign se_addr_ok[i][j] = dut.g_stage[i].g_row[j].u_se.u_sm.addr_i == 2'(i) &&
                                dut.g_stage[i].g_row[j].u_se.u_sm.addr_j == 3'(j);
      assign se_enabled[i][j] = dut.g_stage[i].g_row[j].u_se.u_sm.enable;
      for (genvar k = 0; k < SE_PORTS; k++) begin : g_mk
        ssm_state_t st, st_q;
        logic router_timeout;
        assign st = dut.g_stage[i].g_row[j].u_se.u_sm.g_ssm[k].u_ssm.u_control.state;
        assign router_timeout =
          dut.g_stage[i].g_row[j].u_se.u_sm.g_ssm[k].u_ssm.u_control.cmd.e_seek_port &&
          dut.g_stage[i].g_row[j].u_se.u_sm.g_ssm[k].u_ssm.u_router.step == 2'd1 &&
          !dut.g_stage[i].g_row[j].u_se.u_sm.g_ssm[k].u_ssm.prt_gnt &&
          dut.g_stage[i].g_row[j].u_se.u_sm.g_ssm[k].u_ssm.rsp.expired;
        always @(posedge clk) begin
          st_q <= st;
          if (router_timeout) n_refused++;
          if (st == ST_ROUTING && (st_q == ST_REQUEST || st_q == ST_DESTINATION)) n_alternate++;
          if (st == ST_NEG_ACK && st_q != ST_NEG_ACK) n_negack++;
          if (st == ST_SUSPEND && st_q == ST_TRANSPORT) n_suspend++;
          if (st == ST_TERMINATION && st_q != ST_TERMINATION) n_terminate++;
          if (st == ST_TRANSPORT && st_q != ST_TRANSPORT) begin
            n_transport_entries++;
            in_transport[i][j][k] <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- helpers ----------------
  int next_tag = 1;
  task automatic launch(input int p, input int d, input int len, output int tag);
    tag = next_tag;
    next_tag = (next_tag == 255) ? 1 : next_tag + 1;
    exp_out[tag] = 3'(d);
    next_idx[tag] = 0;
    s_dest[p] = 3'(d); s_len[p] = 16'(len); s_tag[p] = 8'(tag);
    s_start[p] = 1'b1;
    @(posedge clk);
    s_start[p] = 1'b0;
  endtask

  task automatic wait_idle(input int max_cycles);
    int n = 0;
    do begin
      @(posedge clk); n++;
    end while (n < max_cycles && (s_busy[0] || s_busy[1] || s_busy[2] || s_busy[3] ||
               s_busy[4] || s_busy[5] || s_busy[6] || s_busy[7]));
    repeat (10) @(posedge clk);
  endtask

  task automatic clear_transport_marks();
    for (int i = 0; i < N_STAGES; i++)
      for (int j = 0; j < N_PORTS; j++) in_transport[i][j] = '0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int tag0, tagv [N_PORTS], lenv [N_PORTS], dstv [N_PORTS];
  int delivered = 0, refused = 0;
  logic all_enabled;

  initial begin
    link_fault = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      s_start[p] = 0; s_dest[p] = 0; s_len[p] = 0; s_tag[p] = 0;
      k_cong_at[p] = -1; k_cong_len[p] = 0; first_word_cycle[p] = -1;
    end
    for (int t = 0; t < 256; t++) begin exp_out[t] = 0; next_idx[t] = 0; end
    clear_transport_marks();

    repeat (4) @(posedge clk);
    reset_n = 1;

    // ---- 1. initialisation ----
    repeat (120) @(posedge clk);
    all_enabled = 1;
    for (int i = 0; i < N_STAGES; i++)
      for (int j = 0; j < N_PORTS; j++) begin
        check(se_addr_ok[i][j], $sformatf("SE(%0d,%0d) address", i, j));
      end
    for (int i = 0; i < N_STAGES; i++)
      for (int j = 0; j < N_PORTS; j++)
        if (!se_enabled[i][j]) all_enabled = 0;
    check(all_enabled, "every SE enabled within 120 cycles");

    // ---- 2. single packet 0 -> 7 along the first-choice path ----
    clear_transport_marks();
    launch(0, 7, 8, tag0);
    wait_idle(5000);
    check(s_ok[0], "packet 0->7 sent");
    check(next_idx[tag0] == 8, "packet 0->7: all 8 words at output 7");
    check(k_dest[7] == {8'h00, 8'(tag0), 13'h0, 3'd7}, "destination word reaches output 7");
    check(in_transport[0][0] == 4'b0001 && in_transport[1][1] == 4'b0001 &&
          in_transport[2][3] == 4'b0010 && in_transport[3][7] == 4'b0100,
          "path SE(0,0)->SE(1,1)->SE(2,3)->SE(3,7)");
    for (int i = 0; i < N_STAGES; i++)
      for (int j = 0; j < N_PORTS; j++)
        if (!((i == 0 && j == 0) || (i == 1 && j == 1) || (i == 2 && j == 3) || (i == 3 && j == 7)))
          check(in_transport[i][j] == '0, $sformatf("SE(%0d,%0d) not on the path", i, j));
    // first word leaves the source in cycle c, is registered once per stage
    begin
      int lat;
      lat = first_word_cycle[7] - dut_first_src_cycle;
      check(lat == N_STAGES, $sformatf("data latency %0d cycles (expected %0d)", lat, N_STAGES));
    end

    // ---- 3. fault tolerance ----
    clear_transport_marks();
    link_fault[0][0][0] = 1'b1;           // first choice of SE(0,0) for 0 -> 7
    launch(0, 7, 5, tag0);
    wait_idle(5000);
    check(s_ok[0] && next_idx[tag0] == 5, "0->7 delivered around a cut link");
    check(in_transport[0][0] == 4'b0001 && in_transport[1][2] == 4'b0010,
          "alternate path leaves SE(0,0) on cube-1 to SE(1,2)");
    link_fault[0][0] = '1;                // SE(0,0) cut off completely
    launch(0, 7, 5, tag0);
    wait_idle(20000);
    check(s_nack[0] && !s_ok[0], "0->7 refused with NACK when SE(0,0) has no link");
    check(next_idx[tag0] == 0, "no word of a refused packet arrives");
    link_fault = '0;

    // ---- 4. congestion at the output ----
    k_cong_at[3] = 3; k_cong_len[3] = 6;
    launch(2, 3, 12, tag0);
    wait_idle(5000);
    check(s_ok[2] && next_idx[tag0] == 12, "2->3 delivered whole through a congestion");
    check(k_congs[3] >= 1 && s_susp[2] > 0, "source held back while the output was congested");
    k_cong_at[3] = -1;

    // ---- 5. random contending traffic ----
    for (int r = 0; r < 40; r++) begin
      for (int p = 0; p < N_PORTS; p++) begin
        dstv[p] = (r < 4) ? 5 : int'($urandom_range(0, 7));   // first rounds: hot spot
        lenv[p] = int'($urandom_range(1, 20));
        tagv[p] = next_tag;
        next_tag = (next_tag == 255) ? 1 : next_tag + 1;
        exp_out[tagv[p]] = 3'(dstv[p]);
        next_idx[tagv[p]] = 0;
        s_dest[p] = 3'(dstv[p]); s_len[p] = 16'(lenv[p]); s_tag[p] = 8'(tagv[p]);
      end
      k_cong_at[r % N_PORTS] = (r % 3 == 0) ? 2 : -1;
      k_cong_len[r % N_PORTS] = 4;
      for (int p = 0; p < N_PORTS; p++) s_start[p] = 1'b1;
      @(posedge clk);
      for (int p = 0; p < N_PORTS; p++) s_start[p] = 1'b0;
      wait_idle(60000);
      k_cong_at[r % N_PORTS] = -1;
      for (int p = 0; p < N_PORTS; p++) begin
        check(!s_tout[p], $sformatf("round %0d source %0d answered", r, p));
        check(s_ok[p] ^ s_nack[p], $sformatf("round %0d source %0d ok xor nack", r, p));
        if (s_ok[p]) begin
          delivered++;
          check(next_idx[tagv[p]] == lenv[p],
                $sformatf("round %0d %0d->%0d: %0d of %0d words", r, p, dstv[p],
                          next_idx[tagv[p]], lenv[p]));
        end else begin
          refused++;
          check(next_idx[tagv[p]] == 0, "refused packet left no words");
        end
      end
    end

    $display("delivered=%0d refused=%0d port_refused=%0d alternate=%0d negack=%0d suspend=%0d terminate=%0d transports=%0d",
             delivered, refused, n_refused, n_alternate, n_negack, n_suspend, n_terminate,
             n_transport_entries);
    check(delivered > 0, "some random packets delivered");
    check(n_refused > 0, "mechanism: port refused by the selector (contention)");
    check(n_alternate > 0, "mechanism: alternate routing");
    check(n_negack > 0, "mechanism: negative acknowledgment");
    check(n_suspend > 0, "mechanism: suspension on congestion");
    check(n_terminate > 0, "mechanism: session termination");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle in which source 0 put its first data word on the wire
  int dut_first_src_cycle = -1;
  always @(posedge clk)
    if (dut_first_src_cycle < 0 && nin_fwd[0].flag && nin_fwd[0].data[31:24] != 8'h00)
      dut_first_src_cycle <= cycle;

endmodule
