// tb_iln_throughput: the throughput and delay workload of the document
// (Fig 3.6, 3.7: 90% load) run on the 8 x 8 fabric, the N = 8 point.
//
// How it works: time is divided into slots. At the start of a slot every
// input offers, with arrival probability a = 0.9 ($urandom), a fresh packet
// of LEN words to a uniformly random output; all offered packets start in the
// same cycle and contend for ports inside the fabric. The slot ends when every
// source has finished (delivered or refused); a refused packet is dropped, as
// in the Kruskal-Snir model the document quotes. Over SLOTS slots the
// testbench measures
//   Th  = packets delivered per input port per slot,
//   p_a = Th / N_avg, with N_avg the measured offered packets per port per slot,
//   t   = (1 - p_a) / p_a, the document's average delay in slots,
// and prints them next to the document's analytical values for n = 3:
//   Th = a / (n + 1 + a n (n-1) / [2 (n+1)])      (last stage accepts one input)
//   Th = a / (1 + a n (n-1) / [2 (n+1)^2])        (last stage accepts all inputs)
// A slot here is not of fixed length: a packet that loses a port keeps
// searching alternate paths until a port frees or every path has been tried,
// so packets for the same output are often served one after another in the
// same slot. The testbench therefore also times one packet alone through the
// idle fabric (T1 cycles) and reports Th_t = delivered / (N * cycles / T1),
// the throughput per port per single-packet time, which is the closer match
// to the document's fixed time slot. The numbers are reported, not checked:
// the analytical model is not this circuit.
//
// Checks: every data word that leaves an output belongs to a packet addressed
// to that output and arrives in order; each delivered packet arrives whole;
// every refused packet is refused with a NACK (no source times out); every
// slot with offered packets delivers at least one; deliveries equal the
// sessions the outputs saw; the lone packet is delivered.
//
// Own choices (not mentioned in the document): SLOTS = 250, LEN = 14 words
// (about one 53-byte ATM cell of 32-bit words), the slot ends when all
// sources are idle and 30 cycles more (so every path has been torn down),
// rather than after a fixed number of cycles.
module tb_iln_throughput;
  import iln_pkg::*;

  localparam int SLOTS = 250;
  localparam int LEN   = 14;
  localparam int A_PERMILLE = 900;   // "by applying 90% traffic load"

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

  // ---------------- data monitor at the outputs ----------------
  logic [2:0] exp_out  [256];
  int         next_idx [256];

  always @(posedge clk) begin
    for (int y = 0; y < N_PORTS; y++) begin
      if (nout_fwd[y].flag && nout_fwd[y].data[31:24] != 8'h00) begin
        automatic int t  = int'(nout_fwd[y].data[31:24]);
        automatic int ix = int'(nout_fwd[y].data[15:0]);
        checks++;
        if (exp_out[t] != 3'(y) || ix != next_idx[t]) begin
          failures++;
          $display("FAIL: word tag %0d idx %0d at output %0d (expected output %0d idx %0d)",
                   t, ix, y, exp_out[t], next_idx[t]);
        end
        next_idx[t] <= next_idx[t] + 1;
      end
    end
  end

  function automatic int total_sessions();
    int s = 0;
    for (int y = 0; y < N_PORTS; y++) s += k_sess[y];
    return s;
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    int t1, offered, delivered, slot_off, slot_del, sess_before, n, cycles, tag, no_delivery;
    int tagv [N_PORTS];
    logic offer [N_PORTS];
    logic any_busy;
    real a, nn, th, tht, nav, pa, tdel, th1, th2;

    link_fault = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      s_start[p] = 0; s_dest[p] = 0; s_len[p] = 0; s_tag[p] = 0;
    end
    for (int t = 0; t < 256; t++) begin exp_out[t] = 0; next_idx[t] = 0; end
    repeat (4) @(posedge clk);
    reset_n = 1;
    repeat (120) @(posedge clk);

    // one packet alone: the single-packet time T1
    @(negedge clk);
    s_dest[0] = 3'd7; s_len[0] = 16'(LEN); s_tag[0] = 8'd255;
    exp_out[255] = 3'd7; next_idx[255] = 0;
    s_start[0] = 1;
    @(negedge clk);
    s_start[0] = 0;
    t1 = 1;
    do begin @(negedge clk); t1++; end while (s_busy[0] && t1 < 100000);
    repeat (30) @(negedge clk);
    check(s_ok[0] && next_idx[255] == LEN, "lone packet 0 -> 7 delivered whole");

    offered = 0; delivered = 0; cycles = 0; tag = 1; no_delivery = 0;
    for (int s = 0; s < SLOTS; s++) begin
      slot_off = 0; slot_del = 0;
      sess_before = total_sessions();
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) begin
        offer[p] = $urandom_range(999) < A_PERMILLE;
        if (offer[p]) begin
          tagv[p] = tag;
          tag = (tag == 255) ? 1 : tag + 1;
          s_dest[p] = 3'($urandom_range(N_PORTS - 1));
          s_len[p] = 16'(LEN);
          s_tag[p] = 8'(tagv[p]);
          exp_out[tagv[p]] = s_dest[p];
          next_idx[tagv[p]] = 0;
          s_start[p] = 1;
          slot_off++;
        end
      end
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) s_start[p] = 0;
      n = 1;
      do begin
        @(negedge clk); n++;
        any_busy = 0;
        for (int p = 0; p < N_PORTS; p++) if (s_busy[p]) any_busy = 1;
      end while (any_busy && n < 100000);
      repeat (30) @(negedge clk);
      cycles += n;

      for (int p = 0; p < N_PORTS; p++) begin
        if (!offer[p]) continue;
        check(!s_tout[p] && (s_ok[p] != s_nack[p]),
              $sformatf("slot %0d input %0d: packet neither delivered nor NACKed", s, p));
        if (s_ok[p]) begin
          slot_del++;
          check(next_idx[tagv[p]] == LEN,
                $sformatf("slot %0d input %0d: %0d of %0d words arrived", s, p, next_idx[tagv[p]], LEN));
        end else begin
          check(next_idx[tagv[p]] == 0,
                $sformatf("slot %0d input %0d: refused packet left words at an output", s, p));
        end
      end
      check(total_sessions() == sess_before + slot_del,
            $sformatf("slot %0d: %0d output sessions for %0d deliveries", s,
                      total_sessions() - sess_before, slot_del));
      if (slot_off > 0 && slot_del == 0) no_delivery++;
      offered += slot_off;
      delivered += slot_del;
    end
    check(no_delivery == 0, $sformatf("%0d slots with offered packets delivered none", no_delivery));

    a    = A_PERMILLE / 1000.0;
    nn   = LOG_N;
    th   = real'(delivered) / (SLOTS * N_PORTS);
    nav  = real'(offered) / (SLOTS * N_PORTS);
    pa   = th / nav;
    tdel = (1.0 - pa) / pa;
    tht  = real'(delivered) * t1 / (real'(cycles) * N_PORTS);
    th1  = a / (nn + 1.0 + a * nn * (nn - 1.0) / (2.0 * (nn + 1.0)));
    th2  = a / (1.0 + a * nn * (nn - 1.0) / (2.0 * (nn + 1.0) * (nn + 1.0)));
    $display("throughput: %0d slots, %0d offered, %0d delivered, %.1f cycles per slot",
             SLOTS, offered, delivered, real'(cycles) / SLOTS);
    $display("throughput: measured Th=%.3f N_avg=%.3f p_a=%.3f delay t=%.3f slots", th, nav, pa, tdel);
    $display("throughput: single-packet time T1=%0d cycles, Th_t=%.3f per port per T1", t1, tht);
    $display("throughput: analytical Th=%.3f (one input per last-stage SE), Th=%.3f (all inputs)",
             th1, th2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
