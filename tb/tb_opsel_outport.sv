// tb_opsel_outport: drives hit from a model of four SSM requests indexed by
// sel, and checks the cyclic scan, the lock on a hit, the hold while the
// owner keeps its request, the resume after release at the next SSM, and
// that the grant never moves while locked.
module tb_opsel_outport;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  logic [3:0] want;
  logic [1:0] sel;
  logic hit, locked;
  assign hit = want[sel];
  opsel_outport dut (.clk, .rst_n, .hit, .sel, .locked);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(); @(posedge clk); #1; endtask
  logic [1:0] prev;
  int n, owner;
  initial begin
    want = 0;
    step(); rst_n = 1;
    prev = sel; step();
    check(!locked && sel == prev + 1, "free port scans");
    step(); step(); check(!locked, "no lock without request");
    // single requester: lock within 4 cycles
    for (int s = 0; s < 4; s++) begin
      want = 4'b1 << s; n = 0;
      while (!locked && n < 10) begin step(); n++; end
      check(locked && sel == 2'(s) && n >= 1 && n <= 4, $sformatf("SSM %0d granted after %0d cycles", s, n));
      repeat (3) begin step(); check(locked && sel == 2'(s), "grant held"); end
      want = 0; step();
      check(!locked && sel == 2'(s + 1), "released; scan resumes at the next SSM");
    end
    // all four request; the owners come in cyclic order
    want = 4'b1111;
    n = 0; while (!locked && n < 10) begin step(); n++; end
    owner = sel;
    for (int k = 0; k < 4; k++) begin
      check(locked && int'(sel) == (owner + k) % 4, $sformatf("round robin owner %0d", (owner + k) % 4));
      want[sel] = 0; step(); want[(owner + k) % 4] = 1;
      n = 0; while (!locked && n < 10) begin step(); n++; end
    end
    // randomised: lock only on a hit, owner kept while it still asks
    for (int c = 0; c < 2000; c++) begin
      if (($urandom % 8) == 0) want = 4'($urandom);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // cycle-by-cycle properties, sampled just before each edge
  logic [1:0] sel_q; logic locked_q, hit_q;
  always @(posedge clk) begin
    if (rst_n && checks > 0) begin
      #1;
      if (locked_q && hit_q) check(locked && sel == sel_q, "owner keeps the grant");
      if (!locked_q && locked) check(hit_q && sel == sel_q, "lock only on a sampled hit");
      if (!locked_q && !hit_q) check(!locked && sel == sel_q + 2'd1, "scan steps by one");
    end
  end
  always @(negedge clk) begin sel_q = sel; locked_q = locked; hit_q = hit; end
endmodule
