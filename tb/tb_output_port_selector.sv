// tb_output_port_selector: four SSM models ask for random output ports, hold
// a granted port for a random time, or give up after a time-out. Every cycle
// it checks that a granted SSM's forward pipe reaches its port and the port's
// acknowledge reaches the SSM, that no port serves two SSMs, that a port
// nobody asks for drives zeros, and that every SSM is served repeatedly.
module tb_output_port_selector;
  import iln_pkg::*;
  logic clk = 0, enable = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  prt_req_t [SE_PORTS-1:0] prt_req;
  logic [SE_PORTS-1:0] prt_gnt, ssm_ack, seo_ack;
  fwd_t [SE_PORTS-1:0] ssm_fwd, seo_fwd;
  output_port_selector dut (.clk, .enable, .prt_req, .prt_gnt, .ssm_fwd, .ssm_ack, .seo_fwd, .seo_ack);
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int grants [SE_PORTS], timeouts [SE_PORTS];
  logic [SE_PORTS-1:0] holding;
  for (genvar k = 0; k < SE_PORTS; k++) begin : g_ssm
    initial begin
      prt_req[k] = '0; holding[k] = 0; grants[k] = 0; timeouts[k] = 0;
      @(posedge enable);
      forever begin
        int w;
        repeat ($urandom % 4) @(posedge clk);
        #1 prt_req[k].valid = 1; prt_req[k].port = 2'($urandom);
        w = 0;
        while (!prt_gnt[k] && w < 8) begin @(posedge clk); #1 w++; end
        if (prt_gnt[k]) begin
          grants[k]++; holding[k] = 1;
          repeat (1 + $urandom % 10) @(posedge clk);
          #1 holding[k] = 0;
        end else timeouts[k]++;
        prt_req[k] = '0;
        @(posedge clk);
      end
    end
  end

  // random traffic on the pipes
  always @(negedge clk) begin
    for (int k = 0; k < SE_PORTS; k++) ssm_fwd[k] = 34'({$urandom, $urandom});
    seo_ack = 4'($urandom);
  end

  logic [SE_PORTS-1:0] asked_q;
  always @(negedge clk) begin
    #2;
    if (enable) begin
      for (int o = 0; o < SE_PORTS; o++) begin
        int users;
        logic asked;
        users = 0; asked = 0;
        for (int k = 0; k < SE_PORTS; k++) begin
          if (prt_req[k].valid && prt_req[k].port == 2'(o)) asked = 1;
          if (holding[k] && prt_req[k].port == 2'(o)) begin
            users++;
            check(seo_fwd[o] == ssm_fwd[k], $sformatf("port %0d carries SSM %0d", o, k));
            check(ssm_ack[k] == seo_ack[o], $sformatf("ack of port %0d reaches SSM %0d", o, k));
          end
        end
        check(users <= 1, $sformatf("port %0d serves one SSM", o));
        if (!asked && !asked_q[o]) check(seo_fwd[o] == '0, $sformatf("idle port %0d drives zero", o));
        asked_q[o] = asked;
      end
    end
  end

  initial begin
    seo_ack = 0; asked_q = 0;
    repeat (3) @(posedge clk);
    #1 enable = 1;
    repeat (20000) @(posedge clk);
    for (int k = 0; k < SE_PORTS; k++)
      check(grants[k] > 100, $sformatf("SSM %0d served %0d times (%0d time-outs)", k, grants[k], timeouts[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
