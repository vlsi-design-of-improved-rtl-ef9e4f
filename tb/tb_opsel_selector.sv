// tb_opsel_selector: random requests and forward pipes from four SSMs; for
// each output port instance and each sel value, checks hit (request valid and
// for this port) and that the forward pipe of the selected SSM is passed on.
module tb_opsel_selector;
  import iln_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  logic [1:0] sel;
  prt_req_t [SE_PORTS-1:0] prt_req;
  fwd_t [SE_PORTS-1:0] ssm_fwd;
  logic hit [SE_PORTS];
  fwd_t fwd_sel [SE_PORTS];
  for (genvar m = 0; m < SE_PORTS; m++) begin : g_sel
    opsel_selector #(.MY_PORT(m)) dut (.sel, .prt_req, .ssm_fwd, .hit(hit[m]), .fwd_sel(fwd_sel[m]));
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < SE_PORTS; k++) begin
        prt_req[k].valid = 1'($urandom);
        prt_req[k].port  = 2'($urandom);
        ssm_fwd[k] = 34'({$urandom, $urandom});
      end
      sel = 2'($urandom);
      #1;
      for (int m = 0; m < SE_PORTS; m++) begin
        check(hit[m] == (prt_req[sel].valid && prt_req[sel].port == 2'(m)),
              $sformatf("hit of port %0d for SSM %0d", m, sel));
        check(fwd_sel[m] == ssm_fwd[sel], $sformatf("pipe of SSM %0d at port %0d", sel, m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
