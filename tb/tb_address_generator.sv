// tb_address_generator: for every location (i, j) of the 4 x 8 network, feeds
// the address the preceding SE would give (sign for SE(0,0), horizontal
// outputs of SE(i-1,0) for the top row, vertical outputs of SE(i,j-1)
// otherwise) and checks the computed address outputs, reset_bar three cycles
// after reset, enable 3 * (32 - (8i + j)) cycles after that, and that a
// reset drops enable and reset_bar at once.
module tb_address_generator;
  logic clk = 0, reset_n = 0, sign = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  logic [2:0] ai, aj, a_ih, a_iv, a_jb;
  logic enable, reset_bar;
  address_generator dut (.clk, .reset_n, .sign, .addr_i_in(ai), .addr_j_in(aj), .enable,
                         .reset_bar, .addr_ih(a_ih), .addr_iv(a_iv), .addr_jb(a_jb));
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int t_rb, t_en, n, loc;
  initial begin
    ai = 0; aj = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 8; j++) begin
      reset_n = 0;
      sign = (i == 0 && j == 0);
      if (sign) begin ai = 3'b101; aj = 3'b110; end          // ignored when sign is set
      else if (j == 0) begin ai = {2'(i - 1), 1'b0}; aj = 3'd0; end
      else begin ai = {2'(i), 1'b1}; aj = 3'(j - 1); end
      repeat (2) @(posedge clk);
      #1 check(!enable && !reset_bar, "outputs low during reset");
      reset_n = 1;
      n = 0; t_rb = -1; t_en = -1;
      while (t_en < 0 && n < 200) begin
        @(posedge clk); n++; #1;
        if (reset_bar && t_rb < 0) t_rb = n;
        if (enable && t_en < 0) t_en = n;
        if (t_rb < 0) check(!enable, "no enable before reset_bar");
      end
      loc = i * 8 + j;
      check(a_ih == {2'(i), 1'b0} && a_iv == {2'(i), 1'b1} && a_jb == 3'(j),
            $sformatf("(%0d,%0d): ih=%b iv=%b jb=%b", i, j, a_ih, a_iv, a_jb));
      check(t_rb == 3, $sformatf("(%0d,%0d): reset_bar after %0d cycles", i, j, t_rb));
      check(t_en == 4 + 3 * (32 - loc), $sformatf("(%0d,%0d): enable after %0d cycles (%0d expected)",
            i, j, t_en, 4 + 3 * (32 - loc)));
      @(posedge clk); #1 check(enable && reset_bar, "enable stays high");
      #2 reset_n = 0; #1;
      check(!enable && !reset_bar, "asynchronous reset clears enable and reset_bar");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
