// tb_pi_controller: drives random errors and parameter sets and compares u
// after every sample with u = u_prev + rho0 e + (rho1 T - rho0) e_prev
// (T = 0.1) computed here; checks hold without strobe and clear.
module tb_pi_controller;
  import ift_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0, clr = 0;
  fx_t e, rho0, rho1, u;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pi_controller dut (.clk, .rst, .en, .clr, .e, .rho0, .rho1, .u);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint um, ep, ev, r0, r1, tc;
    tc = rfx(0.1);
    e = '0; rho0 = '0; rho1 = '0;
    um = 0; ep = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      if (i % 50 == 0) begin
        r0 = rrand(2.0); r1 = rrand(20.0);
        rho0 = fx_t'(r0); rho1 = fx_t'(r1);
      end
      ev = rrand(1.5);
      e = fx_t'(ev);
      if (i == 150) begin
        clr = 1; @(negedge clk); clr = 0; um = 0; ep = 0;
        check(u == '0, "clear");
      end
      en = 1; @(negedge clk); en = 0;
      um = radd(um, radd(rmul(r0, ev), rmul(rsub(rmul(r1, tc), r0), ep)));
      ep = ev;
      check(longint'(u) == um, $sformatf("i=%0d u=%0d exp %0d", i, u, um));
      e = fx_t'(rrand(1.0));
      @(negedge clk);
      check(longint'(u) == um, "holds without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
