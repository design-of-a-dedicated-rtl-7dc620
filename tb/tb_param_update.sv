// tb_param_update: random parameters, gamma and gradient sums; checks
// rho' = rho - gamma * (dJ * round(2^20/N) >> 20) with N = 1000, the one-
// cycle valid strobe and that outputs hold until the next start. One case
// is also checked in real arithmetic against rho - gamma*dJ/N (to 1e-3).
module tb_param_update;
  import ift_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, valid;
  fx_t rho0, rho1, gamma, rho0_new, rho1_new;
  acc_t dj0, dj1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  param_update #(.N(1000)) dut (.clk, .rst, .start, .rho0, .rho1, .gamma, .dj0, .dj1,
                                .valid, .rho0_new, .rho1_new);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint mean(input longint s);
    return sat((s * 1049) >>> 20);   // round(2^20/1000) = 1049
  endfunction

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r0, r1, gm, s0, s1, e0, e1;
    real expr;
    rho0 = '0; rho1 = '0; gamma = '0; dj0 = '0; dj1 = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    // real-valued case: rho0 = 1, rho1 = 6, gamma = 2.2, dJ0 = 50, dJ1 = -120
    rho0 = fx_t'(rfx(1.0)); rho1 = fx_t'(rfx(6.0)); gamma = fx_t'(rfx(2.2));
    dj0 = acc_t'(rfx(50.0)); dj1 = acc_t'(rfx(-120.0));
    start = 1; @(negedge clk); start = 0;
    check(valid == 1'b1, "valid one cycle after start");
    expr = 1.0 - 2.2 * 50.0 / 1000.0;
    check((rreal(longint'(rho0_new)) - expr) < 1e-3 && (expr - rreal(longint'(rho0_new))) < 1e-3,
          $sformatf("rho0' %f exp %f", rreal(longint'(rho0_new)), expr));
    expr = 6.0 + 2.2 * 120.0 / 1000.0;
    check((rreal(longint'(rho1_new)) - expr) < 1e-3 && (expr - rreal(longint'(rho1_new))) < 1e-3,
          $sformatf("rho1' %f exp %f", rreal(longint'(rho1_new)), expr));
    @(negedge clk);
    check(valid == 1'b0, "valid is one cycle");
    for (int i = 0; i < 200; i++) begin
      r0 = rrand(4.0); r1 = rrand(30.0); gm = rfx(real'($urandom % 100000) / 1000.0);
      s0 = (i % 10 == 0) ? (64'sd1 <<< 42) : rrand(1000.0);
      s1 = rrand(1000.0);
      rho0 = fx_t'(r0); rho1 = fx_t'(r1); gamma = fx_t'(gm); dj0 = acc_t'(s0); dj1 = acc_t'(s1);
      start = 1; @(negedge clk); start = 0;
      e0 = rsub(r0, rmul(gm, mean(s0)));
      e1 = rsub(r1, rmul(gm, mean(s1)));
      check(valid && longint'(rho0_new) == e0 && longint'(rho1_new) == e1,
            $sformatf("case %0d: %0d %0d exp %0d %0d", i, rho0_new, rho1_new, e0, e1));
      rho0 = fx_t'(rrand(1.0)); dj0 = '0;
      @(negedge clk);
      check(!valid && longint'(rho0_new) == e0, "holds until next start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
