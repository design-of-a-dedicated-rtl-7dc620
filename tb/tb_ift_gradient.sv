// tb_ift_gradient: feeds random e2 samples with coefficients from random
// (rho0, rho1) and compares the filter outputs and the two gradient sums
// with the recursions g0 = a g0 + k (e2 - e2_prev), g1 = a g1 + k e2,
// dJ += e2 g computed here. Also checks that the filter matches the
// exact transfer function (z-1)/((rho0+rho1)z - rho0) on an impulse (in
// real arithmetic, to 1e-3) and that clr restarts it.
module tb_ift_gradient;
  import ift_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0, clr = 0;
  fx_t e2, k, a, g0, g1;
  acc_t dj0, dj1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ift_gradient dut (.clk, .rst, .en, .clr, .e2, .k, .a, .g0, .g1, .dj0, .dj1);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint g0m, g1m, d0m, d1m, ep, ev, km, am;
    real r0, r1, h0, h1, hp;
    e2 = '0; k = '0; a = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    // impulse response against the exact filter, rho0 = 1, rho1 = 6
    r0 = 1.0; r1 = 6.0;
    k = fx_t'(rfx(1.0 / (r0 + r1))); a = fx_t'(rfx(r0 / (r0 + r1)));
    clr = 1; @(negedge clk); clr = 0;
    h0 = 0.0; h1 = 0.0; hp = 0.0;
    for (int t = 0; t < 10; t++) begin
      real x;
      x = (t == 0) ? 1.0 : 0.0;
      e2 = fx_t'(rfx(x)); en = 1; @(negedge clk); en = 0;
      h0 = (r0 * h0 + (x - hp)) / (r0 + r1);
      h1 = (r0 * h1 + x) / (r0 + r1);
      hp = x;
      check((rreal(longint'(g0)) - h0) < 1e-3 && (h0 - rreal(longint'(g0))) < 1e-3,
            $sformatf("impulse g0[%0d]=%f exact %f", t, rreal(longint'(g0)), h0));
      check((rreal(longint'(g1)) - h1) < 1e-3 && (h1 - rreal(longint'(g1))) < 1e-3,
            $sformatf("impulse g1[%0d]=%f exact %f", t, rreal(longint'(g1)), h1));
    end
    // random runs against the bit-exact recursion
    for (int run = 0; run < 4; run++) begin
      r0 = 0.1 + 2.0 * real'($urandom % 1000) / 1000.0;
      r1 = 0.1 + 16.0 * real'($urandom % 1000) / 1000.0;
      km = rfx(1.0 / (r0 + r1)); am = rmul(rfx(r0), km);
      k = fx_t'(km); a = fx_t'(am);
      clr = 1; @(negedge clk); clr = 0;
      check(g0 == '0 && g1 == '0 && dj0 == '0 && dj1 == '0, "clr zeroes state");
      g0m = 0; g1m = 0; d0m = 0; d1m = 0; ep = 0;
      for (int t = 0; t < 100; t++) begin
        ev = rrand(1.5);
        e2 = fx_t'(ev); en = 1; @(negedge clk); en = 0;
        g0m = radd(rmul(am, g0m), rmul(km, rsub(ev, ep)));
        g1m = radd(rmul(am, g1m), rmul(km, ev));
        d0m = sat_acc(d0m + rmul(ev, g0m));
        d1m = sat_acc(d1m + rmul(ev, g1m));
        ep = ev;
        check(longint'(g0) == g0m && longint'(g1) == g1m, $sformatf("run %0d t %0d filters", run, t));
        check(longint'(dj0) == d0m && longint'(dj1) == d1m, $sformatf("run %0d t %0d sums", run, t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
