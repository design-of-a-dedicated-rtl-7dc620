// tb_param_latch: checks that reset loads the initial pair, that updates
// without a button press are ignored, that a press lets exactly one update
// through (with the loaded strobe), and that a press is seen only after the
// two-stage synchroniser. Then 2000 clocks of random button changes and
// update offers are compared on every clock with a cycle model of the latch.
module tb_param_latch;
  import ift_pkg::*;
  logic clk = 0, rst = 1, btn = 0, upd_valid = 0, armed, loaded;
  fx_t init0, init1, new0, new1, rho0, rho1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  param_latch dut (.clk, .rst, .btn, .init0, .init1, .upd_valid, .new0, .new1,
                   .rho0, .rho1, .armed, .loaded);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic offer(input fx_t a, input fx_t b);
    new0 = a; new1 = b; upd_valid = 1; @(negedge clk); upd_valid = 0;
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init0 = 32'sd104857; init1 = 32'sd209715; new0 = '0; new1 = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    check(rho0 == init0 && rho1 == init1 && !armed, "reset loads initial pair");
    offer(32'sd5, 32'sd6);
    check(rho0 == init0 && rho1 == init1 && !loaded, "update ignored without press");
    btn = 1; @(negedge clk); @(negedge clk);
    check(!armed, "press not yet through the synchroniser");
    @(negedge clk);
    check(armed, "press arms the latch");
    repeat (5) @(negedge clk);
    check(armed, "holding the button arms once");
    offer(32'sd11, 32'sd22);
    check(rho0 == 32'sd11 && rho1 == 32'sd22 && loaded && !armed, "armed update loaded");
    @(negedge clk);
    check(!loaded, "loaded is a strobe");
    offer(32'sd33, 32'sd44);
    check(rho0 == 32'sd11 && rho1 == 32'sd22, "second update needs a new press");
    btn = 0; repeat (3) @(negedge clk); btn = 1; repeat (4) @(negedge clk);
    offer(32'sd55, 32'sd66);
    check(rho0 == 32'sd55 && rho1 == 32'sd66, "new press lets the next update through");
    // random button and update traffic against a cycle model of the latch:
    // three-stage shift of the button, rising edge of stages 2/3 arms,
    // an update while armed loads and disarms
    btn = 0; repeat (4) @(negedge clk);
    begin
      bit [2:0] sh;
      bit arm_m, ld_m;
      fx_t m0, m1;
      sh = {btn, btn, btn}; arm_m = armed; m0 = rho0; m1 = rho1;
      for (int t = 0; t < 2000; t++) begin
        // inputs for the next edge
        if ($urandom_range(0, 15) == 0) btn = ~btn;
        upd_valid = ($urandom_range(0, 9) == 0);
        new0 = fx_t'($urandom); new1 = fx_t'($urandom);
        // model of that edge
        ld_m = 0;
        if (arm_m && upd_valid) begin m0 = new0; m1 = new1; arm_m = 0; ld_m = 1; end
        else if (sh[1] && !sh[2]) arm_m = 1;
        sh = {sh[1:0], btn};
        @(negedge clk);
        check(rho0 == m0 && rho1 == m1 && armed == arm_m && loaded == ld_m,
              $sformatf("random t=%0d: rho %0d %0d armed %0d loaded %0d, model %0d %0d %0d %0d",
                        t, rho0, rho1, armed, loaded, m0, m1, arm_m, ld_m));
      end
      upd_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
