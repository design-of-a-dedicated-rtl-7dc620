// tb_pwm_dac: for several codes, counts the high cycles of one whole PWM
// period (4096 clocks) and checks it equals code + 2048 (offset binary), and
// that the output has a single pulse per period.
module tb_pwm_dac;
  logic clk = 0, rst = 1;
  logic signed [11:0] code;
  logic pwm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pwm_dac #(.N_BITS(12)) dut (.clk, .rst, .code, .pwm);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs, edges;
    logic prev;
    int codes [8] = '{-2048, -1, 0, 1, 1024, 2047, -1000, 333};
    code = '0;
    @(negedge clk); rst = 0;
    foreach (codes[i]) begin
      code = 12'(codes[i]);
      // let the new code be taken at the next wrap, then measure a full period
      wait (dut.cnt == 12'hFFF); @(posedge clk); #1;
      wait (dut.cnt == 12'hFFF); @(posedge clk); #1;
      highs = 0; edges = 0; prev = pwm;
      repeat (4096) begin
        @(posedge clk); #1;
        if (pwm) highs++;
        if (pwm && !prev) edges++;
        prev = pwm;
      end
      check(highs == codes[i] + 2048, $sformatf("code %0d: %0d high cycles", codes[i], highs));
      check(edges <= 1, "one pulse per period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
