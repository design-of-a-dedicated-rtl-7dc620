// tb_adc_sampler: checks the ADC process: on a strobe the Q11.20 input is
// truncated to Q2.10 and clipped to -2048..2047; without a strobe the
// output holds.
module tb_adc_sampler;
  import ift_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  fx_t ain;
  word_t dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  adc_sampler dut (.clk, .rst, .en, .ain, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, expv;
    ain = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    check(dout == '0, "reset value");
    for (int i = 0; i < 200; i++) begin
      v = (i % 4 == 0) ? rrand(8.0) : rrand(1.9);
      ain = fx_t'(v); en = 1;
      @(negedge clk); en = 0;
      expv = rword(v);
      check(longint'(dout) == expv, $sformatf("in %0d out %0d exp %0d", v, dout, expv));
      ain = fx_t'(rrand(1.0));
      @(negedge clk);
      check(longint'(dout) == expv, "holds without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
