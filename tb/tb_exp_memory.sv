// tb_exp_memory: writes all 1000 words with random data, reads them back in
// order with the one-cycle read latency and compares; then checks that a
// write without enable changes nothing.
module tb_exp_memory;
  logic clk = 0, we = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [11:0] wdata = '0, rdata;
  logic [11:0] model [1000];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  exp_memory #(.DEPTH(1000), .W(12)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

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
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      model[i] = 12'($urandom);
      we = 1; waddr = 10'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 1000; i++) begin
      raddr = 10'(i); @(negedge clk);
      check(rdata == model[i], $sformatf("addr %0d: %h exp %h", i, rdata, model[i]));
    end
    we = 0; waddr = 10'd7; wdata = ~model[7]; @(negedge clk);
    raddr = 10'd7; @(negedge clk);
    check(rdata == model[7], "no write without enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
