// tb_exp_switch: for every legal combination of the experiment enables,
// with random data, checks which source reaches each net (and that a net
// with no enabled buffer reads 0).
module tb_exp_switch;
  import ift_pkg::*;
  logic y1, y2, uy1, uy2;
  word_t r, mem_rdata, ref_net, mem_wdata;
  fx_t e, u1, u2, grad_e, pi1_e, pi2_e, u_net;
  logic mem_we, grad_en, pi1_en, pi2_en;
  int checks = 0, failures = 0;

  exp_switch dut (.y1, .y2, .uy1, .uy2, .r, .mem_rdata, .e, .u1, .u2, .ref_net, .mem_we,
                  .mem_wdata, .grad_en, .grad_e, .pi1_en, .pi1_e, .pi2_en, .pi2_e, .u_net);

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
    logic [1:0] ys [3] = '{2'b00, 2'b01, 2'b10};
    for (int i = 0; i < 90; i++) begin
      {y2, y1}   = ys[i % 3];
      {uy2, uy1} = ys[(i / 3) % 3];
      r = word_t'($urandom); mem_rdata = word_t'($urandom);
      e = fx_t'($urandom % 2000000) - fx_t'(1000000);
      u1 = fx_t'($urandom); u2 = fx_t'($urandom);
      #1;
      check(ref_net == (y1 ? r : (y2 ? mem_rdata : '0)), "reference net: B1/B3");
      check(mem_we == y1, "memory write enable: B2");
      check(!y1 || (int'(mem_wdata) == int'(e >>> 10)), "memory data is the error word: B2");
      check(grad_en == y2 && grad_e == (y2 ? e : '0), "gradient path: B4");
      check(pi1_en == y1 && pi1_e == (y1 ? e : '0), "PI #1 path: B5");
      check(pi2_en == y2 && pi2_e == (y2 ? e : '0), "PI #2 path: B6");
      check(u_net == (uy1 ? u1 : (uy2 ? u2 : '0)), "plant drive net: B7/B8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
