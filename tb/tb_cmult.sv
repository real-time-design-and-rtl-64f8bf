// Testbench for cmult: random and extreme 8-bit operands; p must equal a*conj(b),
// computed here with integers, one cycle after in_v, with the tag carried along.
module tb_cmult;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1, in_v = 1'b0, out_v;
  cpx_s_t a, b;
  cpx_p_t p;
  lag_tag_t in_tag, out_tag;
  int checks = 0, failures = 0;

  cmult dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ar, ai, br, bi, er, ei;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      if (i < 4) begin
        a = '{re: -8'sd128, im: (i[0] ? -8'sd128 : 8'sd127)};
        b = '{re: -8'sd128, im: (i[1] ? -8'sd128 : 8'sd127)};
      end else begin
        a = cpx_s_t'($urandom);
        b = cpx_s_t'($urandom);
      end
      in_tag = lag_tag_t'($urandom);
      in_v = 1'b1;
      ar = a.re; ai = a.im; br = b.re; bi = b.im;
      er = ar * br + ai * bi;
      ei = ai * br - ar * bi;
      @(negedge clk);
      in_v = 1'b0;
      checks++;
      if (!out_v || int'(p.re) != er || int'(p.im) != ei || out_tag != in_tag) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: got %0d,%0d exp %0d,%0d", i, p.re, p.im, er, ei);
      end
      @(negedge clk);
      checks++;
      if (out_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
