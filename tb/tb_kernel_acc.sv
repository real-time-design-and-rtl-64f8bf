// Testbench for kernel_acc: feeds back-to-back groups of 24 x 8 random cross-products
// (lag k cycling 0..7, tagged like the shifting stage does) and checks each emitted
// 16-point kernel against sums formed here: SR(0..7), 0, conj(SR(7))..conj(SR(1)),
// with out_first on point 0 and consecutive indices. ce4 is every 2nd cycle.
module tb_kernel_acc;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ce4, in_v = 1'b0;
  cpx_p_t p;
  lag_tag_t tag;
  logic out_v, out_first;
  logic [BIN_W-1:0] out_idx;
  cpx_a_t sr;
  int checks = 0, failures = 0, cyc = 0;
  localparam int NG = 30;

  kernel_acc dut (.*);

  always #5 clk = ~clk;
  assign ce4 = cyc[0];
  always @(negedge clk) cyc++;

  int exp_re [NG][8], exp_im [NG][8];
  int go = 0, po = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (group %0d point %0d)", what, go, po);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_v) begin
    int er, ei;
    if (po < 8) begin
      er = exp_re[go][po];
      ei = exp_im[go][po];
    end else if (po == 8) begin
      er = 0;
      ei = 0;
    end else begin
      er = exp_re[go][16 - po];
      ei = -exp_im[go][16 - po];
    end
    check(int'(sr.re) == er && int'(sr.im) == ei, $sformatf("value got %0d,%0d exp %0d,%0d", sr.re, sr.im, er, ei));
    check(int'(out_idx) == po && out_first == (po == 0), "index");
    po++;
    if (po == 16) begin
      po = 0;
      go++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int g = 0; g < NG; g++) begin
      for (int k = 0; k < 8; k++) begin
        exp_re[g][k] = 0;
        exp_im[g][k] = 0;
      end
      for (int q = 0; q < 192; q++) begin
        int vr, vi;
        while (!ce4) @(negedge clk);
        @(negedge clk);
        vr = $signed($urandom % 65536) - 32768;
        vi = $signed($urandom % 65536) - 32768;
        p.re = PROD_W'(vr);
        p.im = PROD_W'(vi);
        tag.k = KW'(q % 8);
        tag.first = q < 8;
        tag.last = q == 191;
        exp_re[g][q % 8] += vr;
        exp_im[g][q % 8] += vi;
        in_v = 1'b1;
        @(negedge clk);
        in_v = 1'b0;
      end
    end
    repeat (100) @(negedge clk);
    check(go == NG && po == 0, $sformatf("all kernels emitted (%0d)", go));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
