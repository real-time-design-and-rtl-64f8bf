// Testbench for synchronizer: checks the period of every clock enable (64, 32, 8, 4
// and 104 master cycles, i.e. 625 kHz, 1.25 MHz, 5 MHz, 10 MHz and 384.6 kHz at
// 40 MHz), the 50 % duty of the divided clocks, the nesting ce1 -> ce2 -> ce3 -> ce4,
// and the 8-count / 4-hold group
// pattern with its start mark.
module tb_synchronizer;
  logic clk = 1'b0, rst = 1'b1;
  logic ce1, ce2, ce3, ce4, ce5, count_en, grp_start;
  logic [4:0] clk_div;
  int high [5] = '{0, 0, 0, 0, 0};
  int checks = 0, failures = 0;
  int last [5];
  int cyc = 0;
  int ph = 0;
  localparam int EXP [5] = '{64, 32, 8, 4, 104};

  synchronizer dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] ce;
    for (int i = 0; i < 5; i++) last[i] = -1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (cyc = 0; cyc < 64 * 12 * 5; cyc++) begin
      @(negedge clk);
      ce = {ce5, ce4, ce3, ce2, ce1};
      for (int i = 0; i < 5; i++) if (ce[i]) begin
        if (last[i] >= 0) check(cyc - last[i] == EXP[i], $sformatf("period of ce%0d", i + 1));
        else check(cyc == EXP[i] - 1, $sformatf("first ce%0d", i + 1));
        last[i] = cyc;
      end
      for (int i = 0; i < 5; i++) begin
        high[i] += clk_div[i];
        if (ce[i]) begin
          if (last[i] >= EXP[i]) check(high[i] == EXP[i] / 2, $sformatf("CLK%0d duty", i + 1));
          check(!clk_div[i], $sformatf("CLK%0d low at period end", i + 1));
          high[i] = 0;
        end
      end
      if (ce1) check(ce2 && ce3 && ce4, "ce1 implies ce2, ce3, ce4");
      if (ce2) check(ce3 && ce4, "ce2 implies ce3, ce4");
      if (ce3) check(ce4, "ce3 implies ce4");
      if (ce1) begin
        check(count_en == (ph < 8), "count_en pattern");
        check(grp_start == (ph == 0), "grp_start pattern");
        ph = (ph + 1) % 12;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
