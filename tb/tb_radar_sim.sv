// Testbench for radar_sim: replays the CPI and compares every sample with the scene
// formula (recomputed here), checks the zero output during the 4 hold-on strobes,
// the range-cell and CPI start marks, and that `run` stops and restarts whole CPIs.
// The group timing is generated here with a fast ce1 (every 4 cycles).
module tb_radar_sim;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic ce1 = 1'b0, count_en, grp_start;
  cpx_s_t sample;
  logic valid, first, cpi_start, active;
  int checks = 0, failures = 0;
  int ph = 0;

  radar_sim dut (.*);

  always #5 clk = ~clk;

  assign count_en  = ph < 8;
  assign grp_start = ph == 0;

  function automatic int nz(int a, int s);
    return (((a * 37 + s) * 53) % 256) / 32 - 4;
  endfunction

  function automatic void expect_iq(int a, output int ei, output int eq);
    int r = a / 8, p = a % 8;
    ei = nz(a, 11);
    eq = nz(a, 101);
    if (r == 12) ei += (p % 2 == 0) ? 48 : -48;
    if (r >= 20) begin
      if (p % 4 == 0) ei += 12;
      if (p % 4 == 1) eq += 12;
      if (p % 4 == 2) ei -= 12;
      if (p % 4 == 3) eq -= 12;
    end
    if (r <= 5) begin
      ei += 20;
      eq += 20;
    end
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One "CLK1 period" = 4 cycles; runs `groups` groups and checks the output.
  task automatic run_groups(int groups, bit expect_active, inout int a);
    int ei, eq;
    for (int g = 0; g < groups; g++) begin
      for (int q = 0; q < 12; q++) begin
        @(negedge clk) ce1 = 1'b1;
        @(negedge clk) ce1 = 1'b0;
        if (expect_active && q < 8) begin
          expect_iq(a, ei, eq);
          check(valid && int'(sample.re) == ei && int'(sample.im) == eq,
                $sformatf("sample %0d: got %0d,%0d exp %0d,%0d", a, sample.re, sample.im, ei, eq));
          check(first == (q == 0), "first mark");
          check(cpi_start == (q == 0 && a == 0), "cpi_start mark");
          a = (a + 1) % 256;
        end else begin
          check(!valid && sample == '0 && !first, $sformatf("zero output g%0d q%0d", g, q));
        end
        ph = (ph + 1) % 12;
        @(negedge clk);
        @(negedge clk);
      end
    end
  endtask

  initial begin
    int a = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run = 1'b1;
    run_groups(32, 1'b1, a);   // CPI 1
    run_groups(5, 1'b1, a);    // start of CPI 2, run dropped during it
    run = 1'b0;
    run_groups(27, 1'b1, a);   // CPI 2 completes
    run_groups(32, 1'b0, a);   // stopped
    check(!active, "inactive after stop");
    run = 1'b1;
    run_groups(32, 1'b1, a);   // restarts at address 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
