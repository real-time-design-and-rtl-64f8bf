// Testbench for cfar: 16 bins x 32 range cells of random clutter-like values with
// random strong cells, streamed bin by bin with idle ticks in between and after. Each
// decision is compared with a reference computed here: reference windows of 4 cells
// beyond 1 guard cell on each side, a one-sided (doubled) window at the ends of the
// profile, and det = CUT > 4 * mean(reference cells).
module tb_cfar;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic in_tick = 1'b0, in_v = 1'b0;
  logic [MAG_W-1:0] din, cut;
  logic [RANGE_W-1:0] din_range, out_range;
  logic [BIN_W-1:0] din_bin, out_bin;
  logic out_v, det;
  logic [MAG_W+3:0] noise;
  int checks = 0, failures = 0;
  int val [16][32];
  int ob = 0, orr = 0, ndet = 0, nedge = 0;

  cfar dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (bin %0d range %0d)", what, ob, orr);
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
    longint lead, lag, n;
    bit lok, lgk;
    lead = 0;
    lag = 0;
    lok = orr + 5 <= 31;
    lgk = orr >= 5;
    for (int d = 2; d <= 5; d++) begin
      if (orr + d <= 31) lead += val[ob][orr + d];
      if (orr - d >= 0) lag += val[ob][orr - d];
    end
    n = (lok && lgk) ? lead + lag : lok ? 2 * lead : 2 * lag;
    check(int'(out_bin) == ob && int'(out_range) == orr, "order");
    check(longint'(noise) == n, $sformatf("noise got %0d exp %0d", noise, n));
    check(int'(cut) == val[ob][orr], "cut");
    check(det == (longint'(val[ob][orr]) * 128 > n * 64), "decision");
    if (det) ndet++;
    if (det && !(lok && lgk)) nedge++;
    orr++;
    if (orr == 32) begin
      orr = 0;
      ob++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int b = 0; b < 16; b++)
      for (int r = 0; r < 32; r++)
        val[b][r] = ($urandom % 6 == 0) ? 20000 + int'($urandom % 400000) : int'($urandom % 5000) * (b + 1);
    for (int b = 0; b < 16; b++) begin
      for (int r = 0; r < 32; r++) begin
        in_tick = 1'b1;
        in_v = 1'b1;
        din = MAG_W'(val[b][r]);
        din_range = RANGE_W'(r);
        din_bin = BIN_W'(b);
        @(negedge clk);
        in_tick = 1'b0;
        in_v = 1'b0;
        din = MAG_W'($urandom);
        @(negedge clk);
      end
      if (b % 4 == 3) begin   // idle ticks between bins
        in_tick = 1'b1;
        @(negedge clk);
        in_tick = 1'b0;
        @(negedge clk);
      end
    end
    repeat (8) begin
      in_tick = 1'b1;
      @(negedge clk);
      in_tick = 1'b0;
      repeat (2) @(negedge clk);
    end
    check(ob == 16 && orr == 0, $sformatf("all cells decided (%0d)", ob));
    check(ndet > 0 && nedge > 0, $sformatf("detections %0d, at the edges %0d", ndet, nedge));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
