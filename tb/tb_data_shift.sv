// Testbench for data_shift: random groups of 24 shifted samples, sometimes separated
// by idle shifts of random data. Every emitted pair must be (x(n+k), x(n-k)) for
// n = t-7 and k = 0..7 in order, with samples before the group's start counting as
// zero; each group yields exactly 24*8 pairs with the first/last tags, and no pair
// may appear between groups. Here ce4 is every cycle and ce2 every 8th cycle.
module tb_data_shift;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ce2, ce4;
  cpx_s_t din, xa, xb;
  logic din_first, pv;
  lag_tag_t tag;
  int checks = 0, failures = 0, cyc = 0;

  data_shift dut (.*);

  always #5 clk = ~clk;
  assign ce4 = 1'b1;
  assign ce2 = (cyc % 8) == 7;

  cpx_s_t hist [2][24];
  int gm = -1, tm = 0;      // model: group being recorded, its shift index
  int gc = 0, q = 0;        // checker: group being checked, its pair index

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (group %0d pair %0d)", what, gc, q);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: record what the block shifts in.
  always @(posedge clk) if (!rst && ce2) begin
    if (din_first) begin
      gm++;
      tm = 0;
      hist[gm % 2][0] = din;
    end else if (gm >= 0 && tm < 23) begin
      tm++;
      hist[gm % 2][tm] = din;
    end
  end

  // Checker.
  always @(negedge clk) if (!rst && pv) begin
    int t, k, ia, ib;
    cpx_s_t ea, eb;
    t  = q / 8;
    k  = q % 8;
    ia = t - 7 + k;
    ib = t - 7 - k;
    ea = (ia >= 0) ? hist[gc % 2][ia] : '0;
    eb = (ib >= 0) ? hist[gc % 2][ib] : '0;
    check(gc <= gm, "pair outside a group");
    check(xa == ea && xb == eb, $sformatf("pair t=%0d k=%0d", t, k));
    check(int'(tag.k) == k && tag.first == (t == 0) && tag.last == (q == 191), "tags");
    q++;
    if (q == 192) begin
      q = 0;
      gc++;
    end
  end

  initial begin
    din = '0;
    din_first = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int g = 0; g < 40; g++) begin
      int gap;
      gap = ($urandom % 3 == 0) ? 1 + $urandom % 10 : 0;
      for (int s = 0; s < 24 + gap; s++) begin
        while (!ce2) @(negedge clk) cyc++;
        @(posedge clk);
        din <= cpx_s_t'($urandom);
        din_first <= (s == gap);
        @(negedge clk) cyc++;
      end
    end
    repeat (400) @(negedge clk) cyc++;
    check(gc == 40 && q == 0, $sformatf("all groups complete (%0d)", gc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
