// Testbench for data_arrange: writes CPIs of random words in range-major order
// (address range*16 + bin) and checks that each completed CPI is read back bin by bin,
// range cells 0..31 within a bin, with correct values and tags, while the next CPI is
// written to the other RAM. Checks the bank swaps, and that a CPI completed while the
// previous one is still being read raises `overrun` and restarts the reading.
module tb_data_arrange;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ce_r, wr_v = 1'b0;
  logic [MAG_W-1:0] wr_data, rd_data;
  logic rd_tick, rd_v, wbank, swap, overrun;
  logic [RANGE_W-1:0] rd_range;
  logic [BIN_W-1:0] rd_bin;
  int checks = 0, failures = 0, cyc = 0;
  int rdiv = 3;
  localparam int NC = 6;

  data_arrange dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;
  assign ce_r = (cyc % rdiv) == 0;

  logic [MAG_W-1:0] mem [NC][512];
  int rd_cpi = -1, pend_cpi = -1, pos = 0, nswap = 0, nover = 0, full_reads = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cpi %0d pos %0d)", what, rd_cpi, pos);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    if (swap) nswap++;
    if (overrun) nover++;
    if (rd_v) begin
      int b, r;
      // A completed CPI is read from its first word on; an interrupted read may still
      // deliver one word of the previous CPI.
      if (pend_cpi != rd_cpi && rd_bin == '0 && rd_range == '0) begin
        rd_cpi = pend_cpi;
        pos = 0;
      end
      b = pos / 32;
      r = pos % 32;
      check(rd_cpi >= 0 && pos < 512, "read while idle");
      check(int'(rd_bin) == b && int'(rd_range) == r, "read order");
      check(rd_data == mem[rd_cpi][r * 16 + b], "read data");
      pos++;
      if (pos == 512) full_reads++;
    end
  end

  task automatic write_cpi(int c, int spacing, bit avoid_ce);
    for (int a = 0; a < 512; a++) begin
      mem[c][a] = MAG_W'($urandom);
      while (avoid_ce && (cyc % rdiv) == 0) @(negedge clk);
      wr_data = mem[c][a];
      wr_v = 1'b1;
      @(negedge clk);
      wr_v = 1'b0;
      if (a == 511) begin
        check(swap && wbank == 1'(~c[0]), "bank swap after last word");
        if (pend_cpi >= 0) check(overrun == (pend_cpi != rd_cpi || pos < 512), "overrun flag");
        pend_cpi = c;
      end
      repeat (spacing) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(wbank == 1'b0, "initial bank");
    // Reader (3 cycles/word) faster than writer (4 cycles/word): no overrun.
    for (int c = 0; c < 4; c++) write_cpi(c, 3, 1'b0);
    // Writer at a word per cycle: CPIs 4 and 5 complete while 3 and 4 are read.
    write_cpi(4, 0, 1'b1);
    write_cpi(5, 0, 1'b1);
    while (rd_cpi != 5 || pos < 512) @(negedge clk);
    repeat (20) @(negedge clk);
    check(nswap == 6, $sformatf("swaps %0d", nswap));
    check(nover == 2, $sformatf("overruns %0d", nover));
    check(full_reads == 4, $sformatf("complete CPI reads %0d", full_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
