// Testbench for interpolator: a random sample stream at the ce1 rate must come out as
// sample, 0, sample, 0, ... at the ce2 rate, with the start mark on the sample slot.
module tb_interpolator;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ce1, ce2;
  cpx_s_t din, dout;
  logic din_first, dout_first;
  int checks = 0, failures = 0, cyc = 0;

  interpolator dut (.*);

  always #5 clk = ~clk;
  assign ce2 = (cyc % 4) == 3;
  assign ce1 = (cyc % 8) == 7;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpx_s_t held;
    logic held_first;
    din = '0;
    din_first = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      held = din;
      held_first = din_first;
      if (ce1) begin
        din <= cpx_s_t'($urandom);
        din_first <= ($urandom % 4) == 0;
      end
      if (ce2) begin
        bit zero_slot;
        zero_slot = ce1;
        @(negedge clk);
        checks++;
        if (zero_slot ? (dout != '0 || dout_first) : (dout != held || dout_first != held_first)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d zero_slot=%0d", cyc, zero_slot);
        end
        cyc++;
      end else begin
        @(negedge clk);
        cyc++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
