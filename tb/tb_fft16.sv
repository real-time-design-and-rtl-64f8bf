// Testbench for fft16: random, impulse and Hermitian frames (as the summed kernel is)
// are transformed and compared with a direct DFT computed here in floating point,
// X(m) = (1/16) sum_k x(k) exp(-j 2 pi k m / 16), within TOL LSBs. The first output
// of every frame must come 230..237 cycles (5.75 us at 40 MHz, rounded up to the next
// output strobe) after the start point. ce is every 4th cycle, ce_out every 8th.
module tb_fft16;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ce, ce_out, in_v = 1'b0, in_first = 1'b0, out_v;
  cpx_a_t din, dout;
  logic [BIN_W-1:0] out_idx;
  int checks = 0, failures = 0, cyc = 0;
  localparam int NF = 24;
  localparam int TOL = 8;

  fft16 dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;
  assign ce     = (cyc % 4) == 3;
  assign ce_out = (cyc % 8) == 7;

  real xr [NF][16], xi [NF][16];
  int start_cyc [NF];
  int fo = 0, mo = 0;

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (frame %0d bin %0d)", what, fo, mo);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_v) begin
    real er, ei, ang;
    er = 0.0;
    ei = 0.0;
    for (int k = 0; k < 16; k++) begin
      ang = -2.0 * 3.14159265358979 * k * mo / 16.0;
      er += xr[fo][k] * $cos(ang) - xi[fo][k] * $sin(ang);
      ei += xr[fo][k] * $sin(ang) + xi[fo][k] * $cos(ang);
    end
    er /= 16.0;
    ei /= 16.0;
    if (mo == 0) begin
      int lat;
      lat = cyc - start_cyc[fo];
      check(lat >= 230 && lat <= 237, $sformatf("latency %0d", lat));
    end
    check(int'(out_idx) == mo, "index");
    check(fabs(real'(dout.re) - er) <= TOL && fabs(real'(dout.im) - ei) <= TOL,
          $sformatf("got %0d,%0d exp %f,%f", dout.re, dout.im, er, ei));
    mo++;
    if (mo == 16) begin
      mo = 0;
      fo++;
    end
  end

  initial begin
    int vr [16], vi [16];
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int f = 0; f < NF; f++) begin
      for (int k = 0; k < 16; k++) begin
        case (f % 4)
          0: begin vr[k] = (k == f % 16) ? 262143 : 0; vi[k] = 0; end
          1: begin vr[k] = -262144 + int'($urandom % 524288); vi[k] = -262144 + int'($urandom % 524288); end
          default: begin vr[k] = -185000 + int'($urandom % 370000); vi[k] = -185000 + int'($urandom % 370000); end
        endcase
      end
      if (f % 4 == 2) begin   // Hermitian: x(16-k) = conj(x(k)), x(8) = 0, x(0) real
        vi[0] = 0;
        vr[8] = 0;
        vi[8] = 0;
        for (int k = 9; k < 16; k++) begin
          vr[k] = vr[16 - k];
          vi[k] = -vi[16 - k];
        end
      end
      for (int k = 0; k < 16; k++) begin
        while (!ce) @(negedge clk);
        @(negedge clk);
        din.re = ACC_W'(vr[k]);
        din.im = ACC_W'(vi[k]);
        xr[f][k] = real'(vr[k]);
        xi[f][k] = real'(vi[k]);
        in_v = 1'b1;
        in_first = (k == 0);
        if (k == 0) start_cyc[f] = cyc;
        @(negedge clk);
        in_v = 1'b0;
        in_first = 1'b0;
      end
      while (fo <= f) @(negedge clk);
      repeat ($urandom % 20) @(negedge clk);
    end
    check(fo == NF, "all frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
