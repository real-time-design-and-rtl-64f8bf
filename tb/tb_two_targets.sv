// Two-target workload: two moving targets in the same range cell, at normalised
// Doppler 2/8 and 4/8 of the PRF, both of amplitude 48 (the simulator's weather
// component is moved onto the target's range cell and made as strong as the target;
// ground clutter is switched off). A Wigner-Ville distribution taken at a single time
// index shows a cross term half-way between two such components (bin 6), while the
// summed distribution cancels it. The test checks, on the processor's FFT output for
// that range cell, that bins 4 and 8 are the two largest, that bin 6 stays below 5 %
// of them, and - with a single-instant Wigner-Ville kernel computed here for
// comparison - that the cross term would be at least as large as the target terms.
module tb_two_targets;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  cpx_s_t iq;
  logic iq_valid, cpi_start, sim_active;
  logic fft_v;
  logic [BIN_W-1:0] fft_idx;
  cpx_a_t fft_out;
  logic arr_v;
  logic [MAG_W-1:0] arr_data;
  logic [RANGE_W-1:0] arr_range;
  logic [BIN_W-1:0] arr_bin;
  logic bank, bank_swap, overrun;
  logic [4:0] clk_div;
  logic det_v, det;
  logic [MAG_W-1:0] det_cut;
  logic [MAG_W+3:0] det_noise;
  logic [RANGE_W-1:0] det_range;
  logic [BIN_W-1:0] det_bin;

  mtd_swvd_top #(
    .TGT_RANGE (12), .TGT_AMP (48), .WX_FIRST (12), .WX_AMP (48), .GND_AMP (0)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real mag [16];
  int f_r = 0, f_m = 0;
  bit done = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && fft_v && !done) begin
    if (f_r == 12) mag[f_m] = $sqrt(real'(fft_out.re) ** 2 + real'(fft_out.im) ** 2);
    f_m++;
    if (f_m == 16) begin
      f_m = 0;
      f_r++;
      if (f_r == 13) done = 1'b1;
    end
  end

  // Single-instant Wigner-Ville magnitude at bins 4, 6, 8 for the noise-free scene.
  function automatic void wvd_reference(output real a4, output real a6, output real a8);
    real xr [16], xi [16], kr [16], ki [16], er, ei, ang;
    real res [16];
    int n;
    for (int i = 0; i < 16; i++) begin
      xr[i] = 0.0;
      xi[i] = 0.0;
      kr[i] = 0.0;
      ki[i] = 0.0;
    end
    for (int p = 0; p < 8; p++) begin
      xr[2 * p] = 48.0 * $cos(3.14159265358979 * p) + 48.0 * $cos(3.14159265358979 * p / 2.0);
      xi[2 * p] = 48.0 * $sin(3.14159265358979 * p / 2.0);
    end
    n = 7;
    for (int k = 0; k < 8; k++) begin
      kr[k] = xr[n + k] * xr[n - k] + xi[n + k] * xi[n - k];
      ki[k] = xi[n + k] * xr[n - k] - xr[n + k] * xi[n - k];
    end
    for (int k = 9; k < 16; k++) begin
      kr[k] = kr[16 - k];
      ki[k] = -ki[16 - k];
    end
    for (int m = 0; m < 16; m++) begin
      er = 0.0;
      ei = 0.0;
      for (int k = 0; k < 16; k++) begin
        ang = -2.0 * 3.14159265358979 * k * m / 16.0;
        er += kr[k] * $cos(ang) - ki[k] * $sin(ang);
        ei += kr[k] * $sin(ang) + ki[k] * $cos(ang);
      end
      res[m] = $sqrt(er * er + ei * ei) / 16.0;
    end
    a4 = res[4];
    a6 = res[6];
    a8 = res[8];
  endfunction

  initial begin
    real w4, w6, w8, pk;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    run = 1'b1;
    while (!done) @(negedge clk);
    run = 1'b0;
    pk = (mag[4] < mag[8]) ? mag[4] : mag[8];
    for (int m = 0; m < 16; m++) begin
      $display("SWVD bin %2d : %10.1f", m, mag[m]);
      if (m != 4 && m != 8) check(mag[m] < pk, $sformatf("bin %0d below both target bins", m));
    end
    check(mag[6] < 0.05 * pk, "no cross term at bin 6");
    check(mag[4] > 0.8 * mag[8] && mag[8] > 0.8 * mag[4], "equal targets give equal peaks");
    wvd_reference(w4, w6, w8);
    $display("single-instant WVD bins 4/6/8 : %0.1f %0.1f %0.1f", w4, w6, w8);
    check(w6 >= w4 && w6 >= w8, "single-instant WVD shows the cross term");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
