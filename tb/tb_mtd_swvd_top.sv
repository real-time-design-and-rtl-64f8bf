// End-to-end testbench of the MTD-SWVD processor at its default parameters.
//
// A reference model computed here from the simulator's scene formula forms, for every
// range cell, the interpolated sequence (samples at even indices, zeros at odd), the
// summed kernel SR(k) = sum_n x(n+k) x*(n-k), its Hermitian completion, a floating
// point 16-point DFT scaled by 1/16 and its magnitude. The test
//   1. replays one CPI and stops (`run` low), checking every FFT output and every
//      arranged word against the model (within TOL LSBs) and in the bin-major order,
//      and every CFAR decision against a CA-CFAR computed here on the arranged words;
//   2. replays one more CPI, which goes to the other RAM, and checks it the same way
//      (the words must repeat exactly, the scene being the same);
//   3. replays two CPIs back to back: at the published 384.6 kHz read rate the second
//      completes before the first is read, which must raise `overrun` once.
// It also checks the FFT latency (230..237 cycles from the kernel's first point) and
// counts the mechanisms - hold-on periods, Hermitian kernel points, both RAM banks,
// stop/restart of the simulator, detections at the target cell and with one-sided
// CFAR windows, overrun - failing any that never happened.
module tb_mtd_swvd_top;
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

  mtd_swvd_top dut (.*);

  always #5 clk = ~clk;

  localparam real TOL = 8.0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  real xr_ref [32][16], xi_ref [32][16], mag_ref [32][16];

  function automatic int nz(int a, int s);
    return (((a * 37 + s) * 53) % 256) / 32 - 4;
  endfunction

  function automatic void scene(int a, output int ei, output int eq);
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

  initial begin
    int sr_ [16], si_ [16];
    int kr [16], ki [16];
    for (int r = 0; r < 32; r++) begin
      for (int n = 0; n < 16; n++) begin
        sr_[n] = 0;
        si_[n] = 0;
      end
      for (int p = 0; p < 8; p++) scene(r * 8 + p, sr_[2 * p], si_[2 * p]);
      for (int k = 0; k < 8; k++) begin
        kr[k] = 0;
        ki[k] = 0;
        for (int n = k; n <= 15 - k; n++) begin
          kr[k] += sr_[n + k] * sr_[n - k] + si_[n + k] * si_[n - k];
          ki[k] += si_[n + k] * sr_[n - k] - sr_[n + k] * si_[n - k];
        end
      end
      kr[8] = 0;
      ki[8] = 0;
      for (int k = 9; k < 16; k++) begin
        kr[k] = kr[16 - k];
        ki[k] = -ki[16 - k];
      end
      for (int m = 0; m < 16; m++) begin
        real er, ei, ang;
        er = 0.0;
        ei = 0.0;
        for (int k = 0; k < 16; k++) begin
          ang = -2.0 * 3.14159265358979 * k * m / 16.0;
          er += kr[k] * $cos(ang) - ki[k] * $sin(ang);
          ei += kr[k] * $sin(ang) + ki[k] * $cos(ang);
        end
        xr_ref[r][m] = er / 16.0;
        xi_ref[r][m] = ei / 16.0;
        mag_ref[r][m] = $sqrt(er * er + ei * ei) / 16.0;
      end
    end
  end

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_hold = 0, n_herm = 0, n_swap_to [2] = '{0, 0}, n_stop = 0, n_restart = 0;
  int n_det = 0, n_det_target = 0, n_det_edge = 0, n_over = 0, n_lat = 0;
  logic iq_valid_d = 1'b0, sim_active_d = 1'b0;
  longint k_start = -1;

  always @(negedge clk) if (!rst) begin
    if (iq_valid_d && !iq_valid) n_hold++;
    iq_valid_d = iq_valid;
    if (sim_active_d && !sim_active) n_stop++;
    if (!sim_active_d && sim_active) n_restart++;
    sim_active_d = sim_active;
    if (dut.kv && int'(dut.kidx) > 8) n_herm++;
    if (dut.kv && dut.kfirst) k_start = cyc;
    if (bank_swap) n_swap_to[bank]++;
    if (overrun) n_over++;
  end

  // ---------------- FFT output check ----------------
  int f_r = 0, f_m = 0;
  always @(negedge clk) if (!rst && fft_v) begin
    if (f_m == 0) begin
      check(cyc - k_start >= 230 && cyc - k_start <= 237, $sformatf("FFT latency %0d", cyc - k_start));
      n_lat++;
    end
    check(int'(fft_idx) == f_m, "FFT output index");
    check(fabs(real'(fft_out.re) - xr_ref[f_r][f_m]) <= TOL && fabs(real'(fft_out.im) - xi_ref[f_r][f_m]) <= TOL,
          $sformatf("FFT r%0d m%0d got %0d,%0d exp %f,%f", f_r, f_m, fft_out.re, fft_out.im,
                    xr_ref[f_r][f_m], xi_ref[f_r][f_m]));
    f_m++;
    if (f_m == 16) begin
      f_m = 0;
      f_r = (f_r + 1) % 32;
    end
  end

  // ---------------- arranged data check ----------------
  int arr_word [16][32];
  bit have_arr = 1'b0;
  int a_pos = 0, a_reads = 0;
  always @(negedge clk) if (!rst && arr_v) begin
    int b, r;
    if (arr_bin == '0 && arr_range == '0) a_pos = 0;
    b = a_pos / 32;
    r = a_pos % 32;
    check(int'(arr_bin) == b && int'(arr_range) == r, "arranged order");
    check(fabs(real'(arr_data) - mag_ref[r][b]) <= TOL + 1.0,
          $sformatf("arranged r%0d b%0d got %0d exp %f", r, b, arr_data, mag_ref[r][b]));
    if (have_arr) check(arr_word[b][r] == int'(arr_data), "arranged word repeats");
    else arr_word[b][r] = int'(arr_data);
    a_pos++;
    if (a_pos == 512) begin
      have_arr = 1'b1;
      a_reads++;
    end
  end

  // ---------------- CFAR decision check ----------------
  int n_dec = 0, skip_ticks = 0;
  always @(negedge clk) if (!rst) begin
    if (overrun) skip_ticks = 12;
    else if (dut.arr_tick && skip_ticks > 0) skip_ticks--;
    if (det_v) begin
      int r, b;
      longint lead, lag, n;
      bit lok, lgk;
      r = int'(det_range);
      b = int'(det_bin);
      n_dec++;
      if (skip_ticks == 0) begin
        lead = 0;
        lag = 0;
        lok = r + 5 <= 31;
        lgk = r >= 5;
        for (int d = 2; d <= 5; d++) begin
          if (r + d <= 31) lead += arr_word[b][r + d];
          if (r - d >= 0) lag += arr_word[b][r - d];
        end
        n = (lok && lgk) ? lead + lag : lok ? 2 * lead : 2 * lag;
        check(longint'(det_noise) == n && int'(det_cut) == arr_word[b][r], "CFAR window sums");
        check(det == (longint'(det_cut) * 128 > n * 64), "CFAR decision");
        if (det) begin
          n_det++;
          if (r == 12 && b == 8) n_det_target++;
          if (!(lok && lgk)) n_det_edge++;
        end
      end
    end
  end

  task automatic wait_cpi_start();
    @(negedge clk);
    while (cpi_start) @(negedge clk);
    while (!cpi_start) @(negedge clk);
  endtask

  task automatic wait_decisions(int n);
    int target;
    target = n_dec + n;
    while (n_dec < target) @(negedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // 1. one CPI
    run = 1'b1;
    wait_cpi_start();
    run = 1'b0;
    wait_decisions(512);
    repeat (2000) @(negedge clk);
    check(!sim_active, "simulator stopped");
    $display("phase 1 done at %0d", cyc);
    // 2. one more CPI, into the other bank
    run = 1'b1;
    wait_cpi_start();
    run = 1'b0;
    wait_decisions(512);
    repeat (2000) @(negedge clk);
    $display("phase 2 done at %0d", cyc);
    // 3. two CPIs back to back
    run = 1'b1;
    wait_cpi_start();
    wait_cpi_start();
    run = 1'b0;
    $display("phase 3 run dropped at %0d", cyc);
    while (n_over == 0) @(negedge clk);
    $display("overrun at %0d", cyc);
    wait_decisions(512 + 5);
    repeat (3000) @(negedge clk);

    check(a_reads == 3, $sformatf("complete arranged CPIs %0d", a_reads));
    check(f_r == 0 && f_m == 0, "FFT frames complete");
    check(n_hold >= 4 * 32, $sformatf("hold-on periods %0d", n_hold));
    check(n_herm == 4 * 32 * 7, $sformatf("Hermitian kernel points %0d", n_herm));
    check(n_lat == 4 * 32, $sformatf("FFT frames %0d", n_lat));
    check(n_swap_to[0] >= 1 && n_swap_to[1] >= 1, $sformatf("bank swaps %0d/%0d", n_swap_to[0], n_swap_to[1]));
    check(n_stop >= 2 && n_restart >= 3, $sformatf("stops %0d restarts %0d", n_stop, n_restart));
    check(n_det_target >= 3, $sformatf("target detections %0d", n_det_target));
    check(n_det_edge >= 1, $sformatf("detections with a one-sided window %0d", n_det_edge));
    check(n_over == 1, $sformatf("overruns %0d", n_over));
    $display("mechanisms: hold=%0d hermitian=%0d fft_frames=%0d swaps=%0d/%0d stops=%0d restarts=%0d",
             n_hold, n_herm, n_lat, n_swap_to[0], n_swap_to[1], n_stop, n_restart);
    $display("            detections=%0d target=%0d one_sided=%0d overruns=%0d",
             n_det, n_det_target, n_det_edge, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
