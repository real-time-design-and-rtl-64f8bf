// MTD-SWVD processor: moving-target detection whose Doppler filter bank is a summed
// Wigner-Ville distribution (SWVD), with its own radar signal simulator.
//
// Chain (one master clock, divided rates as clock enables from the synchronizer):
//   radar_sim    32 range cells x 8 pulses, 8 samples + 4 hold-on per cell at CLK1
//   interpolator zero-stuffing by 2 at CLK2
//   data_shift   15-register line, pairs x(n+k), x(n-k), k = 0..7 at CLK4
//   cmult        x(n+k) * conj(x(n-k))
//   kernel_acc   SR(k) summed over n, serialised as the 16-point Hermitian kernel
//   fft16        16-point FFT, 1/16 scaled, 5.75 us start-to-output latency
//   magnitude    |X(m)|, written to the arrangement RAMs at CLK3
//   data_arrange ping-pong corner turn to bin-major order, read at CLK5
//   cfar         cell-averaging CFAR along range per Doppler bin
// While one CPI is being acquired the previous one is read out and thresholded. At the
// published CLK5 rate (DIV5 = 104) reading a CPI takes 53,248 cycles against 24,576 for
// acquiring one, so back-to-back CPIs raise `overrun`; spaced CPIs (drop `run`) or
// DIV5 <= 47 avoid it.
//
// Parameters: CLK5 divider, FFT latency, CFAR window/threshold, and the scene of the
// radar simulator. Ports: `run` replays the simulator CPI (sampled at CPI boundaries). The outputs are
// the monitoring points of the published test set-up - the I/Q samples, the FFT output,
// the arranged data fed to the CFAR and the final decisions - plus the bank swap and
// overrun flags of the arrangement block; sim_active is high while the simulator is
// replaying a CPI. All are synchronous to clk (40 MHz).
module mtd_swvd_top import mtd_pkg::*; #(
  parameter int DIV5        = 104,
  parameter int FFT_LATENCY = 230,
  parameter int NREF        = 4,
  parameter int ALPHA_X16   = 64,
  // scene of the radar signal simulator (see radar_sim)
  parameter int TGT_RANGE   = 12,
  parameter int TGT_AMP     = 48,
  parameter int WX_FIRST    = 20,
  parameter int WX_AMP      = 12,
  parameter int GND_LAST    = 5,
  parameter int GND_AMP     = 20
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    run,
  // radar simulator output
  output cpx_s_t                  iq,
  output logic                    iq_valid,
  output logic                    cpi_start,
  output logic                    sim_active,
  // divided clocks CLK5..CLK1 (observation only)
  output logic [4:0]              clk_div,
  // FFT output
  output logic                    fft_v,
  output logic [BIN_W-1:0]        fft_idx,
  output cpx_a_t                  fft_out,
  // arranged data to CFAR
  output logic                    arr_v,
  output logic [MAG_W-1:0]        arr_data,
  output logic [RANGE_W-1:0]      arr_range,
  output logic [BIN_W-1:0]        arr_bin,
  output logic                    bank,
  output logic                    bank_swap,
  output logic                    overrun,
  // CFAR decisions
  output logic                    det_v,
  output logic                    det,
  output logic [MAG_W-1:0]        det_cut,
  output logic [MAG_W+$clog2(NREF)+1:0] det_noise,
  output logic [RANGE_W-1:0]      det_range,
  output logic [BIN_W-1:0]        det_bin
);
  logic ce1, ce2, ce3, ce4, ce5, count_en, grp_start;
  logic rs_first;
  cpx_s_t xi;
  logic xi_first;
  cpx_s_t xa, xb;
  lag_tag_t ptag, mtag;
  logic pv, mv;
  cpx_p_t prod;
  logic kv, kfirst;
  logic [BIN_W-1:0] kidx;
  cpx_a_t kern;
  logic mag_v;
  logic [BIN_W-1:0] mag_idx;
  logic [MAG_W-1:0] mag;
  logic arr_tick;

  synchronizer #(.DIV5(DIV5)) u_sync (
    .clk, .rst, .ce1, .ce2, .ce3, .ce4, .ce5, .clk_div, .count_en, .grp_start
  );

  radar_sim #(
    .TGT_RANGE (TGT_RANGE), .TGT_AMP (TGT_AMP), .WX_FIRST (WX_FIRST),
    .WX_AMP (WX_AMP), .GND_LAST (GND_LAST), .GND_AMP (GND_AMP)
  ) u_radar (
    .clk, .rst, .run, .ce1, .count_en, .grp_start,
    .sample (iq), .valid (iq_valid), .first (rs_first), .cpi_start, .active (sim_active)
  );

  interpolator u_interp (
    .clk, .rst, .ce1, .ce2, .din (iq), .din_first (rs_first),
    .dout (xi), .dout_first (xi_first)
  );

  data_shift u_shift (
    .clk, .rst, .ce2, .ce4, .din (xi), .din_first (xi_first),
    .xa, .xb, .tag (ptag), .pv
  );

  cmult u_cmult (
    .clk, .rst, .in_v (pv), .a (xa), .b (xb), .in_tag (ptag),
    .p (prod), .out_tag (mtag), .out_v (mv)
  );

  kernel_acc u_acc (
    .clk, .rst, .ce4, .in_v (mv), .p (prod), .tag (mtag),
    .out_v (kv), .out_first (kfirst), .out_idx (kidx), .sr (kern)
  );

  fft16 #(.LATENCY(FFT_LATENCY)) u_fft (
    .clk, .rst, .ce (ce4), .ce_out (ce3), .in_v (kv), .in_first (kfirst), .din (kern),
    .out_v (fft_v), .out_idx (fft_idx), .dout (fft_out)
  );

  magnitude u_mag (
    .clk, .rst, .in_v (fft_v), .in_idx (fft_idx), .din (fft_out),
    .out_v (mag_v), .out_idx (mag_idx), .mag
  );

  data_arrange u_arr (
    .clk, .rst, .ce_r (ce5), .wr_v (mag_v), .wr_data (mag),
    .rd_tick (arr_tick), .rd_v (arr_v), .rd_data (arr_data),
    .rd_range (arr_range), .rd_bin (arr_bin),
    .wbank (bank), .swap (bank_swap), .overrun
  );

  cfar #(.NREF(NREF), .ALPHA_X16(ALPHA_X16)) u_cfar (
    .clk, .rst, .in_tick (arr_tick), .in_v (arr_v), .din (arr_data),
    .din_range (arr_range), .din_bin (arr_bin),
    .out_v (det_v), .det, .cut (det_cut), .noise (det_noise),
    .out_range (det_range), .out_bin (det_bin)
  );

  // Stream rules between the blocks: the summed kernel and the magnitudes arrive as
  // whole 16-point frames in index order, starting at point 0.
  logic [BIN_W-1:0] k_next, m_next;
  always_ff @(posedge clk) begin
    if (rst) begin
      k_next <= '0;
      m_next <= '0;
    end else begin
      if (kv) k_next <= kidx + 1'b1;
      if (mag_v) m_next <= mag_idx + 1'b1;
    end
  end
  a_kernel_order: assert property (@(posedge clk) disable iff (rst)
    kv |-> kidx == k_next && kfirst == (kidx == '0));
  a_mag_order: assert property (@(posedge clk) disable iff (rst)
    mag_v |-> mag_idx == m_next);
endmodule
