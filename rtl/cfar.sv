// Cell-averaging CFAR along range, one Doppler bin at a time.
//
// Input is the bin-major stream of the data-arrangement block: per bin, range cells
// 0..N_RANGE-1 in order, one value per in_tick (in_v marks real data). A window of
// 2*(NREF+NGUARD)+1 cells shifts at every in_tick; its centre is the cell under test
// (CUT), NGUARD guard cells sit on each side of it (one each, as published) and NREF
// reference cells beyond them form the leading and lagging windows.
//
//   noise = lead + lag            if both windows lie inside the range profile
//         = 2*lead or 2*lag       at the ends, where only one window does
//   det   = CUT * 16 * 2*NREF  >  noise * ALPHA_X16
// i.e. the CUT is declared a target when it exceeds ALPHA_X16/16 times the mean of the
// reference cells. The window length (NREF = 4 per side), the edge rule and the
// threshold factor (ALPHA_X16 = 64, alpha = 4) are choices of this implementation.
//
// Timing: a CUT is decided one cycle after the tick that brings its NREF+NGUARD-th
// successor into the window; out_v is a one-cycle pulse. The window keeps shifting on
// ticks without data, which flushes the last cells of the last bin.
module cfar import mtd_pkg::*; #(
  parameter int NR        = N_RANGE,
  parameter int NB        = N_FFT,
  parameter int W         = MAG_W,
  parameter int NREF      = 4,
  parameter int NGUARD    = 1,
  parameter int ALPHA_X16 = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_tick,
  input  logic                  in_v,
  input  logic [W-1:0]          din,
  input  logic [$clog2(NR)-1:0] din_range,
  input  logic [$clog2(NB)-1:0] din_bin,
  output logic                  out_v,
  output logic                  det,
  output logic [W-1:0]          cut,
  output logic [W+$clog2(NREF)+1:0] noise,
  output logic [$clog2(NR)-1:0] out_range,
  output logic [$clog2(NB)-1:0] out_bin
);
  localparam int HW = NREF + NGUARD;     // half window
  localparam int L  = 2 * HW + 1;
  localparam int SW = W + $clog2(NREF) + 2;

  logic [W-1:0]          win   [L];
  logic                  win_v [L];
  logic [$clog2(NR)-1:0] win_r [L];
  logic [$clog2(NB)-1:0] win_b [L];
  logic tick_d;

  logic [SW-1:0] lead, lag, nsum;
  logic lead_ok, lag_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < L; i++) begin
        win[i]   <= '0;
        win_v[i] <= 1'b0;
        win_r[i] <= '0;
        win_b[i] <= '0;
      end
      tick_d <= 1'b0;
    end else begin
      tick_d <= in_tick;
      if (in_tick) begin
        win[0]   <= in_v ? din : '0;
        win_v[0] <= in_v;
        win_r[0] <= din_range;
        win_b[0] <= din_bin;
        for (int i = 1; i < L; i++) begin
          win[i]   <= win[i-1];
          win_v[i] <= win_v[i-1];
          win_r[i] <= win_r[i-1];
          win_b[i] <= win_b[i-1];
        end
      end
    end
  end

  // win[HW-d] is range r+d (leading), win[HW+d] is range r-d (lagging).
  always_comb begin
    lead = '0;
    lag  = '0;
    for (int d = NGUARD + 1; d <= HW; d++) begin
      lead += SW'(win[HW-d]);
      lag  += SW'(win[HW+d]);
    end
    lead_ok = int'(win_r[HW]) + HW <= NR - 1;
    lag_ok  = int'(win_r[HW]) >= HW;
    if (lead_ok == lag_ok) nsum = lead + lag;
    else if (lead_ok)      nsum = lead << 1;
    else                   nsum = lag << 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_v     <= 1'b0;
      det       <= 1'b0;
      cut       <= '0;
      noise     <= '0;
      out_range <= '0;
      out_bin   <= '0;
    end else begin
      out_v <= tick_d && win_v[HW];
      if (tick_d && win_v[HW]) begin
        det       <= (SW+8)'(win[HW]) * (SW+8)'(32 * NREF) > (SW+8)'(nsum) * (SW+8)'(ALPHA_X16);
        cut       <= win[HW];
        noise     <= nsum;
        out_range <= win_r[HW];
        out_bin   <= win_b[HW];
      end
    end
  end
endmodule
