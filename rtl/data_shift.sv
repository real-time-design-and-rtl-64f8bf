// Data shifting: slides the interpolated sequence past a midpoint and presents the
// cross-product pairs for every time index.
//
// Fifteen (2*HALF-1) sample registers shift at ce2. Register 0 holds the newest
// sample and register HALF-1 (the 8th) is the midpoint x(n); register HALF-1-k holds
// x(n+k) and register HALF-1+k holds x(n-k). A 3-bit lag counter advances at every
// ce4, eight times per shift, and drives two 8-to-1 multiplexers, so each shift yields
// the eight pairs (x(n+k), x(n-k)), k = 0..7 - the structure of the published design.
// When a range cell's first sample (s0) is shifted in, the other fourteen registers are
// cleared, so samples of the previous range cell never meet those of the next one.
// A group lasts GRP_SHIFTS (24) shifts: 16 interpolated samples and 8 zeros of the
// hold-on period, enough for every time index of the group to pass the midpoint.
//
// Timing: requires ce2 to coincide with every 8th ce4 (see synchronizer). A pair is
// registered at a ce4 strobe and flagged by the one-cycle pulse pv; `tag.first` marks
// the pairs of the group's first shift, `tag.last` the final pair (last shift, k=7).
module data_shift import mtd_pkg::*; #(
  parameter int GRP_SHIFTS = 24
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     ce2,
  input  logic     ce4,
  input  cpx_s_t   din,
  input  logic     din_first,
  output cpx_s_t   xa,        // x(n+k)
  output cpx_s_t   xb,        // x(n-k)
  output lag_tag_t tag,
  output logic     pv
);
  localparam int NREG = 2 * HALF - 1;

  cpx_s_t sr [NREG];
  logic [KW-1:0] k;
  logic [$clog2(GRP_SHIFTS)-1:0] t;
  logic active;

  // Shift line with the per-group clear.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) sr[i] <= '0;
      t      <= '0;
      active <= 1'b0;
    end else if (ce2) begin
      sr[0] <= din;
      for (int i = 1; i < NREG; i++) sr[i] <= din_first ? '0 : sr[i-1];
      if (din_first) begin
        t      <= '0;
        active <= 1'b1;
      end else if (active) begin
        if (int'(t) == GRP_SHIFTS - 1) active <= 1'b0;
        else t <= t + 1'b1;
      end
    end
  end

  // Lag counter and the two 8-to-1 multiplexers.
  always_ff @(posedge clk) begin
    if (rst) begin
      k   <= '0;
      pv  <= 1'b0;
      xa  <= '0;
      xb  <= '0;
      tag <= '0;
    end else begin
      pv <= 1'b0;
      if (ce4) begin
        k <= ce2 ? '0 : k + 1'b1;
        if (active) begin
          xa        <= sr[HALF-1-int'(k)];
          xb        <= sr[HALF-1+int'(k)];
          tag.k     <= k;
          tag.first <= (t == '0);
          tag.last  <= (int'(t) == GRP_SHIFTS - 1) && (k == KW'(HALF - 1));
          pv        <= 1'b1;
        end
      end
    end
  end

  // The lag counter relies on every ce2 strobe also being a ce4 strobe.
  a_nested_enables: assert property (@(posedge clk) disable iff (rst) ce2 |-> ce4);
endmodule
