// Synchronizer: clock enables and group timing for the whole processor.
//
// The published design divides the 40 MHz board oscillator into five clocks:
// CLK1 625 kHz (sample acquisition), CLK2 1.25 MHz (interpolation and shifting),
// CLK3 5 MHz (writing the arrangement RAMs), CLK4 10 MHz (pair selection,
// accumulation, FFT, square root) and CLK5 384.61 kHz (reading the arrangement RAMs
// and CFAR). Here every divided clock is a one-cycle clock-enable strobe ceN in the
// single master clock domain (divide ratios 64, 32, 8, 4 and 104), which keeps the
// design on one clock; this is an implementation choice. The divided clocks are also
// available as square waves on clk_div (bit i is CLK(i+1)) for observation. All counters leave reset
// together, so every ce1 coincides with a ce2, every ce2 with a ce3 and every ce3 with
// a ce4; the downstream blocks rely on that nesting.
//
// The reset circuit counts ce1 ticks modulo GRP_COUNT+GRP_HOLD (8+4): count_en is
// high for the first 8 phases (the radar simulator reads its ROM) and low for the 4
// hold-on phases; grp_start marks phase 0, the start of a new range-cell group.
// count_en and grp_start are levels that are valid at every ce1 strobe.
module synchronizer #(
  parameter int DIV1 = 64,
  parameter int DIV2 = 32,
  parameter int DIV3 = 8,
  parameter int DIV4 = 4,
  parameter int DIV5 = 104,
  parameter int GRP_COUNT = 8,
  parameter int GRP_HOLD  = 4
) (
  input  logic clk,
  input  logic rst,
  output logic ce1,
  output logic ce2,
  output logic ce3,
  output logic ce4,
  output logic ce5,
  output logic [4:0] clk_div,   // CLK5..CLK1 as square waves, for observation only
  output logic count_en,
  output logic grp_start
);
  localparam int NDIV = 5;
  localparam int DIV [NDIV] = '{DIV1, DIV2, DIV3, DIV4, DIV5};
  localparam int GRP_LEN = GRP_COUNT + GRP_HOLD;

  logic [15:0] cnt [NDIV];
  logic [NDIV-1:0] ce;
  logic [$clog2(GRP_LEN)-1:0] gph;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NDIV; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NDIV; i++)
        cnt[i] <= (int'(cnt[i]) == DIV[i] - 1) ? '0 : cnt[i] + 16'd1;
    end
  end

  always_comb
    for (int i = 0; i < NDIV; i++) ce[i] = (int'(cnt[i]) == DIV[i] - 1);

  assign {ce5, ce4, ce3, ce2, ce1} = ce;

  // The divided clocks themselves (high for the first half of each period). They are
  // brought out for monitoring; no logic in the design is clocked by them.
  always_comb
    for (int i = 0; i < NDIV; i++) clk_div[i] = int'(cnt[i]) < DIV[i] / 2;

  always_ff @(posedge clk) begin
    if (rst) gph <= '0;
    else if (ce1) gph <= (int'(gph) == GRP_LEN - 1) ? '0 : gph + 1'b1;
  end

  assign count_en  = int'(gph) < GRP_COUNT;
  assign grp_start = (gph == '0);
endmodule
