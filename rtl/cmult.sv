// Cross-multiplication: p = a * conj(b) for one pair of 8-bit complex samples.
//
//   p.re = a.re*b.re + a.im*b.im      p.im = a.im*b.re - a.re*b.im
//
// Each part fits 17 bits, the product width of the published design (which used a
// vendor complex-multiplier core; this is a plain registered equivalent). One cycle of
// latency: inputs qualified by in_v give p and out_v on the next cycle; the lag tag
// is delayed with them.
module cmult import mtd_pkg::*; (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_v,
  input  cpx_s_t   a,
  input  cpx_s_t   b,
  input  lag_tag_t in_tag,
  output cpx_p_t   p,
  output lag_tag_t out_tag,
  output logic     out_v
);
  logic signed [2*SAMPLE_W-1:0] rr, ii, ir, ri;

  always_comb begin
    rr = a.re * b.re;
    ii = a.im * b.im;
    ir = a.im * b.re;
    ri = a.re * b.im;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p       <= '0;
      out_tag <= '0;
      out_v   <= 1'b0;
    end else begin
      out_v <= in_v;
      if (in_v) begin
        p.re    <= PROD_W'(rr) + PROD_W'(ii);
        p.im    <= PROD_W'(ir) - PROD_W'(ri);
        out_tag <= in_tag;
      end
    end
  end
endmodule
