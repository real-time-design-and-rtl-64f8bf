// Summed-kernel accumulator and serializer.
//
// Eight complex accumulators, one per lag k = 0..7, add up the cross-products of the
// same lag over all time indices of a range cell:  SR(k) = sum_n x(n+k) x*(n-k).
// A product tagged `first` restarts its lag's sum; after the product tagged `last`
// the eight sums are copied to an output buffer, so the next range cell can start
// accumulating at once.
//
// The buffer is sent out serially as the 16-point summed kernel, one point per ce4:
//   points 0..7  : SR(0) .. SR(7)
//   point  8     : 0
//   points 9..15 : conj(SR(7)) .. conj(SR(1)),  i.e. SR(16-k) = conj(SR(k)).
// That Hermitian completion is how the published design avoids computing the other
// seven lags. Output: one-cycle pulse out_v per point with its index, out_first on
// point 0 (the FFT start). Sums are ACC_W (21) bits, an implementation choice.
module kernel_acc import mtd_pkg::*; (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce4,
  input  logic             in_v,
  input  cpx_p_t           p,
  input  lag_tag_t         tag,
  output logic             out_v,
  output logic             out_first,
  output logic [BIN_W-1:0] out_idx,
  output cpx_a_t           sr
);
  cpx_a_t acc [HALF];
  cpx_a_t obuf [HALF];
  cpx_a_t sum;
  logic busy;
  logic [BIN_W-1:0] idx;

  always_comb begin
    sum.re = (tag.first ? ACC_W'(0) : acc[tag.k].re) + ACC_W'(p.re);
    sum.im = (tag.first ? ACC_W'(0) : acc[tag.k].im) + ACC_W'(p.im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < HALF; i++) begin
        acc[i]  <= '0;
        obuf[i] <= '0;
      end
      busy      <= 1'b0;
      idx       <= '0;
      out_v     <= 1'b0;
      out_first <= 1'b0;
      out_idx   <= '0;
      sr        <= '0;
    end else begin
      out_v     <= 1'b0;
      out_first <= 1'b0;
      if (in_v) begin
        acc[tag.k] <= sum;
        if (tag.last) begin
          for (int i = 0; i < HALF; i++) obuf[i] <= acc[i];
          obuf[tag.k] <= sum;
          busy <= 1'b1;
          idx  <= '0;
        end
      end
      if (ce4 && busy && !(in_v && tag.last)) begin
        out_v     <= 1'b1;
        out_first <= (idx == '0);
        out_idx   <= idx;
        if (int'(idx) < HALF) begin
          sr <= obuf[idx[KW-1:0]];
        end else if (int'(idx) == HALF) begin
          sr <= '0;
        end else begin
          sr.re <= obuf[KW'(N_FFT - int'(idx))].re;
          sr.im <= -obuf[KW'(N_FFT - int'(idx))].im;
        end
        idx <= idx + 1'b1;
        if (int'(idx) == N_FFT - 1) busy <= 1'b0;
      end
    end
  end
endmodule
