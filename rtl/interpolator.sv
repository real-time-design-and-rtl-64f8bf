// Data interpolation by 2 through zero padding.
//
// A multiplexer whose select is the CLK2 phase outputs, at each ce2 strobe, either the
// sample currently held by the radar simulator or zero, so the CLK1 stream
// s0 s1 ... s7 (hold) becomes s0 0 s1 0 ... s7 0 0 0 0 0 0 0 0 0 at twice the rate,
// as in the published design. The strobe that coincides with ce1 (when the source
// loads its next sample) is the zero slot. `din_first`, the source's range-cell start
// mark, is carried along with s0 and re-arms the following shifting stage (the
// multiplexer reset of the published design). Output is registered at ce2.
module interpolator import mtd_pkg::*; (
  input  logic   clk,
  input  logic   rst,
  input  logic   ce1,
  input  logic   ce2,
  input  cpx_s_t din,
  input  logic   din_first,
  output cpx_s_t dout,
  output logic   dout_first
);
  always_ff @(posedge clk) begin
    if (rst) begin
      dout       <= '0;
      dout_first <= 1'b0;
    end else if (ce2) begin
      if (ce1) begin
        dout       <= '0;
        dout_first <= 1'b0;
      end else begin
        dout       <= din;
        dout_first <= din_first;
      end
    end
  end
endmodule
