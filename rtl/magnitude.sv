// Magnitude of each FFT output: mag = floor(sqrt(re^2 + im^2)).
//
// The square root is the digit-by-digit (two bits per step) method, unrolled into one
// combinational stage of ACC_W steps that needs only subtraction and shifts, and the
// result is registered: one cycle of latency, one result per input pulse, any input
// rate. The published design names the square root but not its method. The bin index
// travels with the value.
module magnitude import mtd_pkg::*; (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_v,
  input  logic [BIN_W-1:0] in_idx,
  input  cpx_a_t           din,
  output logic             out_v,
  output logic [BIN_W-1:0] out_idx,
  output logic [MAG_W-1:0] mag
);
  localparam int SQ_W = 2 * ACC_W;

  function automatic logic [MAG_W-1:0] isqrt(logic [SQ_W-1:0] v);
    logic [SQ_W-1:0] x, c, d;
    x = v;
    c = '0;
    d = SQ_W'(1) << (SQ_W - 2);
    for (int i = 0; i < ACC_W; i++) begin
      if (x >= c + d) begin
        x = x - (c + d);
        c = (c >> 1) + d;
      end else begin
        c = c >> 1;
      end
      d = d >> 2;
    end
    return MAG_W'(c);
  endfunction

  logic [SQ_W-1:0] pwr;
  logic signed [SQ_W-1:0] sr2, si2;

  always_comb begin
    sr2 = din.re * din.re;
    si2 = din.im * din.im;
    pwr = SQ_W'(sr2) + SQ_W'(si2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_v   <= 1'b0;
      out_idx <= '0;
      mag     <= '0;
    end else begin
      out_v <= in_v;
      if (in_v) begin
        out_idx <= in_idx;
        mag     <= isqrt(pwr);
      end
    end
  end
endmodule
