// 16-point FFT of the summed kernel, scaled by 1/16, with a constant start-to-output
// latency.
//
// Computes X(m) = (1/16) * sum_k SR(k) exp(-j*2*pi*k*m/16), the transform of the
// SWVD filter bank (the 1/N of the SWVD definition is applied inside, as a halving
// after each of the four radix-2 stages, which also keeps every value within ACC_W
// bits). The published design used a vendor FFT core with a fixed latency of 5.75 us;
// this block is a simple iterative radix-2 decimation-in-time FFT of its own:
//   load     : the 16 points arrive as in_v pulses (in_first on point 0) and are
//              written in bit-reversed order;
//   compute  : one butterfly per ce4 strobe, 4 stages x 8 butterflies, twiddles
//              W16^m in Q14 (round(16384*cos(2*pi*m/16)), round(16384*sin(..)));
//   wait     : until LATENCY master cycles (230 = 5.75 us at 40 MHz) have passed
//              since the in_first pulse;
//   output   : X(0)..X(15) in natural order, one per ce_out strobe, as out_v pulses.
// The first out_v therefore comes between LATENCY and LATENCY + (ce_out period - 1)
// cycles after in_first. A new frame may start once the previous one has been sent.
module fft16 import mtd_pkg::*; #(
  parameter int LATENCY = 230
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic             ce_out,
  input  logic             in_v,
  input  logic             in_first,
  input  cpx_a_t           din,
  output logic             out_v,
  output logic [BIN_W-1:0] out_idx,
  output cpx_a_t           dout
);
  localparam int TW_W = 16;
  // cos and sin of 2*pi*m/16 for m = 0..7, scaled by 2^14.
  localparam logic signed [TW_W-1:0] COS_T [8] =
    '{16'sd16384, 16'sd15137, 16'sd11585, 16'sd6270, 16'sd0, -16'sd6270, -16'sd11585, -16'sd15137};
  localparam logic signed [TW_W-1:0] SIN_T [8] =
    '{16'sd0, 16'sd6270, 16'sd11585, 16'sd15137, 16'sd16384, 16'sd15137, 16'sd11585, 16'sd6270};

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_WAIT, S_OUT} state_t;
  state_t state;

  cpx_a_t mem [N_FFT];
  logic [BIN_W-1:0] li;       // load / output index
  logic [1:0] stage;
  logic [2:0] bf;
  logic [15:0] lat;
  logic started;

  // Butterfly addressing for DIT on bit-reversed input.
  logic [BIN_W-1:0] i0, i1;
  logic [2:0] tw;
  logic signed [ACC_W+TW_W:0] pr, pi_;
  logic signed [ACC_W+1:0] tr, ti, ar, ai;
  logic signed [ACC_W-1:0] s0r, s0i, s1r, s1i;

  function automatic logic [BIN_W-1:0] bitrev(logic [BIN_W-1:0] v);
    for (int i = 0; i < BIN_W; i++) bitrev[i] = v[BIN_W-1-i];
  endfunction

  always_comb begin
    int span, pos, grp;
    span = 1 << stage;
    pos  = int'(bf) & (span - 1);
    grp  = int'(bf) >> stage;
    i0   = BIN_W'((grp << (int'(stage) + 1)) + pos);
    i1   = BIN_W'((grp << (int'(stage) + 1)) + pos + span);
    tw   = 3'(pos << (3 - int'(stage)));
    // t = mem[i1] * W16^tw,  W = cos - j sin
    pr  = mem[i1].re * COS_T[tw] + mem[i1].im * SIN_T[tw];
    pi_ = mem[i1].im * COS_T[tw] - mem[i1].re * SIN_T[tw];
    tr  = (ACC_W+2)'((pr  + (1 <<< (TW_W-3))) >>> (TW_W-2));
    ti  = (ACC_W+2)'((pi_ + (1 <<< (TW_W-3))) >>> (TW_W-2));
    ar  = (ACC_W+2)'(mem[i0].re);
    ai  = (ACC_W+2)'(mem[i0].im);
    // The halved sums fit ACC_W bits: the vector magnitude never exceeds that of the
    // largest input, which the 21-bit word holds with two bits to spare.
    s0r = ACC_W'((ar + tr) >>> 1);
    s0i = ACC_W'((ai + ti) >>> 1);
    s1r = ACC_W'((ar - tr) >>> 1);
    s1i = ACC_W'((ai - ti) >>> 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_LOAD;
      li      <= '0;
      stage   <= '0;
      bf      <= '0;
      lat     <= '0;
      started <= 1'b0;
      out_v   <= 1'b0;
      out_idx <= '0;
      dout    <= '0;
      for (int i = 0; i < N_FFT; i++) mem[i] <= '0;
    end else begin
      out_v <= 1'b0;
      if (started && lat != '1) lat <= lat + 1'b1;
      unique case (state)
        S_LOAD: if (in_v) begin
          if (in_first) begin
            mem[bitrev('0)] <= din;
            li      <= BIN_W'(1);
            lat     <= 16'd1;
            started <= 1'b1;
          end else if (started) begin
            mem[bitrev(li)] <= din;
            li <= li + 1'b1;
            if (li == BIN_W'(N_FFT - 1)) begin
              state <= S_CALC;
              stage <= '0;
              bf    <= '0;
            end
          end
        end
        S_CALC: if (ce) begin
          mem[i0].re <= s0r;
          mem[i0].im <= s0i;
          mem[i1].re <= s1r;
          mem[i1].im <= s1i;
          bf <= bf + 1'b1;
          if (bf == 3'd7) begin
            stage <= stage + 1'b1;
            if (stage == 2'd3) state <= S_WAIT;
          end
        end
        S_WAIT: if (ce_out && int'(lat) >= LATENCY - 1) begin
          out_v   <= 1'b1;
          out_idx <= '0;
          dout    <= mem[0];
          li      <= BIN_W'(1);
          state   <= S_OUT;
        end
        S_OUT: if (ce_out) begin
          out_v   <= 1'b1;
          out_idx <= li;
          dout    <= mem[li];
          li      <= li + 1'b1;
          if (li == BIN_W'(N_FFT - 1)) begin
            state   <= S_LOAD;
            started <= 1'b0;
            li      <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // A new frame may only start once the previous one has been sent.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst)
    in_v && in_first |-> state == S_LOAD);
endmodule
