// Radar signal simulator: I and Q sample ROMs of one CPI and their address counter.
//
// The ROMs hold N_RANGE x CPI_LEN (32 x 8 = 256) complex 8-bit samples, stored range
// cell by range cell (address = range*8 + pulse), so that eight successive reads give
// the eight pulses of one range cell. On every ce1 strobe with count_en high the 8-bit
// address counter reads one sample and advances; during the 4 hold-on strobes it
// stops and the output is zero. The CPI is replayed while `run` is high; `run` is
// sampled only at the start of a CPI, so a CPI is never cut short.
//
// The published simulator stores samples generated offline (a target at 0.5 Fr, AWGN,
// weather clutter at 0.25 Fr and ground clutter at 0 Hz). This implementation computes
// an equivalent scene with integer arithmetic instead of storing a table:
//   target  : amplitude TGT_AMP at range TGT_RANGE, phase pi per pulse  (0.5 Fr)
//   weather : amplitude WX_AMP at ranges >= WX_FIRST, phase pi/2 per pulse (0.25 Fr)
//   ground  : constant GND_AMP (I and Q) at ranges < GND_LAST+1     (0 Hz)
//   noise   : nz(a, s) = (((a*37 + s)*53) mod 256) div 32 - 4, in -4..3, with
//             s = 11 for I and s = 101 for Q.
// Outputs are registered: sample/valid/first change one cycle after a ce1 strobe and
// stay for a whole CLK1 period. `first` marks pulse 0 of a range cell, `cpi_start`
// marks pulse 0 of range cell 0.
module radar_sim import mtd_pkg::*; #(
  parameter int TGT_RANGE = 12,
  parameter int TGT_AMP   = 48,
  parameter int WX_FIRST  = 20,
  parameter int WX_AMP    = 12,
  parameter int GND_LAST  = 5,
  parameter int GND_AMP   = 20
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   run,
  input  logic   ce1,
  input  logic   count_en,
  input  logic   grp_start,
  output cpx_s_t sample,
  output logic   valid,
  output logic   first,
  output logic   cpi_start,
  output logic   active
);
  localparam int DEPTH  = N_RANGE * CPI_LEN;
  localparam int ADDR_W = $clog2(DEPTH);

  function automatic int nz(int a, int s);
    return (((a * 37 + s) * 53) % 256) / 32 - 4;
  endfunction

  function automatic logic [2*SAMPLE_W*DEPTH-1:0] gen_rom();
    logic [2*SAMPLE_W*DEPTH-1:0] rom;
    int r, p, vi, vq;
    rom = '0;
    for (int a = 0; a < DEPTH; a++) begin
      r  = a / CPI_LEN;
      p  = a % CPI_LEN;
      vi = nz(a, 11);
      vq = nz(a, 101);
      if (r == TGT_RANGE) vi += (p % 2 == 0) ? TGT_AMP : -TGT_AMP;
      if (r >= WX_FIRST) begin
        case (p % 4)
          0: vi += WX_AMP;
          1: vq += WX_AMP;
          2: vi -= WX_AMP;
          default: vq -= WX_AMP;
        endcase
      end
      if (r <= GND_LAST) begin
        vi += GND_AMP;
        vq += GND_AMP;
      end
      rom[a*2*SAMPLE_W +: 2*SAMPLE_W] = {vi[SAMPLE_W-1:0], vq[SAMPLE_W-1:0]};
    end
    return rom;
  endfunction

  localparam logic [2*SAMPLE_W*DEPTH-1:0] ROM = gen_rom();

  logic [ADDR_W-1:0] addr;
  logic act_now;

  // Whether the current group belongs to a CPI that is being replayed.
  assign act_now = (grp_start && addr == '0) ? run : active;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      active    <= 1'b0;
      sample    <= '0;
      valid     <= 1'b0;
      first     <= 1'b0;
      cpi_start <= 1'b0;
    end else if (ce1) begin
      active <= act_now;
      if (act_now && count_en) begin
        sample    <= ROM[int'(addr)*2*SAMPLE_W +: 2*SAMPLE_W];
        valid     <= 1'b1;
        first     <= grp_start;
        cpi_start <= grp_start && addr == '0;
        addr      <= addr + 1'b1;
      end else begin
        sample    <= '0;
        valid     <= 1'b0;
        first     <= 1'b0;
        cpi_start <= 1'b0;
      end
    end
  end
endmodule
