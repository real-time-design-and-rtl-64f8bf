// Data arrangement: corner turn from range-major to Doppler-bin-major order, with two
// RAMs used in ping-pong.
//
// Magnitudes arrive range cell by range cell, 16 bins each (wr_v pulses, produced at
// the CLK3 rate). A write counter stores them at address range*16 + bin in the RAM
// selected by `wbank`. When the last word of a CPI (32 x 16 = 512 words) has been
// written the banks swap: the RAM just filled is handed to the read side and the other
// one receives the next CPI. The read counter runs at ce_r (CLK5) and visits the
// addresses bin by bin, range cell 0..31 within each bin, so every 32 successive
// outputs are the range profile of one Doppler bin, as the CFAR needs. Two RAMs, the
// write/read counters and the bank multiplexers follow the published structure.
//
// Output: rd_tick is a one-cycle pulse one cycle after every ce_r (also while idle, so
// the CFAR window can be flushed); rd_v qualifies rd_data/rd_range/rd_bin. `swap`
// pulses at every bank change. `overrun` pulses if a swap arrives while the previous
// CPI is still being read (its reading then restarts on the new CPI); that flag is an
// addition of this implementation, since at the published CLK5 rate a full CPI takes
// longer to read than to write.
module data_arrange import mtd_pkg::*; #(
  parameter int NR = N_RANGE,
  parameter int NB = N_FFT,
  parameter int W  = MAG_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce_r,
  input  logic                   wr_v,
  input  logic [W-1:0]           wr_data,
  output logic                   rd_tick,
  output logic                   rd_v,
  output logic [W-1:0]           rd_data,
  output logic [$clog2(NR)-1:0]  rd_range,
  output logic [$clog2(NB)-1:0]  rd_bin,
  output logic                   wbank,
  output logic                   swap,
  output logic                   overrun
);
  localparam int DEPTH = NR * NB;
  localparam int AW = $clog2(DEPTH);
  localparam int RW = $clog2(NR);
  localparam int BW = $clog2(NB);

  logic [AW-1:0] waddr, raddr;
  logic [RW-1:0] rr;
  logic [BW-1:0] rb;
  logic rbank, ractive, ren;
  logic [W-1:0] q [2];

  // Write side.
  always_ff @(posedge clk) begin
    if (rst) begin
      waddr   <= '0;
      wbank   <= 1'b0;
      swap    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      swap    <= 1'b0;
      overrun <= 1'b0;
      if (wr_v) begin
        if (int'(waddr) == DEPTH - 1) begin
          waddr   <= '0;
          wbank   <= ~wbank;
          swap    <= 1'b1;
          overrun <= ractive;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
    end
  end

  // Read side: bin-major counter.
  assign raddr = AW'(int'(rr) * NB + int'(rb));
  assign ren   = ce_r && ractive;

  always_ff @(posedge clk) begin
    if (rst) begin
      ractive  <= 1'b0;
      rbank    <= 1'b0;
      rr       <= '0;
      rb       <= '0;
      rd_tick  <= 1'b0;
      rd_v     <= 1'b0;
      rd_range <= '0;
      rd_bin   <= '0;
    end else begin
      rd_tick <= ce_r;
      if (ce_r) begin
        rd_v     <= ractive;
        rd_range <= rr;
        rd_bin   <= rb;
      end else begin
        rd_v <= 1'b0;
      end
      if (wr_v && int'(waddr) == DEPTH - 1) begin
        ractive <= 1'b1;
        rbank   <= wbank;
        rr      <= '0;
        rb      <= '0;
      end else if (ren) begin
        if (int'(rr) == NR - 1) begin
          rr <= '0;
          rb <= rb + 1'b1;
          if (int'(rb) == NB - 1) ractive <= 1'b0;
        end else begin
          rr <= rr + 1'b1;
        end
      end
    end
  end

  // The two RAMs; the write-enable and read-data multiplexers select by bank.
  for (genvar g = 0; g < 2; g++) begin : g_ram
    dpram #(.DEPTH(DEPTH), .WIDTH(W)) u_ram (
      .clk   (clk),
      .we    (wr_v && wbank == 1'(g)),
      .waddr (waddr),
      .wdata (wr_data),
      .re    (ren && rbank == 1'(g)),
      .raddr (raddr),
      .rdata (q[g])
    );
  end

  logic rbank_d;
  always_ff @(posedge clk) begin
    if (rst) rbank_d <= 1'b0;
    else if (ce_r) rbank_d <= rbank;
  end
  assign rd_data = q[rbank_d];
endmodule
