// Shared widths, sizes and types of the MTD-SWVD processor.
//
// The processor forms, for every range cell, a summed Wigner-Ville kernel from the
// 8 pulses of one coherent processing interval (CPI), takes its 16-point FFT and runs a
// cell-averaging CFAR along range for every Doppler bin. The 8-bit signed I/Q samples,
// the 17-bit cross-products, the 8-point half kernel, the 16-point FFT and the
// 32 range cells follow the published design. The 21-bit accumulator/FFT word and the
// sample tags are choices of this implementation: 21 bits hold the largest possible
// kernel value (8 products of at most 2^15 each, i.e. |SR(k)| <= 2^18) with margin.
package mtd_pkg;
  localparam int SAMPLE_W = 8;    // ADC word, I and Q, sign in the MSB
  localparam int PROD_W   = 17;   // complex cross-product word
  localparam int ACC_W    = 21;   // summed-kernel, FFT and magnitude word
  localparam int MAG_W    = ACC_W;
  localparam int CPI_LEN  = 8;    // pulses per range cell in one CPI
  localparam int N_RANGE  = 32;   // range cells
  localparam int HALF     = CPI_LEN;      // kernel points computed (k = 0..7)
  localparam int N_FFT    = 2 * CPI_LEN;  // summed-kernel length after interpolation by 2
  localparam int KW       = $clog2(HALF);
  localparam int BIN_W    = $clog2(N_FFT);
  localparam int RANGE_W  = $clog2(N_RANGE);

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cpx_s_t;

  typedef struct packed {
    logic signed [PROD_W-1:0] re;
    logic signed [PROD_W-1:0] im;
  } cpx_p_t;

  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } cpx_a_t;

  // Travels with every cross-product: its lag k and whether it is the first or
  // the last product of a range cell's group.
  typedef struct packed {
    logic [KW-1:0] k;
    logic          first;
    logic          last;
  } lag_tag_t;
endpackage
