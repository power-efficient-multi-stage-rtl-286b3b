// decim_pkg: word lengths, filter coefficients and the CSD digit helpers
// shared by the stages of the decimate-by-128 sigma-delta filter.
//
// Word lengths of the three comb stages follow Bout = K + Bin (K = filter
// order, or 3*log2(4) for the sinc stage): 3 -> 7 -> 10 -> 16 bits. The
// half-band and FIR stages keep 16 bits; the last stage scales to 12 bits.
//
// The FIR coefficients are this design's own: the filter orders, stopband
// targets and band edges follow the filter specification, the numbers were
// obtained with the Parks-McClellan (equiripple) algorithm and rounded to
// 15 fractional bits (value = c / 32768):
//   HBF1: 7 taps, half-band, passband edge 0.89 MHz at fs = 13 MHz
//   HBF2: 15 taps, half-band, passband edge 0.89 MHz at fs = 6.5 MHz
//   FIR : 37 taps, pass 0..0.45, stop 0.55..1 (x Nyquist) at fs = 3.25 MHz,
//         stopband weighted 100:1 over the passband
// In the half-band filters every second tap away from the centre is forced
// to exactly zero and the centre tap is exactly 0.5.
package decim_pkg;

  localparam int ADC_W  = 3;    // modulator output bits
  localparam int S1_W   = 7;   // after 4th-order comb
  localparam int S2_W   = 10;  // after 3rd-order comb
  localparam int S3_W   = 16;  // after 3rd-order sinc, decimate by 4
  localparam int HB_W   = 16;  // half-band stages in/out
  localparam int DOUT_W = 12;  // final output bits

  localparam int CW     = 16;  // coefficient width (signed)
  localparam int CFRAC  = 15;  // coefficient fractional bits

  localparam int HBF1_N = 7;
  localparam int HBF1_COEF [HBF1_N] = '{-1178, 0, 9356, 16384, 9356, 0, -1178};

  localparam int HBF2_N = 15;
  localparam int HBF2_COEF [HBF2_N] = '{-155, 0, 749, 0, -2456, 0, 10045, 16384,
                                        10045, 0, -2456, 0, 749, 0, -155};

  localparam int FIR_N  = 37;
  localparam int FIR_COEF [FIR_N] = '{
    -170, -634, -898, -399,   456,   448,  -424,  -589,   459,   832,
    -500, -1218, 537, 1881,  -567, -3351,   585, 10388, 15793, 10388,
     585, -3351, -567, 1881,   537, -1218,  -500,   832,   459,  -589,
    -424,   448,  456, -399,  -898,  -634,  -170};

  // Canonical signed digit recoding of a constant. Returns a mask of the bit
  // positions that carry +1 (want_neg = 0) or -1 (want_neg = 1). No two
  // neighbouring positions are non-zero, which minimises the adders of a
  // shift-add constant multiplier.
  function automatic logic [33:0] csd_mask(input int value, input bit want_neg);
    longint x;
    logic [33:0] m;
    x = longint'(value);
    m = '0;
    for (int i = 0; i < 34; i++) begin
      if (x[1:0] == 2'b01) begin
        if (!want_neg) m[i] = 1'b1;
        x = x - 1;
      end else if (x[1:0] == 2'b11) begin
        if (want_neg) m[i] = 1'b1;
        x = x + 1;
      end
      x = x >>> 1;
    end
    return m;
  endfunction

endpackage
