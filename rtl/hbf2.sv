// hbf2: fifth decimation stage, the second half-band filter: 14th order
// (15 taps), decimation by 2, 6.5 MHz in and 3.25 MHz out. Of the 15 taps six
// are zero and the centre tap is 0.5 (a single shift), so the eight other
// taps need only four shift-add multipliers, each shared by a mirrored pair.
// The tap values are this design's own equiripple half-band design (see
// decim_pkg); the order, the half-band type and the transposed polyphase
// structure follow the filter specification.
//
// Interface: 16-bit signed in and out, in_valid/out_valid strobes; out_valid
// pulses the cycle after every second input. The output is the rounded,
// saturated sum at unity scale (coefficients have 15 fractional bits).
module hbf2
  import decim_pkg::*;
#(
  parameter int IN_W  = HB_W,
  parameter int OUT_W = HB_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  polyfir_dec2 #(
    .IN_W (IN_W),
    .OUT_W(OUT_W),
    .NTAPS(HBF2_N),
    .COEF (HBF2_COEF),
    .SHIFT(CFRAC)
  ) u_fir (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data
  );
endmodule
