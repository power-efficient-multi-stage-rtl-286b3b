// fir_stage: sixth and last decimation stage, a 36th-order (37-tap)
// linear-phase low-pass FIR with decimation by 2: 3.25 MHz in, 1.625 MHz
// out, passband 0..0.45 and stopband 0.55..1 of the input Nyquist band.
// Symmetric taps share their shift-add multipliers. The output drops the 15
// coefficient fraction bits plus 4 more, turning the 16-bit internal scale
// into the 12-bit converter output, with rounding and saturation.
// Order, band edges and structure follow the filter specification; the tap
// values are this design's own equiripple design (see decim_pkg), and the
// 16-bit input width and the final scaling are this design's choice.
//
// Interface: in_valid/in_data (16 bits signed) in, out_valid/out_data
// (12 bits signed) out; out_valid pulses the cycle after every second input.
module fir_stage
  import decim_pkg::*;
#(
  parameter int IN_W  = HB_W,
  parameter int OUT_W = DOUT_W
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
    .NTAPS(FIR_N),
    .COEF (FIR_COEF),
    .SHIFT(CFRAC + IN_W - OUT_W)
  ) u_fir (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data
  );
endmodule
