// sdm_model: behavioural stand-in for the sigma-delta modulator that feeds
// the decimator (testbench use only, not synthesizable). It is a
// discrete-time 2nd-order error-feedback loop with a 3-bit mid-rise
// quantiser (codes -4..3); the real modulator is a 3rd-order
// continuous-time design whose coefficients are not part of this RTL.
// On every rising edge with en high it advances one sample of the input
// u (in units of quantiser steps, |u| < 3) and presents the code on q.
module sdm_model (
  input  logic              clk,
  input  logic              en,
  input  real               u,
  output logic signed [2:0] q
);
  real i1 = 0.0, i2 = 0.0;
  int  v  = 0;

  initial q = '0;

  always @(posedge clk) begin
    if (en) begin
      i1 = i1 + u - real'(v);
      i2 = i2 + i1 - real'(v);
      v  = int'($floor(i2)) ;
      if (v > 3)  v = 3;
      if (v < -4) v = -4;
      q <= 3'(v);
    end
  end
endmodule
