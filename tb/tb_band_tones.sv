// tb_band_tones: frequency-response test of the complete decimator at its
// default sizes, with the specified operating point: 3-bit sigma-delta
// samples at 208 MHz, decimation by 128, 1.625 MHz output.
//
// Two tones of 2.5 quantiser steps are passed through the behavioural
// modulator (sdm_model) into decim_top, one at a time after a reset:
//   passband : 698.2 kHz (bin 220 of 512 at the output rate), near the
//              top of the 0.8 MHz signal band
//   stopband : 999.8 kHz (bin 315), beyond the 0.89 MHz stop edge of the
//              last stage; it aliases to 625.3 kHz (bin 197) at the output
// Both frequencies are whole cycles over the 512 output samples measured
// (after 50 samples of settling), so a single DFT bin gives the amplitude.
// Expected output amplitude = 2.5 * 512 * |H(f)| where |H| is the product
// of the six stage responses at f, worked out separately from the tap
// lists: 1.0590 in the passband (+0.50 dB), 6.86e-4 (-63.3 dB) at 1 MHz.
// Limits: passband within 3 % of 1355.6 LSB; stopband below 2.3 LSB
// (55 dB down), which leaves room for modulator noise in the bin.
module tb_band_tones;
  import decim_pkg::*;

  localparam int NSKIP = 50;
  localparam int NFFT  = 512;
  localparam int NOUT  = NSKIP + NFFT;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [ADC_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DOUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  real u = 0.0;
  logic sdm_en = 1'b0;
  logic signed [2:0] sdm_q;

  decim_top dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);
  sdm_model u_sdm (.clk, .en(sdm_en), .u(u), .q(sdm_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * 128 * NOUT + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one tone at input bin kin; return the amplitude at output bin kout.
  task automatic run_tone(input int kin, input int kout, output real amp);
    real yv[$];
    real re, im, f;
    f = real'(kin) / real'(NFFT * 128);      // cycles per input sample
    rst_n = 1'b0;
    in_valid = 1'b0;
    sdm_en = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; yv.size() < NOUT; n++) begin
      u = 2.5 * $sin(2.0 * PI * f * real'(n));
      in_data  = sdm_q;
      in_valid = 1'b1;
      sdm_en   = 1'b1;
      @(negedge clk);
      if (out_valid) yv.push_back(real'(out_data));
    end
    in_valid = 1'b0;
    sdm_en = 1'b0;
    re = 0.0;
    im = 0.0;
    for (int m = 0; m < NFFT; m++) begin
      re += yv[NSKIP + m] * $cos(2.0 * PI * real'(kout * m) / real'(NFFT));
      im += yv[NSKIP + m] * $sin(2.0 * PI * real'(kout * m) / real'(NFFT));
    end
    amp = 2.0 * $sqrt(re * re + im * im) / real'(NFFT);
  endtask

  initial begin
    real a_pass, a_stop;
    run_tone(220, 220, a_pass);
    checks++;
    if (a_pass < 1355.6 * 0.97 || a_pass > 1355.6 * 1.03) begin
      failures++;
      $display("passband tone: amplitude %0.1f, expected about 1355.6", a_pass);
    end
    run_tone(315, 197, a_stop);
    checks++;
    if (a_stop > 2.3) begin
      failures++;
      $display("stopband tone: amplitude %0.2f, limit 2.3", a_stop);
    end
    $display("passband amplitude %0.1f LSB, stopband amplitude %0.3f LSB (%0.1f dB down)",
             a_pass, a_stop, 20.0 * $log10(a_pass / a_stop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
