// decim_top: decimation filter for a 3-bit sigma-delta modulator running at
// 208 MHz with an oversampling ratio of 128. Six stages bring the rate down
// to 1.625 MHz and the word to 12 bits:
//
//   stage  filter                            decim  rate out   width out
//   1      (1+z^-1)^4 non-recursive comb      2     104 MHz    7
//   2      (1+z^-1)^3 non-recursive comb      2      52 MHz   10
//   3      3rd-order sinc, polyphase          4      13 MHz   16
//   4      half-band, 7 taps                  2     6.5 MHz   16
//   5      half-band, 15 taps                 2    3.25 MHz   16
//   6      low-pass, 37 taps                  2   1.625 MHz   12
//
// The three comb stages remove most of the shaped quantisation noise with
// multiplier-free polyphase structures; the two half-band filters and the
// final low-pass give the sharp transition at the band edge. Every stage
// is polyphase, so its arithmetic runs at its own output rate.
//
// The whole chain runs on the modulator clock. Each stage hands a one-cycle
// valid strobe to the next; a stage's registers only load on its input
// strobe, which acts as the clock enable of its slower clock domain. The
// input may carry a sample on every cycle, or have idle cycles (in_valid
// low) between samples. One output is produced per 128 input samples,
// the cycle after stage 6 completes its pair; the gain of the chain is
// 16*8*64 / 16 = 512 per input LSB at DC, scaled by the DC gains of the FIR
// stages (slightly below 1).
//
// Assertions check the strobe rules between the stages.
//
// The stage list, orders, decimation factors and comb word lengths follow
// the filter specification. The clock-enable style, the strobe interface,
// the FIR tap values, the rounding and saturation, and the asynchronous
// active-low reset are this design's choices.
module decim_top
  import decim_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ADC_W-1:0] in_data,
  output logic                    out_valid,
  output logic signed [DOUT_W-1:0] out_data
);
  logic                   v1, v2, v3, v4, v5;
  logic signed [S1_W-1:0] d1;
  logic signed [S2_W-1:0] d2;
  logic signed [S3_W-1:0] d3;
  logic signed [HB_W-1:0] d4, d5;

  nrc_stage1 #(.IN_W(ADC_W), .OUT_W(S1_W)) u_s1 (
    .clk, .rst_n, .in_valid(in_valid), .in_data(in_data), .out_valid(v1), .out_data(d1));

  nrc_stage2 #(.IN_W(S1_W), .OUT_W(S2_W)) u_s2 (
    .clk, .rst_n, .in_valid(v1), .in_data(d1), .out_valid(v2), .out_data(d2));

  cic_stage3 #(.IN_W(S2_W), .OUT_W(S3_W)) u_s3 (
    .clk, .rst_n, .in_valid(v2), .in_data(d2), .out_valid(v3), .out_data(d3));

  hbf1 #(.IN_W(S3_W), .OUT_W(HB_W)) u_s4 (
    .clk, .rst_n, .in_valid(v3), .in_data(d3), .out_valid(v4), .out_data(d4));

  hbf2 #(.IN_W(HB_W), .OUT_W(HB_W)) u_s5 (
    .clk, .rst_n, .in_valid(v4), .in_data(d4), .out_valid(v5), .out_data(d5));

  fir_stage #(.IN_W(HB_W), .OUT_W(DOUT_W)) u_s6 (
    .clk, .rst_n, .in_valid(v5), .in_data(d5), .out_valid(out_valid), .out_data(out_data));

  // Strobe rules: after decimation by 2 or more a stage can never emit on
  // two consecutive cycles, and it only emits on the edge after an input.
  a_s1_gap:  assert property (@(posedge clk) disable iff (!rst_n) v1 |=> !v1);
  a_s2_gap:  assert property (@(posedge clk) disable iff (!rst_n) v2 |=> !v2);
  a_s3_gap:  assert property (@(posedge clk) disable iff (!rst_n) v3 |=> !v3);
  a_out_gap: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);
  a_s1_src:  assert property (@(posedge clk) disable iff (!rst_n) v1 |-> $past(in_valid));
  a_out_src: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> $past(v5));
endmodule
