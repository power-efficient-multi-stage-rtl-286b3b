// nrc_stage1: first decimation stage, a 4th-order non-recursive comb
// H1(z) = (1 + z^-1)^4 = 1 + 4z^-1 + 6z^-2 + 4z^-3 + z^-4 followed by
// decimation by 2, built in polyphase form so that all arithmetic runs at
// half the input rate.
//
// Samples arrive in pairs. The older sample of a pair, x[2m], waits in one
// input-rate register; when the newer one, x[2m+1], arrives both phases are
// filtered at once:
//   y[m] = F0(a) + F1(b),  F0 = 1 + 6z^-1 + z^-2 on a[m] = x[2m+1]
//                          F1 = 4 + 4z^-1       on b[m] = x[2m]
// (z^-1 here is one output period). The gains 6 and 4 are shift-add
// constants. The word length grows by the filter order: OUT_W = IN_W + 4.
//
// Interface: in_valid marks an input sample (may be high every cycle);
// out_valid pulses for one cycle, the cycle after the second sample of each
// pair, with out_data = y[m]. The polyphase split and the word length follow
// the filter specification; the strobe interface, the clock-enable style of
// rate reduction and the asynchronous active-low reset are this design's.
module nrc_stage1 #(
  parameter int IN_W  = 3,
  parameter int OUT_W = IN_W + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic                   phase;      // 1: older sample of the pair held
  logic signed [IN_W-1:0] b_hold;     // x[2m], input-rate register
  logic signed [IN_W-1:0] a_d1, a_d2; // a[m-1], a[m-2]
  logic signed [IN_W-1:0] b_d1;       // b[m-1]

  logic signed [OUT_W-1:0] a0, a1, a2, b0, b1;
  logic signed [OUT_W-1:0] g_a1, g_b0, g_b1;
  logic signed [OUT_W-1:0] y;

  assign a0 = OUT_W'(in_data);
  assign a1 = OUT_W'(a_d1);
  assign a2 = OUT_W'(a_d2);
  assign b0 = OUT_W'(b_hold);
  assign b1 = OUT_W'(b_d1);

  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(6)) u_m6  (.x(a1), .y(g_a1));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(4)) u_m4a (.x(b0), .y(g_b0));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(4)) u_m4b (.x(b1), .y(g_b1));

  always_comb y = (a0 + g_a1 + a2) + (g_b0 + g_b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      b_hold    <= '0;
      a_d1      <= '0;
      a_d2      <= '0;
      b_d1      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          b_hold <= in_data;
        end else begin
          a_d1      <= in_data;
          a_d2      <= a_d1;
          b_d1      <= b_hold;
          out_data  <= y;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
