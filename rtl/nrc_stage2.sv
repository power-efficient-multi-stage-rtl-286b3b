// nrc_stage2: second decimation stage, a 3rd-order non-recursive comb
// H2(z) = (1 + z^-1)^3 = 1 + 3z^-1 + 3z^-2 + z^-3 followed by decimation
// by 2, in polyphase form.
//
// The older sample of each input pair, b[m] = x[2m], is held in one
// input-rate register; with the newer one, a[m] = x[2m+1], the output is
//   y[m] = F0(a) + F1(b),  F0 = 1 + 3z^-1,  F1 = 3 + z^-1
// with z^-1 one output period. The gain 3 is one shift and one add. Word
// length grows by the order: OUT_W = IN_W + 3.
//
// Interface and timing as nrc_stage1: out_valid pulses the cycle after the
// second sample of each pair. Polyphase split and word length follow the
// filter specification; strobes, clock enables and reset are this design's.
module nrc_stage2 #(
  parameter int IN_W  = 7,
  parameter int OUT_W = IN_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic                   phase;
  logic signed [IN_W-1:0] b_hold;   // x[2m], input-rate register
  logic signed [IN_W-1:0] a_d1;     // a[m-1]
  logic signed [IN_W-1:0] b_d1;     // b[m-1]

  logic signed [OUT_W-1:0] a0, a1, b0, b1, g_a1, g_b0, y;

  assign a0 = OUT_W'(in_data);
  assign a1 = OUT_W'(a_d1);
  assign b0 = OUT_W'(b_hold);
  assign b1 = OUT_W'(b_d1);

  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(3)) u_m3a (.x(a1), .y(g_a1));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(3)) u_m3b (.x(b0), .y(g_b0));

  always_comb y = (a0 + g_a1) + (g_b0 + b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      b_hold    <= '0;
      a_d1      <= '0;
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
          b_d1      <= b_hold;
          out_data  <= y;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
