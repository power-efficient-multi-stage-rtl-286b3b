// cic_stage3: third decimation stage, a 3rd-order sinc (CIC) filter with
// decimation by 4, realised without integrators as a non-recursive
// polyphase FIR:
//   H3(z) = ((1 - z^-4)/(1 - z^-1))^3 = (1 + z^-1 + z^-2 + z^-3)^3
//         = 1,3,6,10,12,12,10,6,3,1
// split into four sub-filters, one per input phase (z^-1 = one output
// period, p0 the newest sample x[4m+3], p3 the oldest x[4m]):
//   F0 = 1 + 12z^-1 + 3z^-2   on p0      F1 = 3 + 12z^-1 + z^-2  on p1
//   F2 = 6 + 10z^-1           on p2      F3 = 10 + 6z^-1         on p3
// Only the three input-phase registers run at the input rate; the delay
// registers of the sub-filters and the output run once per four inputs.
// The gains are shift-add constants. Word growth is 3*log2(4) = 6 bits.
//
// Interface: in_valid/in_data in; out_valid pulses the cycle after every
// fourth input sample. Transfer function and polyphase structure follow the
// filter specification; the output width, strobes and reset are this
// design's choice.
module cic_stage3 #(
  parameter int IN_W  = 10,
  parameter int OUT_W = IN_W + 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic [1:0]             cnt;               // input phase within a group
  logic signed [IN_W-1:0] p3_h, p2_h, p1_h;  // input-rate phase registers
  logic signed [IN_W-1:0] p0_d1, p0_d2, p1_d1, p1_d2, p2_d1, p3_d1;

  logic signed [OUT_W-1:0] p0, p1, p2, p3, p0d1, p0d2, p1d1, p1d2, p2d1, p3d1;
  logic signed [OUT_W-1:0] g0_1, g0_2, g1_0, g1_1, g2_0, g2_1, g3_0, g3_1;
  logic signed [OUT_W-1:0] y;

  assign p0   = OUT_W'(in_data);
  assign p1   = OUT_W'(p1_h);
  assign p2   = OUT_W'(p2_h);
  assign p3   = OUT_W'(p3_h);
  assign p0d1 = OUT_W'(p0_d1);
  assign p0d2 = OUT_W'(p0_d2);
  assign p1d1 = OUT_W'(p1_d1);
  assign p1d2 = OUT_W'(p1_d2);
  assign p2d1 = OUT_W'(p2_d1);
  assign p3d1 = OUT_W'(p3_d1);

  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(12)) u_f0_1 (.x(p0d1), .y(g0_1));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(3))  u_f0_2 (.x(p0d2), .y(g0_2));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(3))  u_f1_0 (.x(p1),   .y(g1_0));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(12)) u_f1_1 (.x(p1d1), .y(g1_1));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(6))  u_f2_0 (.x(p2),   .y(g2_0));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(10)) u_f2_1 (.x(p2d1), .y(g2_1));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(10)) u_f3_0 (.x(p3),   .y(g3_0));
  csd_mult #(.IN_W(OUT_W), .OUT_W(OUT_W), .COEF(6))  u_f3_1 (.x(p3d1), .y(g3_1));

  always_comb
    y = ((p0 + g0_1 + g0_2) + (g1_0 + g1_1 + p1d2))
      + ((g2_0 + g2_1) + (g3_0 + g3_1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      p3_h      <= '0;
      p2_h      <= '0;
      p1_h      <= '0;
      p0_d1     <= '0;
      p0_d2     <= '0;
      p1_d1     <= '0;
      p1_d2     <= '0;
      p2_d1     <= '0;
      p3_d1     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 2'd1;
        unique case (cnt)
          2'd0: p3_h <= in_data;
          2'd1: p2_h <= in_data;
          2'd2: p1_h <= in_data;
          2'd3: begin
            p0_d1     <= in_data;
            p0_d2     <= p0_d1;
            p1_d1     <= p1_h;
            p1_d2     <= p1_d1;
            p2_d1     <= p2_h;
            p3_d1     <= p3_h;
            out_data  <= y;
            out_valid <= 1'b1;
          end
        endcase
      end
    end
  end
endmodule
