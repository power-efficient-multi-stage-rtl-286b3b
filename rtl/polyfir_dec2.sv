// polyfir_dec2: FIR filter with decimation by 2 in transposed direct-form
// polyphase structure. It is the engine of both half-band stages and of the
// final low-pass stage.
//
// With input samples x[n] the output is y[m] = sum_k h[k] x[2m+1-k]. The
// older sample of each pair, b = x[2m], waits in one input-rate register;
// when the newer one, a = x[2m+1], arrives, every tap product is formed at
// once, p[j] = h[2j]*a + h[2j+1]*b, and the transposed delay chain is
// advanced: y = p[0] + r[0], r[j] <= p[j+1] + r[j+1]. Each register thus
// sits behind one adder, so the critical path is one constant multiplier
// and two adders regardless of the filter length, and the chain only moves
// at the output rate. Constant multipliers are CSD shift-add networks
// (csd_mult); zero taps cost nothing, and where the coefficient set is
// symmetric a product is computed once and fed to both mirrored taps.
//
// Output: the full-precision sum is rounded to nearest (ties towards +inf)
// by dropping SHIFT bits, then saturated to OUT_W bits.
//
// Interface: in_valid/in_data in; out_valid pulses for one cycle, the cycle
// after the second sample of each pair. The structure follows the filter
// specification; rounding, saturation, strobes and reset are this design's.
module polyfir_dec2
  import decim_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int OUT_W = 16,
  parameter int NTAPS = HBF1_N,
  parameter int COEF [NTAPS] = HBF1_COEF,
  parameter int SHIFT = CFRAC,
  parameter int ACC_W = IN_W + CW + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  localparam int NE = (NTAPS + 1) / 2;  // taps on the newer phase
  localparam int NO = NTAPS / 2;        // taps on the older phase

  localparam logic signed [ACC_W-1:0] RND  = ACC_W'(1) <<< (SHIFT - 1);
  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -(ACC_W'(64'sd1 <<< (OUT_W - 1)));

  // Tap k of the coefficient set, zero outside it.
  function automatic int tap(input int k);
    return (k >= 0 && k < NTAPS) ? COEF[k] : 0;
  endfunction

  logic                   phase;
  logic signed [IN_W-1:0] b_hold;

  logic signed [ACC_W-1:0] pa [NE];
  logic signed [ACC_W-1:0] pb [NE];
  logic signed [ACC_W-1:0] p  [NE];
  logic signed [ACC_W-1:0] r  [NE-1];

  logic signed [ACC_W-1:0] acc, rnd;
  logic signed [OUT_W-1:0] y;

  for (genvar j = 0; j < NE; j++) begin : g_even
    localparam int JM = NE - 1 - j;
    localparam int H  = tap(2*j);
    if (JM < j && tap(2*JM) == H) begin : g_share
      assign pa[j] = pa[JM];
    end else begin : g_mult
      csd_mult #(.IN_W(IN_W), .OUT_W(ACC_W), .COEF(H)) u_m (.x(in_data), .y(pa[j]));
    end
  end

  for (genvar j = 0; j < NE; j++) begin : g_odd
    localparam int JM = NO - 1 - j;
    localparam int H  = tap(2*j+1);
    if (j >= NO) begin : g_none
      assign pb[j] = '0;
    end else if (JM < j && tap(2*JM+1) == H) begin : g_share
      assign pb[j] = pb[JM];
    end else begin : g_mult
      csd_mult #(.IN_W(IN_W), .OUT_W(ACC_W), .COEF(H)) u_m (.x(b_hold), .y(pb[j]));
    end
  end

  for (genvar j = 0; j < NE; j++) begin : g_sum
    assign p[j] = pa[j] + pb[j];
  end

  always_comb begin
    acc = p[0] + r[0];
    rnd = (acc + RND) >>> SHIFT;
    if (rnd > OMAX)      y = OMAX[OUT_W-1:0];
    else if (rnd < OMIN) y = OMIN[OUT_W-1:0];
    else                 y = rnd[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      b_hold    <= '0;
      for (int j = 0; j < NE - 1; j++) r[j] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          b_hold <= in_data;
        end else begin
          for (int j = 0; j < NE - 2; j++) r[j] <= p[j+1] + r[j+1];
          r[NE-2]   <= p[NE-1];
          out_data  <= y;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
