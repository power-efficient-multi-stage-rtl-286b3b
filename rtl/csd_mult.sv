// csd_mult: multiply a signed sample by a constant with shifts and adds.
// The constant COEF is recoded to canonical signed digits (CSD) at
// elaboration; every +1 digit adds the input shifted by its position and
// every -1 digit subtracts it. A zero constant gives a zero output and no
// logic. Purely combinational; OUT_W must hold IN_W plus the bits of COEF.
module csd_mult #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 32,
  parameter int COEF  = 3
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam logic [33:0] POS = decim_pkg::csd_mask(COEF, 1'b0);
  localparam logic [33:0] NEG = decim_pkg::csd_mask(COEF, 1'b1);

  logic signed [OUT_W-1:0] xe;
  assign xe = OUT_W'(x);

  always_comb begin
    y = '0;
    for (int i = 0; i < 34; i++) begin
      if (POS[i]) y = y + (xe <<< i);
      if (NEG[i]) y = y - (xe <<< i);
    end
  end
endmodule
