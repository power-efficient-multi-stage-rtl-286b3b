// tb_fir_stage: self-checking testbench for fir_stage (37-tap low-pass, decimate by 2).
// Drives 6000 random samples and bursts of alternating full-scale steps, with random idle cycles between
// some of them, and compares every output with a direct-form convolution of
// the recorded input (tb_ref_pkg), rounded and saturated as the stage documents. It also checks the rate
// (exactly one output per 2 inputs) and the latency: out_valid must rise
// on the clock edge right after the input that completes a group of 2.
// Inputs are driven and outputs sampled on the falling clock edge, in one
// process so that the input record and the checks stay in step.
module tb_fir_stage;
  import tb_ref_pkg::*;
  import decim_pkg::*;

  localparam int IW   = 16;
  localparam int OW   = 12;
  localparam int R    = 2;
  localparam int NIN  = 6000;
  localparam int SHIFT = CFRAC + 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IW-1:0] in_data = '0;
  logic out_valid;
  logic signed [OW-1:0] out_data;

  int checks = 0, failures = 0;
  int xs[$];
  int hs[$];
  int drive_cyc[$];
  int ncyc = 0, nout = 0, nclip = 0, nidle = 0;

  fir_stage  dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NIN * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int stim(int n);
    // bursts at the two extremes provoke overshoot past full scale
    if ((n / 64) % 4 == 1) return ((n / 8) % 2 == 0) ? -(1 <<< (IW - 1)) : (1 <<< (IW - 1)) - 1;
    return $signed($urandom) >>> (32 - IW);
  endfunction

  // One clock: wait for the falling edge, then check what the last rising
  // edge produced.
  task automatic tick();
    bit clipped;
    longint e;
    @(negedge clk);
    ncyc++;
    if (rst_n && out_valid) begin
      e = conv_dec(xs, hs, R, nout);
      e = round_sat(e, SHIFT, OW, clipped);
      if (clipped) nclip++;
      checks++;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("output %0d: got %0d expected %0d", nout, out_data, e);
      end
      checks++;
      if (R * nout + R - 1 >= drive_cyc.size() || drive_cyc[R * nout + R - 1] != ncyc - 1) begin
        failures++;
        if (failures < 10) $display("output %0d: wrong latency at cycle %0d", nout, ncyc);
      end
      nout++;
    end
  endtask

  initial begin
    foreach (FIR_COEF[k]) hs.push_back(FIR_COEF[k]);
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    for (int n = 0; n < NIN; n++) begin
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        nidle++;
        tick();
      end
      in_valid = 1'b1;
      in_data  = IW'(stim(n));
      xs.push_back(int'(in_data));
      drive_cyc.push_back(ncyc);
      tick();
    end
    in_valid = 1'b0;
    repeat (10) tick();
    checks++;
    if (nout != NIN / R) begin
      failures++;
      $display("got %0d outputs for %0d inputs", nout, NIN);
    end
    checks++;
    if (nidle == 0) begin failures++; $display("no idle input cycles"); end
    checks++;
    if (nclip == 0) begin failures++; $display("saturation never exercised"); end
    $display("outputs=%0d idle_cycles=%0d clipped=%0d", nout, nidle, nclip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
