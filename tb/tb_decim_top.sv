// tb_decim_top: end-to-end test of the decimate-by-128 filter at its
// default sizes.
//
// The input is, in turn: a 100 kHz tone through a behavioural sigma-delta
// modulator (sdm_model), uniformly random 3-bit codes, and long runs of the
// extreme codes -4 and +3 whose steps push the half-band and low-pass
// outputs past full scale. Random idle cycles (in_valid low) are inserted
// throughout. A reference cascade in the testbench recomputes every stage
// by direct convolution of the recorded input (tb_ref_pkg) and every 12-bit
// output is compared with it. Also checked: the sample count after each of
// the six stages (N/2, N/4, N/16, N/32, N/64, N/128), the latency of six
// clock cycles from the input that completes a group of 128 to out_valid,
// and that idle input cycles and saturation in each of the three FIR
// stages all happened at least once.
module tb_decim_top;
  import tb_ref_pkg::*;
  import decim_pkg::*;

  localparam int NOUT = 600;              // output samples in the run
  localparam int NIN  = 128 * NOUT;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [ADC_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DOUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int xs[$], ys[$], drive_cyc[$], out_cyc[$];
  int ncyc = 0, nidle = 0;
  int nstrobe [6] = '{default: 0};

  real u = 0.0;
  logic sdm_en = 1'b0;
  logic signed [2:0] sdm_q;

  decim_top dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  sdm_model u_sdm (.clk, .en(sdm_en), .u(u), .q(sdm_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NIN * 2 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the valid strobe after each stage (sampled mid-cycle)
  always @(negedge clk) begin
    if (dut.v1) nstrobe[0]++;
    if (dut.v2) nstrobe[1]++;
    if (dut.v3) nstrobe[2]++;
    if (dut.v4) nstrobe[3]++;
    if (dut.v5) nstrobe[4]++;
    if (out_valid) nstrobe[5]++;
  end

  task automatic tick();
    @(negedge clk);
    ncyc++;
    if (rst_n && out_valid) begin
      ys.push_back(int'(out_data));
      out_cyc.push_back(ncyc);
    end
  endtask

  // decimating convolution of a whole record, then round/saturate
  function automatic void stage(const ref int x[$], const ref int h[$], input int r,
                                input int shift, input int w, ref int y[$],
                                ref int nclip);
    bit clipped;
    y.delete();
    for (int m = 0; m < x.size() / r; m++) begin
      y.push_back(int'(round_sat(conv_dec(x, h, r, m), shift, w, clipped)));
      if (clipped) nclip++;
    end
  endfunction

  initial begin
    int h1[$], h2[$], h3[$], h4[$], h5[$], h6[$];
    int y1[$], y2[$], y3[$], y4[$], y5[$], y6[$];
    int clip[6];
    int code, want, peak;
    clip = '{default: 0};
    h1 = '{1, 4, 6, 4, 1};
    h2 = '{1, 3, 3, 1};
    h3 = '{1, 3, 6, 10, 12, 12, 10, 6, 3, 1};
    foreach (HBF1_COEF[k]) h4.push_back(HBF1_COEF[k]);
    foreach (HBF2_COEF[k]) h5.push_back(HBF2_COEF[k]);
    foreach (FIR_COEF[k])  h6.push_back(FIR_COEF[k]);

    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    for (int n = 0; n < NIN; n++) begin
      if ($urandom_range(0, 15) == 0) begin
        in_valid = 1'b0;
        sdm_en   = 1'b0;
        nidle++;
        tick();
      end
      if (n < NIN / 2) begin
        // tone: 100 kHz at 208 MHz, amplitude 2.5 steps; the modulator
        // advances on the same edge that hands its present code to the DUT
        u = 2.5 * $sin(2.0 * 3.14159265358979 * real'(n) * 100.0e3 / 208.0e6);
        code = int'(sdm_q);
        sdm_en = 1'b1;
      end else if (n < 3 * NIN / 4) begin
        sdm_en = 1'b0;
        code = $urandom_range(0, 7) - 4;
      end else begin
        code = ((n / 3072) % 2 == 0) ? -4 : 3;
      end
      in_valid = 1'b1;
      in_data  = ADC_W'(code);
      xs.push_back(int'(in_data));
      drive_cyc.push_back(ncyc);
      tick();
    end
    in_valid = 1'b0;
    repeat (20) tick();

    stage(xs, h1, 2, 0, S1_W, y1, clip[0]);
    stage(y1, h2, 2, 0, S2_W, y2, clip[1]);
    stage(y2, h3, 4, 0, S3_W, y3, clip[2]);
    stage(y3, h4, 2, CFRAC, HB_W, y4, clip[3]);
    stage(y4, h5, 2, CFRAC, HB_W, y5, clip[4]);
    stage(y5, h6, 2, CFRAC + HB_W - DOUT_W, DOUT_W, y6, clip[5]);

    checks++;
    if (ys.size() != NOUT || y6.size() != NOUT) begin
      failures++;
      $display("outputs: got %0d expected %0d", ys.size(), NOUT);
    end
    for (int m = 0; m < ys.size() && m < y6.size(); m++) begin
      checks++;
      if (ys[m] != y6[m]) begin
        failures++;
        if (failures < 10) $display("output %0d: got %0d expected %0d", m, ys[m], y6[m]);
      end
      checks++;
      if (out_cyc[m] - drive_cyc[128 * m + 127] != 6) begin
        failures++;
        if (failures < 10) $display("output %0d: latency %0d cycles", m,
                                    out_cyc[m] - drive_cyc[128 * m + 127]);
      end
    end
    for (int s = 0; s < 6; s++) begin
      want = NIN / (s == 0 ? 2 : s == 1 ? 4 : s == 2 ? 16 : s == 3 ? 32 : s == 4 ? 64 : 128);
      checks++;
      if (nstrobe[s] != want) begin
        failures++;
        $display("stage %0d: %0d samples, expected %0d", s + 1, nstrobe[s], want);
      end
    end
    // the comb stages are sized not to overflow; the FIR stages must clip
    for (int s = 0; s < 6; s++) begin
      checks++;
      if ((s < 3) != (clip[s] == 0)) begin
        failures++;
        $display("stage %0d: %0d saturated samples", s + 1, clip[s]);
      end
    end
    // tone amplitude: 2.5 steps * 8192 (comb gain) / 16 (output scaling),
    // times the gain of the whole chain at 100 kHz (1.099, set by the
    // passband ripple of the last stage): about 1406 LSB
    peak = 0;
    for (int m = 100; m < NOUT / 2 && m < ys.size(); m++) if (ys[m] > peak) peak = ys[m];
    checks++;
    if (peak < 1340 || peak > 1470) begin
      failures++;
      $display("tone peak %0d outside 1340..1470", peak);
    end
    checks++;
    if (nidle == 0) begin failures++; $display("no idle input cycles"); end
    $display("tone peak=%0d", peak);
    $display("inputs=%0d outputs=%0d idle_cycles=%0d clipped hbf1/hbf2/fir=%0d/%0d/%0d",
             NIN, ys.size(), nidle, clip[3], clip[4], clip[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
