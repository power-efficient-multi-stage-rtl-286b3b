// tb_ref_pkg: reference arithmetic for the decimation-filter testbenches.
// Direct-form convolution of a stored input record with a tap list, then
// the same round-to-nearest and saturation rule the filters document, so
// expected samples are computed without the polyphase structure under test.
package tb_ref_pkg;

  // y[m] = sum_k h[k] * x[R*m + R - 1 - k], samples before x[0] are zero.
  function automatic longint conv_dec(const ref int x[$], const ref int h[$],
                                      input int r, input int m);
    longint acc = 0;
    for (int k = 0; k < h.size(); k++) begin
      int n = r * m + r - 1 - k;
      if (n >= 0 && n < x.size()) acc += longint'(h[k]) * longint'(x[n]);
    end
    return acc;
  endfunction

  // Drop `shift` bits with rounding to nearest (ties up), clip to `w` bits.
  function automatic longint round_sat(input longint acc, input int shift,
                                       input int w, output bit clipped);
    longint v   = (shift > 0) ? ((acc + (64'sd1 <<< (shift - 1))) >>> shift) : acc;
    longint vmx = (64'sd1 <<< (w - 1)) - 1;
    longint vmn = -(64'sd1 <<< (w - 1));
    clipped = 1'b0;
    if (v > vmx) begin v = vmx; clipped = 1'b1; end
    if (v < vmn) begin v = vmn; clipped = 1'b1; end
    return v;
  endfunction

endpackage
