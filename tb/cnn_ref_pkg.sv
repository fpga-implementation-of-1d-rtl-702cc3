// cnn_ref_pkg: bit-exact software reference of the bearing-fault CNN, for
// testbenches.
//
// The parameters and the input frame are package variables; a testbench fills
// them (fill_random), loads the same values into the hardware, calls compute()
// and compares. The arithmetic is written from the number-format rules, with
// 64-bit integers: every convolution sum is floor-divided by 2^8 and wrapped
// to 16 bits, the dense and output accumulators are wrapped to 25 bits, the
// output-layer products are floor-divided by 2^8 before they are added, and
// ties in the class decision go to the lower index. compute_real() gives the
// unquantised-arithmetic result for comparison.
//
// The layer sizes, formats and the hardmax decision follow the original
// design. The floor rounding and wrap rules are this design's own reading, and
// the RTL implements the same rules.
package cnn_ref_pkg;

  localparam int NX = 500, NC1 = 8, NC2 = 4, NL1 = 498, NP1 = 249;
  localparam int NL2 = 247, NP2 = 123, NFC = 10, NCL = 4;

  longint x   [NX];
  longint w1  [NC1][3];
  longint w2  [NC2][NC1][3];
  longint wfc [NFC][NC2][NP2];   // weight of flat input f*123+j
  longint bfc [NFC];
  longint wo  [NCL][NFC];
  longint bo  [NCL];

  longint c1 [NC1][NL1];
  longint p1 [NC1][NP1];
  longint c2 [NC2][NL2];
  longint p2 [NC2][NP2];
  longint fc [NFC];
  longint out [NCL];
  int     cls;
  real    out_real [NCL];
  int     cls_real;

  // interpret the low `bits` bits of v as a two's-complement number
  function automatic longint wrap(longint v, int bits);
    longint m = longint'(1) << bits;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  function automatic longint floor_div256(longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  function automatic longint relu(longint v);
    return (v < 0) ? 0 : v;
  endfunction

  function automatic longint rnd(int lo, int hi);
    return longint'(lo) + longint'($urandom_range(hi - lo));
  endfunction

  // random frame and parameters: samples within +-2.0, conv coefficients over
  // their full Q2.8 / Q1.8 range, dense weights within +-0.25, output weights
  // within +-0.5
  function automatic void fill_random();
    for (int n = 0; n < NX; n++) x[n] = rnd(-512, 511);
    for (int c = 0; c < NC1; c++) for (int k = 0; k < 3; k++) w1[c][k] = rnd(-512, 511);
    for (int f = 0; f < NC2; f++) for (int c = 0; c < NC1; c++) for (int k = 0; k < 3; k++)
      w2[f][c][k] = rnd(-256, 255);
    for (int n = 0; n < NFC; n++) begin
      bfc[n] = rnd(-2048, 2047);
      for (int f = 0; f < NC2; f++) for (int j = 0; j < NP2; j++) wfc[n][f][j] = rnd(-64, 63);
    end
    for (int o = 0; o < NCL; o++) begin
      bo[o] = rnd(-2048, 2047);
      for (int i = 0; i < NFC; i++) wo[o][i] = rnd(-128, 127);
    end
  endfunction

  function automatic void compute();
    longint s;
    for (int c = 0; c < NC1; c++) begin
      for (int n = 0; n < NL1; n++) begin
        s = 0;
        for (int k = 0; k < 3; k++) s += w1[c][k] * x[n + k];
        c1[c][n] = wrap(floor_div256(s), 16);
      end
      for (int m = 0; m < NP1; m++) begin
        p1[c][m] = relu(c1[c][2*m]);
        if (relu(c1[c][2*m+1]) > p1[c][m]) p1[c][m] = relu(c1[c][2*m+1]);
      end
    end
    for (int f = 0; f < NC2; f++) begin
      for (int n = 0; n < NL2; n++) begin
        s = 0;
        for (int c = 0; c < NC1; c++) for (int k = 0; k < 3; k++) s += w2[f][c][k] * p1[c][n + k];
        c2[f][n] = wrap(floor_div256(s), 16);
      end
      for (int m = 0; m < NP2; m++) begin
        p2[f][m] = relu(c2[f][2*m]);
        if (relu(c2[f][2*m+1]) > p2[f][m]) p2[f][m] = relu(c2[f][2*m+1]);
      end
    end
    for (int n = 0; n < NFC; n++) begin
      s = bfc[n] * 256;
      for (int f = 0; f < NC2; f++) for (int j = 0; j < NP2; j++) s += p2[f][j] * wfc[n][f][j];
      fc[n] = relu(wrap(s, 25));
    end
    cls = 0;
    for (int o = 0; o < NCL; o++) begin
      s = bo[o] * 256;
      for (int i = 0; i < NFC; i++) s += floor_div256(fc[i] * wo[o][i]);
      out[o] = wrap(s, 25);
      if (out[o] > out[cls]) cls = o;
    end
  endfunction

  // The same network in real arithmetic with the same (quantised) parameters
  // and input but no truncation or wrapping: the software model that the
  // fixed-point hardware approximates.
  function automatic void compute_real();
    real a1 [NC1][NL1];
    real q1 [NC1][NP1];
    real a2 [NC2][NL2];
    real q2 [NC2][NP2];
    real h [NFC];
    real s;
    for (int c = 0; c < NC1; c++) begin
      for (int n = 0; n < NL1; n++) begin
        s = 0.0;
        for (int k = 0; k < 3; k++) s += (w1[c][k] / 256.0) * (x[n + k] / 256.0);
        a1[c][n] = s < 0.0 ? 0.0 : s;
      end
      for (int m = 0; m < NP1; m++) q1[c][m] = a1[c][2*m] > a1[c][2*m+1] ? a1[c][2*m] : a1[c][2*m+1];
    end
    for (int f = 0; f < NC2; f++) begin
      for (int n = 0; n < NL2; n++) begin
        s = 0.0;
        for (int c = 0; c < NC1; c++) for (int k = 0; k < 3; k++) s += (w2[f][c][k] / 256.0) * q1[c][n + k];
        a2[f][n] = s < 0.0 ? 0.0 : s;
      end
      for (int m = 0; m < NP2; m++) q2[f][m] = a2[f][2*m] > a2[f][2*m+1] ? a2[f][2*m] : a2[f][2*m+1];
    end
    for (int n = 0; n < NFC; n++) begin
      s = bfc[n] / 256.0;
      for (int f = 0; f < NC2; f++) for (int j = 0; j < NP2; j++) s += q2[f][j] * (wfc[n][f][j] / 256.0);
      h[n] = s < 0.0 ? 0.0 : s;
    end
    cls_real = 0;
    for (int o = 0; o < NCL; o++) begin
      s = bo[o] / 256.0;
      for (int i = 0; i < NFC; i++) s += h[i] * (wo[o][i] / 256.0);
      out_real[o] = s;
      if (s > out_real[cls_real]) cls_real = o;
    end
  endfunction

endpackage
