// sadc_pkg: shared types and elaboration-time functions of the stochastic
// flash ADC.
//
// The analog differential input is carried as a signed fixed-point code
// (vin_t); SIGMA_CODES is the standard deviation of the comparator offset in
// those codes, so the code range covers +-16 sigma, well beyond the +-sigma
// input range the converter is meant for. Both numbers are this design's
// choice of scale; the converter itself only sees ratios to sigma.
//
// comp_offset() gives every comparator a fixed pseudo-random offset drawn from
// an approximately Gaussian distribution (sum of twelve uniform variates,
// Irwin-Hall), standing in for the random mismatch of minimum-size cells.
//
// The wt_* functions describe the Wallace tree of the ones-counter. Stage 0 is
// the comparator vector, all bits of weight 1. Every stage takes each weight
// column, groups its bits in threes into full adders (sum stays in the
// column, carry goes to the next column), passes the one or two bits that are
// left over, and registers the result. Reduction stops when no column holds
// more than two bits; a final two-row adder then forms the binary count.
// Carries out of the top column are dropped: the count never exceeds
// 2**cols - 1, so they are always zero.
package sadc_pkg;

  localparam int unsigned VIN_W       = 16;
  localparam int          SIGMA_CODES = 2048;
  localparam int unsigned MAX_COLS    = 32;

  typedef logic signed [VIN_W-1:0] vin_t;

  // Pseudo-Gaussian offset of comparator idx, in input codes.
  function automatic int comp_offset(int unsigned idx, int unsigned seed, int sigma);
    int unsigned x;
    longint      acc;
    x   = (idx + 32'd1) * 32'h9E37_79B9 ^ (seed * 32'h85EB_CA6B);
    x   = x ^ (x >> 15);
    acc = 0;
    for (int k = 0; k < 12; k++) begin
      x   = x * 32'd1664525 + 32'd1013904223;
      acc = acc + longint'(x[31:16]);
    end
    // Twelve uniform values on [0, 65536): mean 393216, standard deviation 65536.
    return int'(((acc - 64'sd393216) * longint'(sigma)) / 64'sd65536);
  endfunction

  // Number of weight columns of the count of up to n ones.
  function automatic int wt_cols(int n);
    return $clog2(n + 1);
  endfunction

  // Height of column col after stage reduction steps.
  function automatic int wt_height(int n, int stage, int col);
    int h  [MAX_COLS];
    int nh [MAX_COLS];
    int w;
    w = wt_cols(n);
    for (int c = 0; c < MAX_COLS; c++) h[c] = 0;
    h[0] = n;
    for (int s = 0; s < stage; s++) begin
      for (int c = 0; c < MAX_COLS; c++) begin
        nh[c] = 0;
        if (c < w) begin
          nh[c] = h[c] / 3 + h[c] % 3;
          if (c > 0) nh[c] = nh[c] + h[c-1] / 3;
        end
      end
      for (int c = 0; c < MAX_COLS; c++) h[c] = nh[c];
    end
    return (col < w && col >= 0) ? h[col] : 0;
  endfunction

  // Number of full-adder stages needed until every column holds <= 2 bits.
  function automatic int wt_stages(int n);
    int s;
    int mx;
    s = 0;
    forever begin
      mx = 0;
      for (int c = 0; c < wt_cols(n); c++)
        if (wt_height(n, s, c) > mx) mx = wt_height(n, s, c);
      if (mx <= 2) break;
      s++;
    end
    return s;
  endfunction

  // Bit position of the first bit of column col in the stage vector.
  function automatic int wt_offset(int n, int stage, int col);
    int o;
    o = 0;
    for (int c = 0; c < col; c++) o = o + wt_height(n, stage, c);
    return o;
  endfunction

  // Total number of bits held after stage reduction steps.
  function automatic int wt_total(int n, int stage);
    return wt_offset(n, stage, wt_cols(n));
  endfunction

endpackage
