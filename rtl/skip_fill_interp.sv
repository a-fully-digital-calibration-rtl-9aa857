// Skip-fill interpolator: recovers the output samples that were skipped to make
// room for calibration.
//
// A symmetric FIR filter estimates the missing sample x[n0] from N_SIDE samples
// before and N_SIDE samples after it:
//     x^[n0] = sum_{k=1..N_SIDE} w_k * (x[n0-k] + x[n0+k]).
// Its response to a sinusoid of angular frequency w is H(w) = sum 2*w_k*cos(k*w),
// and the estimate is exact where H(w) = 1. Two weight sets are available, both
// computed at elaboration (WFRAC fraction bits):
//   BAND_PCT = 0 : polynomial (Lagrange) interpolation through the 2*N_SIDE
//                  neighbours, w_k = (-1)^(k+1) * C(2N, N+k) / C(2N, N). Exact for
//                  polynomials of degree below 2N; accurate up to about 0.5 of the
//                  Nyquist frequency.
//   BAND_PCT > 0 : least-squares fit of H(w) = 1 over 0 <= w <= BAND_PCT % of the
//                  Nyquist frequency, i.e. the solution of
//                  sum_k w_k * int cos(k w) cos(j w) dw = 1/2 * int cos(j w) dw,
//                  j = 1..N_SIDE, solved by Gaussian elimination. The default 80 %
//                  keeps the error below 0.2 LSB of a 12-bit full-scale sine up to
//                  0.8 of the Nyquist frequency.
// The weights alternate in sign, decay away from the missing sample and sum to one.
//
// Interface: one sample per clock on x with its skip flag; y is x delayed by
// N_SIDE+2 cycles, with skipped samples replaced by the estimate (filled = 1).
// A skipped sample must have no other skipped sample within N_SIDE on either side
// (the controller's SKIP_INTERVAL guarantees this in background mode).
// The symmetric FIR and its 20 taps per side follow the converter's description;
// the weight design is this design's own choice.
module skip_fill_interp
  import adc_cal_pkg::*;
#(
  parameter int N_SIDE   = 20,
  parameter int WFRAC    = 24,
  parameter int BAND_PCT = 80
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t x,
  input  logic  skip,
  output data_t y,
  output logic  filled
);

  localparam int L  = 2 * N_SIDE + 1;
  localparam int AW = 64;

  localparam int  NMAX = 40;               // largest N_SIDE the solver supports
  localparam real PI   = 3.14159265358979;

  // Lagrange weight of the neighbour at distance k, scaled by 2^wfrac, rounded.
  function automatic longint lagrange_w(int n, int k, int wfrac);
    longint r, num, den;
    r = longint'(1) <<< 40;
    for (int m = 1; m <= k; m++) begin
      num = longint'(n) - longint'(m) + 1;
      den = longint'(n) + longint'(m);
      r   = (r * num) / den;
    end
    r = (r + (longint'(1) <<< (40 - wfrac - 1))) >>> (40 - wfrac);
    return (k % 2 == 1) ? r : -r;
  endfunction

  // sine by range reduction and Taylor series (usable at elaboration)
  function automatic real sin_c(real arg);
    real v, term, sum;
    int  q;
    q = int'(arg / (2.0 * PI));
    v = arg - real'(q) * 2.0 * PI;
    if (v > PI)  v = v - 2.0 * PI;
    if (v < -PI) v = v + 2.0 * PI;
    term = v;
    sum  = v;
    for (int i = 1; i < 30; i++) begin
      term = -term * v * v / real'((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // Least-squares band-limited weight of the neighbour at distance k, scaled by
  // 2^wfrac, rounded. The normal equations (n x n, augmented) are kept in a flat
  // array a[row*(NMAX+1) + col].
  function automatic longint lsq_w(int n, int k, int band_pct, int wfrac);
    real a [NMAX*(NMAX+1)];
    real wc, f, t, w;
    int  p;
    wc = PI * real'(band_pct) / 100.0;
    for (int j = 1; j <= n; j++) begin
      a[(j-1)*(NMAX+1) + n] = 2.0 * sin_c(real'(j) * wc) / real'(j);
      for (int i = 1; i <= n; i++)
        if (i == j) a[(j-1)*(NMAX+1) + (i-1)] = 2.0 * wc + sin_c(2.0 * real'(i) * wc) / real'(i);
        else        a[(j-1)*(NMAX+1) + (i-1)] = 2.0 * (sin_c(real'(i - j) * wc) / real'(i - j)
                                                     + sin_c(real'(i + j) * wc) / real'(i + j));
    end
    for (int c = 0; c < n; c++) begin
      p = c;
      for (int r = c + 1; r < n; r++)
        if (a[r*(NMAX+1) + c] * a[r*(NMAX+1) + c] > a[p*(NMAX+1) + c] * a[p*(NMAX+1) + c]) p = r;
      for (int m = 0; m <= n; m++) begin
        t = a[c*(NMAX+1) + m];
        a[c*(NMAX+1) + m] = a[p*(NMAX+1) + m];
        a[p*(NMAX+1) + m] = t;
      end
      for (int r = 0; r < n; r++)
        if (r != c) begin
          f = a[r*(NMAX+1) + c] / a[c*(NMAX+1) + c];
          for (int m = c; m <= n; m++) a[r*(NMAX+1) + m] = a[r*(NMAX+1) + m] - f * a[c*(NMAX+1) + m];
        end
    end
    w = a[(k-1)*(NMAX+1) + n] / a[(k-1)*(NMAX+1) + (k-1)] * real'(longint'(1) <<< wfrac);
    return longint'($rtoi(w + ((w >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic longint tap_w(int n, int k, int band_pct, int wfrac);
    return (band_pct == 0) ? lagrange_w(n, k, wfrac) : lsq_w(n, k, band_pct, wfrac);
  endfunction

  data_t buf_x [L];
  logic  buf_s [L];
  logic signed [AW-1:0] terms [N_SIDE];
  logic signed [AW-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) begin
        buf_x[i] <= '0;
        buf_s[i] <= 1'b0;
      end
    end else begin
      buf_x[0] <= x;
      buf_s[0] <= skip;
      for (int i = 1; i < L; i++) begin
        buf_x[i] <= buf_x[i-1];
        buf_s[i] <= buf_s[i-1];
      end
    end
  end

  for (genvar k = 1; k <= N_SIDE; k++) begin : g_tap
    localparam longint W = tap_w(N_SIDE, k, BAND_PCT, WFRAC);
    logic signed [AW-1:0] pair;
    assign pair           = AW'(buf_x[N_SIDE-k]) + AW'(buf_x[N_SIDE+k]);
    assign terms[k-1]     = pair * AW'(W);
  end

  initial assert (N_SIDE <= NMAX && BAND_PCT >= 0 && BAND_PCT < 100)
    else $error("skip_fill_interp: unsupported N_SIDE or BAND_PCT");

  always_comb begin
    acc = '0;
    for (int k = 0; k < N_SIDE; k++) acc = acc + terms[k];
    acc = acc + (AW'(1) <<< (WFRAC - 1));   // round to nearest
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y      <= '0;
      filled <= 1'b0;
    end else begin
      filled <= buf_s[N_SIDE];
      y      <= buf_s[N_SIDE] ? data_t'(acc >>> WFRAC) : buf_x[N_SIDE];
    end
  end

endmodule
