// Behavioural model (not synthesizable) of the analog part of the converter:
// NSTAGES 1.5-bit stages with non-flip-around MDACs and a 2-bit flash, for
// simulation of the digital back end only.
//
// Stage s (Vref = 1): comparators at +0.25+off_s (b1) and -0.25+off_s (b0); the
// MDAC forms x = c_s*(vin - k/2) with c_s = 2*(1+delta_s) (capacitor mismatch) and
// the amplifier gives vout = g*x - a_s*x^3 (finite gain g, cubic compression a_s,
// non-zero only for the first NCUBIC stages). In multiply-by-two mode k = 0. When
// told to, a stage samples the calibration level V1 or V2 instead of the residue
// of its predecessor, and stage 1 samples 0 instead of a skipped input.
// The exact stage inverse of this model, in units of Vref/2, is approximately
//   D_in = k + D_out/(g*c_s) + a_s/(4*c_s*g^4) * D_out^3,
// available through true_beta1()/true_beta3() for checking.
//
// Timing: evaluated at the falling clock edge with the controls of that cycle;
// stage s works on sample n in cycle n + (s-1)/2 and the flash in cycle
// n + NSTAGES/2. Outputs are stable at the next rising edge. An optional
// uniform noise of +-NOISE is added at every stage input.
module pipeline_analog_model #(
  parameter int  NSTAGES = 14,
  parameter int  NCUBIC  = 2,
  parameter real NOISE   = 0.0
) (
  input  logic               clk,
  input  real                vin,
  input  logic               skip_in,
  input  logic [NSTAGES-1:0] cal_insert,
  input  logic [NSTAGES-1:0] mode_x2,
  input  logic               vcal_sel,
  output logic [NSTAGES-1:0] comp_b1,
  output logic [NSTAGES-1:0] comp_b0,
  output logic [1:0]         flash_code,
  output int                 k_used [NSTAGES]
);

  localparam real G  = 0.964;     // closed-loop gain factor of a 38 dB amplifier
  localparam real V1 = 0.26;      // calibration levels, in units of Vref
  localparam real V2 = 0.49;

  real delta [NSTAGES];
  real a3    [NSTAGES];
  real off   [NSTAGES];
  real vout_new [NSTAGES];
  real vout_old [NSTAGES];

  function automatic real true_beta1(int s);   // s: 0-based stage index
    return 1.0 / (G * 2.0 * (1.0 + delta[s]));
  endfunction

  function automatic real true_beta3(int s);
    real c;
    c = 2.0 * (1.0 + delta[s]);
    return a3[s] / (4.0 * c * G * G * G * G);
  endfunction

  function automatic real noise();
    return NOISE * (2.0 * (real'($urandom_range(0, 65535)) / 65535.0) - 1.0);
  endfunction

  initial begin
    for (int s = 0; s < NSTAGES; s++) begin
      // fixed, stage-dependent mismatch of about 0.1 % and small comparator offsets
      delta[s]    = 0.001 * ((s % 3) - 1) + 0.0004 * (s % 2);
      off[s]      = 0.004 * ((s % 5) - 2) / 2.0;
      a3[s]       = (s == 0) ? 0.002 : (s == 1) ? 0.0015 : 0.0;
      vout_new[s] = 0.0;
      vout_old[s] = 0.0;
      k_used[s]   = 0;
    end
    comp_b1    = '0;
    comp_b0    = '0;
    flash_code = '0;
  end

  always @(negedge clk) begin
    real v, x;
    int  k;
    for (int s = 0; s < NSTAGES; s++) vout_old[s] = vout_new[s];
    for (int s = 0; s < NSTAGES; s++) begin
      if (s == 0)          v = skip_in ? 0.0 : vin;
      else if (s % 2 == 1) v = vout_new[s-1];
      else                 v = vout_old[s-1];
      if (cal_insert[s]) v = vcal_sel ? V2 : V1;
      v = v + noise();
      comp_b1[s] = (v > 0.25 + off[s]);
      comp_b0[s] = (v > -0.25 + off[s]);
      if (mode_x2[s])                   k = 0;
      else if (comp_b1[s] && comp_b0[s]) k = 1;
      else if (!comp_b0[s])             k = -1;
      else                              k = 0;
      k_used[s] = k;
      x = 2.0 * (1.0 + delta[s]) * (v - 0.5 * real'(k));
      vout_new[s] = G * x - a3[s] * x * x * x;
    end
    // 2-bit flash on the residue of the last stage, thresholds -0.5, 0, +0.5
    v = ((NSTAGES % 2) == 1 ? vout_new[NSTAGES-1] : vout_old[NSTAGES-1]) + noise();
    if (v < -0.5)      flash_code = 2'd0;
    else if (v < 0.0)  flash_code = 2'd1;
    else if (v < 0.5)  flash_code = 2'd2;
    else               flash_code = 2'd3;
  end

endmodule
