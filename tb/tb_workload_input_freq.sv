// Workload: converter output versus input frequency at 80 MS/s, for the input
// frequencies 1, 5, 10, 20, 30 and 38 MHz (sample-rate fractions 1/80 ... 38/80).
// The design runs at its default sizes with background calibration, started from
// the ideal coefficients, and keeps calibrating (skipping one sample in 64) while
// each frequency is measured. For every frequency the test reports the largest
// error of ordinary and of interpolated samples and a signal-to-noise-and-
// distortion figure computed against the ideal input, and an SFDR from the
// harmonics 2 to 5. Each frequency is shifted to a whole, odd number of cycles
// in the 20000-sample window (coherent sampling), so the harmonic sums do not
// pick up leakage from the fundamental. At 1 MHz SNDR and SFDR are also measured before calibration
// and must improve by more than 20 dB. The analog model has no
// frequency dependence, so the frequency only stresses the interpolator.
// Checks: ordinary samples within 2 LSB at all frequencies; interpolated samples
// within 2 LSB up to 30 MHz (inside the interpolator's 80 % band); SNDR above
// 68 dB up to 30 MHz. At 38 MHz the interpolated samples are only reported.
// The frequency points and the 80 MS/s rate follow the method's evaluation; the
// limits, the window length and the coherent frequency shift are this test's own.
module tb_workload_input_freq;
  import adc_cal_pkg::*;

  localparam int NSTAGES = 14;
  localparam int NCUBIC  = 2;
  localparam int LAT     = 45;
  localparam real PI     = 3.14159265358979;
  localparam int NF      = 6;
  localparam real FMHZ [NF] = '{1.0, 5.0, 10.0, 20.0, 30.0, 38.0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cal_en = 1'b0, foreground = 1'b0, coef_init = 1'b0;
  logic [NSTAGES-1:0] comp_b1, comp_b0, mode_x2, cal_insert;
  logic [1:0]  flash_code;
  logic [2:0]  dac_sel [NSTAGES];
  logic        vcal_sel, skip_in;
  logic [11:0] adc_code;
  logic        adc_filled, cal_busy, cal_done, lms_valid;
  logic [3:0]  cal_stage;
  data_t       lms_err;
  coef_t       beta1 [NSTAGES];
  coef_t       beta3 [NCUBIC];
  int          k_used [NSTAGES];
  real         vin = 0.0;

  int checks = 0, failures = 0;
  longint cycle = 0;

  pipeline_adc_cal_top dut (
    .clk, .rst_n, .cal_en, .foreground, .coef_init,
    .comp_b1, .comp_b0, .flash_code, .dac_sel, .mode_x2, .cal_insert,
    .vcal_sel, .skip_in, .adc_code, .adc_filled, .cal_busy, .cal_done,
    .cal_stage, .lms_valid, .lms_err, .beta1, .beta3);

  pipeline_analog_model #(.NSTAGES(NSTAGES), .NCUBIC(NCUBIC), .NOISE(0.00002)) ana (
    .clk, .vin, .skip_in, .cal_insert, .mode_x2, .vcal_sel,
    .comp_b1, .comp_b0, .flash_code, .k_used);

  always #5 clk = ~clk;

  localparam int HIST = 64;
  real vhist [HIST];
  real freq = 0.01237;
  real amp  = 0.95;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) vin <= amp * $sin(2.0 * PI * freq * real'(cycle + 1));
  always @(negedge clk) begin
    for (int i = HIST - 1; i > 0; i--) vhist[i] = vhist[i-1];
    vhist[0] = vin;
  end

  bit  measure = 0;
  real emax, emax_f, psig, perr;
  int  nf, nm;
  real hc [1:5], hs [1:5];

  always @(posedge clk) begin
    if (rst_n && measure) begin
      real ideal, e;
      ideal = vhist[LAT] * 2048.0 + 2048.0;
      e = real'(adc_code) - ideal;
      psig += (ideal - 2048.0) * (ideal - 2048.0);
      nm++;
      for (int h = 1; h <= 5; h++) begin
        hc[h] += (real'(adc_code) - 2048.0) * $cos(2.0 * PI * h * freq * real'(cycle));
        hs[h] += (real'(adc_code) - 2048.0) * $sin(2.0 * PI * h * freq * real'(cycle));
      end
      perr += e * e;
      if (e < 0.0) e = -e;
      if (adc_filled) begin
        nf++;
        if (e > emax_f) emax_f = e;
      end else if (e > emax) emax = e;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One measurement of 20000 samples at the current frequency. SFDR here is the
  // fundamental against the largest of harmonics 2 to 5 (aliased where needed).
  task automatic measure_run(output real sndr, output real sfdr);
    real a1, amax;
    repeat (200) @(posedge clk);
    emax = 0.0; emax_f = 0.0; psig = 0.0; perr = 0.0; nf = 0; nm = 0;
    for (int h = 1; h <= 5; h++) begin hc[h] = 0.0; hs[h] = 0.0; end
    measure = 1;
    repeat (20000) @(posedge clk);
    measure = 0;
    @(posedge clk);
    sndr = 10.0 * $log10(psig / perr);
    a1 = hc[1] * hc[1] + hs[1] * hs[1];
    amax = 1.0e-30;
    for (int h = 2; h <= 5; h++)
      if (hc[h] * hc[h] + hs[h] * hs[h] > amax) amax = hc[h] * hc[h] + hs[h] * hs[h];
    sfdr = 10.0 * $log10(a1 / amax);
  endtask

  initial begin
    real sndr0, sfdr0;
    for (int i = 0; i < HIST; i++) vhist[i] = 0.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    freq = real'(250 * int'(FMHZ[0]) + 1) / 20000.0;
    measure_run(sndr0, sfdr0);
    $display("before calibration, 1 MHz: SNDR %0.1f dB, SFDR %0.1f dB", sndr0, sfdr0);
    foreground = 1'b0; cal_en = 1'b1;
    wait (cal_done);
    $display("background calibration converged after %0d cycles", cycle);
    for (int f = 0; f < NF; f++) begin
      real sndr, sfdr;
      freq = real'(250 * int'(FMHZ[f]) + 1) / 20000.0;   // whole cycles in 20000 samples
      measure_run(sndr, sfdr);
      $display("%4.0f MHz: max error %0.2f LSB, interpolated (%0d) %0.2f LSB, SNDR %0.1f dB, SFDR %0.1f dB",
               FMHZ[f], emax, nf, emax_f, sndr, sfdr);
      check(nf > 100, "interpolated samples present");
      check(emax <= 2.0, $sformatf("ordinary samples at %0.0f MHz", FMHZ[f]));
      if (FMHZ[f] <= 30.0) begin
        check(emax_f <= 2.0, $sformatf("interpolated samples at %0.0f MHz", FMHZ[f]));
        check(sndr > 68.0, $sformatf("SNDR at %0.0f MHz", FMHZ[f]));
      end
      if (f == 0) begin
        $display("improvement at 1 MHz: SNDR %0.1f dB, SFDR %0.1f dB", sndr - sndr0, sfdr - sfdr0);
        check(sndr - sndr0 > 20.0, "SNDR improved by calibration");
        check(sfdr - sfdr0 > 20.0, "SFDR improved by calibration");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 5_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
