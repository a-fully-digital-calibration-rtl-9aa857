// End-to-end test of the calibrated converter back end, at the default sizes.
//
// A behavioural model of the analog pipeline (gain error of a 38 dB amplifier,
// 0.1 % capacitor mismatch, cubic compression in stages 1 and 2) converts a sine
// wave. The test
//   1. measures the output error with the ideal coefficients (must be large),
//   2. runs a foreground calibration and checks the number of LMS updates, the
//      extracted beta1/beta3 against the model and the output error (<= 2 LSB),
//   3. reloads the ideal coefficients and runs a full background sweep on the
//      running converter (skip, insert, fill), then checks the coefficients, the
//      interpolated samples and every output sample again,
//   4. checks on every cycle that the decoder drives the same sub-DAC level the
//      model used, and the output latency of 45 cycles.
// Mechanisms counted: skipped and filled samples, multiply-by-two slots, V2
// slots, foreground and background sweeps, stage switches.
module tb_pipeline_adc_cal_top;
  import adc_cal_pkg::*;

  localparam int NSTAGES = 14;
  localparam int NCUBIC  = 2;
  localparam int LAT     = 45;
  localparam real PI     = 3.14159265358979;

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

  // ---------------- stimulus: sine, one new sample per cycle ----------------
  localparam int HIST = 64;
  real    vhist [HIST];
  real    freq = 0.01237;      // cycles per sample (about 1 MHz at 80 MS/s)
  real    amp  = 0.95;

  always @(posedge clk) begin
    cycle <= cycle + 1;
  end
  // new sample just after the rising edge, taken by the model at the falling edge
  always @(posedge clk) begin
    vin <= amp * $sin(2.0 * PI * freq * real'(cycle + 1));
  end
  always @(negedge clk) begin
    for (int i = HIST - 1; i > 0; i--) vhist[i] = vhist[i-1];
    vhist[0] = vin;
  end

  // ---------------- checkers ----------------
  int  err_max, err_max_filled, n_cmp;
  bit  measure;
  int  n_filled = 0, n_skip = 0, n_x2 = 0, n_v2 = 0, n_lms = 0, n_stage_sw = 0;
  int  dec_bad = 0;
  logic [3:0] last_stage = '0;

  function automatic int ideal_code(real v);
    int c;
    c = int'($floor(v * 2048.0 + 2048.0 + 0.5));
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return c;
  endfunction

  // Checks run at the rising edge, where the model's outputs and the history are
  // stable and the DUT outputs still show the previous cycle.
  always @(posedge clk) begin
    if (rst_n) begin
      // the decoder drives the level the analog stage used in this cycle
      for (int s = 0; s < NSTAGES; s++) begin
        int kd;
        kd = dac_sel[s] == 3'b100 ? 1 : dac_sel[s] == 3'b001 ? -1 : 0;
        if (kd != k_used[s]) dec_bad++;
      end
      if (skip_in) n_skip++;
      n_x2 += $countones(mode_x2);
      if (vcal_sel && |cal_insert) n_v2++;
      if (lms_valid) n_lms++;
      if (cal_stage != last_stage) begin n_stage_sw++; last_stage = cal_stage; end
      if (adc_filled) n_filled++;
      if (measure) begin
        int e;
        // the code visible in this cycle belongs to the sample taken LAT cycles
        // earlier; vhist[k] holds the sample of k cycles back
        e = int'(adc_code) - ideal_code(vhist[LAT]);

        if (e < 0) e = -e;
        if (e > err_max) err_max = e;
        if (adc_filled && e > err_max_filled) err_max_filled = e;
        n_cmp++;
      end
    end
  end

  task automatic run_measure(int n, output int emax, output int emax_f);
    err_max = 0; err_max_filled = 0; n_cmp = 0;
    measure = 1;
    repeat (n) @(posedge clk);
    measure = 0;
    emax = err_max; emax_f = err_max_filled;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_coefs(real tol1, real tol3, string when);
    for (int s = 0; s < NSTAGES; s++) begin
      real b, t;
      b = real'(beta1[s]) / real'(64'sd1 <<< CFRAC);
      t = ana.true_beta1(s);
      // only the first stages need accurate coefficients: the error of stage s
      // reaches the output divided by about 2^s. The back end behind the last
      // stages has only a few bits, too coarse to measure them (an error of 0.02
      // in beta1 of stage 11 moves the output by less than 0.01 LSB).
      if (s < 5)       check((b - t) < tol1 && (t - b) < tol1,
                       $sformatf("%s beta1[%0d]=%f expected %f", when, s + 1, b, t));
      else if (s < 10) check((b - t) < 0.005 && (t - b) < 0.005,
                       $sformatf("%s beta1[%0d]=%f expected %f", when, s + 1, b, t));
      else             check((b - t) < 0.02 && (t - b) < 0.02,
                       $sformatf("%s beta1[%0d]=%f expected %f", when, s + 1, b, t));
    end
    for (int s = 0; s < NCUBIC; s++) begin
      real b, t;
      b = real'(beta3[s]) / real'(64'sd1 <<< CFRAC);
      t = ana.true_beta3(s);
      check((b - t) < tol3 && (t - b) < tol3,
            $sformatf("%s beta3[%0d]=%g expected %g", when, s + 1, b, t));
      $display("%s beta3[%0d] = %g (model %g)", when, s + 1, b, t);
    end
    $display("%s beta1[1] = %f (model %f)", when, real'(beta1[0]) / real'(64'sd1 <<< CFRAC),
             ana.true_beta1(0));
  endtask

  // ---------------- sequence ----------------
  int emax, emax_f, lms_before, fill_before;
  longint t0;

  initial begin
    measure = 0;
    for (int i = 0; i < HIST; i++) vhist[i] = 0.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) @(posedge clk);

    // 1. uncalibrated
    run_measure(4000, emax, emax_f);
    $display("uncalibrated: max error %0d LSB", emax);
    check(emax > 8, "uncalibrated error should be large");

    // 2. foreground calibration
    foreground = 1'b1; cal_en = 1'b1;
    lms_before = n_lms; t0 = cycle;
    wait (cal_done);
    @(posedge clk);
    $display("foreground calibration took %0d cycles, %0d updates", cycle - t0, n_lms - lms_before);
    check(n_lms - lms_before == NSTAGES * 4096 / 2, "number of LMS updates in a sweep");
    check(cycle - t0 < NSTAGES * (4096 + 32) + 200, "foreground sweep length");
    cal_en = 1'b0; foreground = 1'b0;
    check_coefs(0.0005, 0.0001, "foreground");
    repeat (200) @(posedge clk);
    run_measure(8000, emax, emax_f);
    $display("after foreground calibration: max error %0d LSB", emax);
    check(emax <= 2, "error after foreground calibration");

    // 3. background calibration from the ideal coefficients
    coef_init = 1'b1; @(posedge clk); coef_init = 1'b0;
    check(beta1[0] == BETA1_IDEAL, "coefficients reloaded");
    foreground = 1'b0; cal_en = 1'b1;
    fill_before = n_filled; t0 = cycle;
    wait (cal_done);
    $display("background sweep took %0d cycles", cycle - t0);
    check(cycle - t0 >= NSTAGES * 4095 * 64, "background sweep uses one slot per 64 samples");
    // keep tracking in the background while the output is checked
    check_coefs(0.0005, 0.0001, "background");
    repeat (100) @(posedge clk);
    run_measure(20000, emax, emax_f);
    $display("background: max error %0d LSB, on filled samples %0d LSB", emax, emax_f);
    check(emax <= 2, "error with background calibration running");
    check(emax_f <= 2, "error of interpolated samples");
    cal_en = 1'b0;

    // mechanism counts
    $display("skips %0d fills %0d x2-slots %0d V2-slots %0d updates %0d stage changes %0d",
             n_skip, n_filled, n_x2, n_v2, n_lms, n_stage_sw);
    check(n_filled - fill_before > 0, "skipped samples were filled");
    check(n_skip > 0, "input samples skipped");
    check(n_x2 > 0, "multiply-by-two configuration used");
    check(n_v2 > 0, "calibration level V2 used");
    check(n_stage_sw >= 2 * NSTAGES, "all stages calibrated in both sweeps");
    check(dec_bad == 0, $sformatf("decoder/model level mismatches: %0d", dec_bad));

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
