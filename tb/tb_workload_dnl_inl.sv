// Workload: static linearity (DNL and INL) of the 12-bit converter, measured by
// a code histogram of a slow full-scale ramp, before and after calibration.
// The design runs at its default sizes on the behavioural analog model. The ramp
// covers -Vref..+Vref with RPC samples per ideal code; the end codes 0 and 4095
// are left out. DNL(c) = count(c)/mean - 1; INL is the running sum of the DNL
// with the straight line through its end points removed.
// Sequence: ramp with the ideal (uncalibrated) coefficients, which must show a
// large INL (above 8 LSB); a foreground calibration sweep; a second ramp, which
// must show |DNL| and |INL| within 0.5 LSB and no missing codes.
// The 0.5 LSB INL target follows the calibrated result the method reports; the
// analog errors are those of the behavioural model, and the ramp length and DNL
// limit are choices of this test.
module tb_workload_dnl_inl;
  import adc_cal_pkg::*;

  localparam int NSTAGES = 14;
  localparam int NCUBIC  = 2;
  localparam int NCODE   = 4096;
  localparam int RPC     = 16;
  localparam int NRAMP   = NCODE * RPC;

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

  pipeline_adc_cal_top dut (
    .clk, .rst_n, .cal_en, .foreground, .coef_init,
    .comp_b1, .comp_b0, .flash_code, .dac_sel, .mode_x2, .cal_insert,
    .vcal_sel, .skip_in, .adc_code, .adc_filled, .cal_busy, .cal_done,
    .cal_stage, .lms_valid, .lms_err, .beta1, .beta3);

  pipeline_analog_model #(.NSTAGES(NSTAGES), .NCUBIC(NCUBIC), .NOISE(0.00002)) ana (
    .clk, .vin, .skip_in, .cal_insert, .mode_x2, .vcal_sel,
    .comp_b1, .comp_b0, .flash_code, .k_used);

  always #5 clk = ~clk;

  int  hist [NCODE];
  bit  counting = 0;

  always @(posedge clk) if (counting) hist[adc_code] <= hist[adc_code] + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs one ramp and returns peak |DNL|, peak |INL| and the number of missing codes.
  task automatic ramp(output real dnl_pk, output real inl_pk, output int missing);
    real mean, dnl, inl_raw [NCODE], acc, slope;
    foreach (hist[c]) hist[c] = 0;
    for (int k = 0; k < NRAMP + 60; k++) begin
      @(posedge clk);
      vin <= -1.0 + 2.0 * (real'(k) + 0.5) / real'(NRAMP);
      if (k == 50) counting = 1;               // pipeline filled with ramp samples
      if (k == NRAMP + 50) counting = 0;
    end
    vin <= 0.0;
    mean = 0.0;
    for (int c = 1; c < NCODE - 1; c++) mean += real'(hist[c]);
    mean = mean / real'(NCODE - 2);
    dnl_pk = 0.0; missing = 0; acc = 0.0;
    for (int c = 1; c < NCODE - 1; c++) begin
      dnl = real'(hist[c]) / mean - 1.0;
      if (hist[c] == 0) missing++;
      if (dnl > dnl_pk) dnl_pk = dnl;
      if (-dnl > dnl_pk) dnl_pk = -dnl;
      acc += dnl;
      inl_raw[c] = acc;
    end
    slope = (inl_raw[NCODE-2] - inl_raw[1]) / real'(NCODE - 3);
    inl_pk = 0.0;
    for (int c = 1; c < NCODE - 1; c++) begin
      real v;
      v = inl_raw[c] - inl_raw[1] - slope * real'(c - 1);
      if (v > inl_pk) inl_pk = v;
      if (-v > inl_pk) inl_pk = -v;
    end
  endtask

  initial begin
    real dnl_pk, inl_pk;
    int  missing;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    ramp(dnl_pk, inl_pk, missing);
    $display("before calibration: peak |DNL| %0.2f LSB, peak |INL| %0.2f LSB, missing codes %0d",
             dnl_pk, inl_pk, missing);
    check(inl_pk > 8.0, "uncalibrated INL should be large");
    foreground = 1'b1; cal_en = 1'b1;
    wait (cal_done);
    repeat (100) @(posedge clk);
    ramp(dnl_pk, inl_pk, missing);
    $display("after calibration:  peak |DNL| %0.2f LSB, peak |INL| %0.2f LSB, missing codes %0d",
             dnl_pk, inl_pk, missing);
    check(dnl_pk <= 0.5, "DNL after calibration");
    check(inl_pk <= 0.5, "INL after calibration");
    check(missing == 0, "no missing codes after calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
