// Exhaustive test of the 1.5-bit sub-ADC decoder: all comparator pairs in both
// configurations, against the decision table of the stage (b1 b0 = 11 -> +1,
// 01 -> 0, 00 -> -1, invalid 10 -> 0; multiply-by-two mode always 0).
module tb_subadc_decoder;
  import adc_cal_pkg::*;

  logic b1, b0, mode_x2;
  code_t d;
  logic [2:0] dac_sel;
  int checks = 0, failures = 0;

  subadc_decoder dut (.b1, .b0, .mode_x2, .d, .dac_sel);

  initial begin
    for (int m = 0; m < 2; m++)
      for (int v = 0; v < 4; v++) begin
        int exp_d;
        logic [2:0] exp_sel;
        {b1, b0} = 2'(v);
        mode_x2  = 1'(m);
        #1;
        if (m == 1)          exp_d = 0;
        else if (v == 3)     exp_d = 1;
        else if (v == 0)     exp_d = -1;
        else                 exp_d = 0;
        exp_sel = exp_d == 1 ? 3'b100 : exp_d == -1 ? 3'b001 : 3'b010;
        checks += 2;
        if (int'(d) != exp_d) begin
          failures++; $display("FAIL: b1b0=%0d x2=%0d d=%0d exp %0d", v, m, d, exp_d);
        end
        if (dac_sel != exp_sel) begin
          failures++; $display("FAIL: b1b0=%0d x2=%0d sel=%b exp %b", v, m, dac_sel, exp_sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
