// Test of the LMS update: random measurement sets and coefficients, compared
// with the update equations evaluated in floating point (one-cycle latency),
// plus a convergence run on a fixed, exactly solvable stage that must reach the
// solution of the two measurement equations.
module tb_lms_update;
  import adc_cal_pkg::*;

  localparam int M1 = 7, M3 = 8;
  localparam real DS = real'(1 << DFRAC);
  localparam real CS = real'(64'sd1 << CFRAC);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, cubic = 1'b0;
  logic [3:0] in_stage = '0, out_stage;
  code_t d = '0;
  data_t dout1 = '0, dout2 = '0, err;
  coef_t beta1 = '0, beta3 = '0, beta1_new, beta3_new;
  logic out_valid;
  int checks = 0, failures = 0;

  lms_update #(.MU1_SHIFT(M1), .MU3_SHIFT(M3)) dut (.clk, .rst_n, .in_valid, .in_stage,
    .d, .dout1, .dout2, .beta1, .beta3, .cubic, .out_valid, .out_stage,
    .beta1_new, .beta3_new, .err);

  always #5 clk = ~clk;

  function automatic bit near(real a, real b, real tol);
    return (a - b) < tol && (b - a) < tol;
  endfunction

  initial begin
    #12 rst_n = 1'b1;
    // random single updates
    for (int n = 0; n < 1000; n++) begin
      real o1, o2, b1, b3, d1, d3, e, nb1, nb3;
      int dv, st;
      @(negedge clk);
      dv = int'($urandom_range(0, 2)) - 1;
      st = int'($urandom_range(1, 14));
      cubic = 1'($urandom_range(0, 1));
      d = code_t'(dv); in_stage = 4'(st);
      dout1 = data_t'($rtoi((real'($urandom_range(0, 40000)) / 10000.0 - 2.0) * DS));
      dout2 = data_t'($rtoi((real'($urandom_range(0, 40000)) / 10000.0 - 2.0) * DS));
      beta1 = coef_t'($rtoi((0.45 + real'($urandom_range(0, 10000)) / 100000.0) * CS));
      beta3 = coef_t'($rtoi((real'($urandom_range(0, 20000)) - 10000.0) * 1e-7 * CS));
      in_valid = 1'b1;
      o1 = real'(dout1) / DS; o2 = real'(dout2) / DS;
      b1 = real'(beta1) / CS; b3 = real'(beta3) / CS;
      d1 = o2 - o1;
      d3 = cubic ? (o2 * o2 * o2 - o1 * o1 * o1) : 0.0;
      e  = real'(dv) - b1 * d1 - b3 * d3;
      nb1 = b1 + e * d1 / real'(1 << M1);
      nb3 = cubic ? b3 + e * d3 / real'(1 << M3) : b3;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 4;
      if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
      if (int'(out_stage) != st) begin failures++; $display("FAIL: stage"); end
      if (!near(real'(err) / DS, e, 200.0 / DS)) begin
        failures++; $display("FAIL: e=%f exp %f", real'(err) / DS, e);
      end
      if (!near(real'(beta1_new) / CS, nb1, 1e-6) || !near(real'(beta3_new) / CS, nb3, 1e-6)) begin
        failures++; $display("FAIL: b1 %f exp %f  b3 %g exp %g", real'(beta1_new) / CS, nb1,
                             real'(beta3_new) / CS, nb3);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid held"); end
    end
    // convergence: stage with beta1 = 0.52, beta3 = 3e-4, measured at two levels
    begin
      real tb1 = 0.52, tb3 = 3e-4;
      real o1v [2] = '{-0.92, -0.04};
      real o2v [2];
      // D_out2 solves D = beta1*(o2-o1) + beta3*(o2^3-o1^3) with D = 1 (bisection)
      for (int k = 0; k < 2; k++) begin
        real lo, hi, mid;
        lo = 0.0;
        hi = 3.0;
        for (int it = 0; it < 60; it++) begin
          mid = (lo + hi) / 2.0;
          if (tb1 * (mid - o1v[k]) + tb3 * (mid * mid * mid - o1v[k] * o1v[k] * o1v[k]) > 1.0)
            hi = mid;
          else
            lo = mid;
        end
        o2v[k] = mid;
      end
      beta1 = coef_t'(64'sd1 <<< (CFRAC - 1));
      beta3 = '0;
      cubic = 1'b1; d = 2'sd1; in_stage = 4'd1;
      for (int n = 0; n < 2048; n++) begin
        @(negedge clk);
        dout1 = data_t'($rtoi(o1v[n % 2] * DS));
        dout2 = data_t'($rtoi(o2v[n % 2] * DS));
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        beta1 = beta1_new;
        beta3 = beta3_new;
      end
      checks += 2;
      if (!near(real'(beta1) / CS, tb1, 1e-4)) begin
        failures++; $display("FAIL: converged beta1 %f", real'(beta1) / CS);
      end
      if (!near(real'(beta3) / CS, tb3, 3e-5)) begin
        failures++; $display("FAIL: converged beta3 %g", real'(beta3) / CS);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
