// Test of the stage inverse cell: random decisions, back-end values and
// coefficients, with and without the cubic term, compared one cycle later with
// D + beta1*D_out + beta3*D_out^3 computed in floating point.
module tb_stage_inverse;
  import adc_cal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  code_t d;
  data_t dout;
  coef_t beta1, beta3;
  slot_tag_t tag;
  data_t din_c, dout_c, din_l, dout_l;
  code_t d_c, d_l;
  slot_tag_t tag_c, tag_l;
  int checks = 0, failures = 0;

  stage_inverse #(.HAS_CUBIC(1'b1)) dut_c (.clk, .rst_n, .d, .dout, .beta1, .beta3, .tag,
    .din_q(din_c), .d_q(d_c), .dout_q(dout_c), .tag_q(tag_c));
  stage_inverse #(.HAS_CUBIC(1'b0)) dut_l (.clk, .rst_n, .d, .dout, .beta1, .beta3, .tag,
    .din_q(din_l), .d_q(d_l), .dout_q(dout_l), .tag_q(tag_l));

  always #5 clk = ~clk;

  localparam real DS = real'(1 << DFRAC);
  localparam real CS = real'(64'sd1 << CFRAC);

  initial begin
    d = '0; dout = '0; beta1 = '0; beta3 = '0; tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      real x, b1, b3, ec, el, tol;
      int  dv;
      @(negedge clk);
      dv    = int'($urandom_range(0, 2)) - 1;
      d     = code_t'(dv);
      x     = (real'($urandom_range(0, 40000)) / 10000.0) - 2.0;    // [-2, 2]
      b1    = 0.45 + real'($urandom_range(0, 10000)) / 100000.0;  // [0.45, 0.55]
      b3    = (real'($urandom_range(0, 20000)) - 10000.0) * 1e-7;  // [-1e-3, 1e-3]
      dout  = data_t'($rtoi(x * DS));
      beta1 = coef_t'($rtoi(b1 * CS));
      beta3 = coef_t'($rtoi(b3 * CS));
      tag   = slot_tag_t'($urandom);
      x     = real'(dout) / DS;
      b1    = real'(beta1) / CS;
      b3    = real'(beta3) / CS;
      ec    = real'(dv) + b1 * x + b3 * x * x * x;
      el    = real'(dv) + b1 * x;
      tol   = 4.0 / DS;
      @(posedge clk); #1;
      checks += 3;
      if ((real'(din_c) / DS - ec) > tol || (ec - real'(din_c) / DS) > tol) begin
        failures++; $display("FAIL cubic: d=%0d x=%f got %f exp %f", dv, x, real'(din_c)/DS, ec);
      end
      if ((real'(din_l) / DS - el) > tol || (el - real'(din_l) / DS) > tol) begin
        failures++; $display("FAIL linear: got %f exp %f", real'(din_l)/DS, el);
      end
      if (d_c != d || dout_c != dout || tag_c != tag) begin
        failures++; $display("FAIL: side outputs not registered with the result");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
