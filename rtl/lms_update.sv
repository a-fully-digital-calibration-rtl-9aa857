// LMS update of the stage coefficients.
//
// A stage input measured in both configurations satisfies
//   D_i = beta1*(D_out2 - D_out1) + beta3*(D_out2^3 - D_out1^3),
// so with the error
//   e = D_i - beta1*(D_out2 - D_out1) - beta3*(D_out2^3 - D_out1^3)
// the coefficients are refined by
//   beta1 += mu1 * e * (D_out2 - D_out1)
//   beta3 += mu3 * e * (D_out2^3 - D_out1^3)      (only if cubic = 1).
// The step sizes are powers of two, mu = 2^-MU1_SHIFT and 2^-MU3_SHIFT.
// D_i is the stored decision of the 1.5-bit measurement (+1 for a calibration
// level above the comparator threshold).
//
// Timing: the whole update is combinational from the inputs; the new coefficients
// and the error are registered, so out_valid follows in_valid by one cycle.
// The update equations are those of the calibration method; the power-of-two
// step sizes and their values are choices of this design.
module lms_update
  import adc_cal_pkg::*;
#(
  parameter int MU1_SHIFT = 7,
  parameter int MU3_SHIFT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [3:0] in_stage,
  input  code_t      d,
  input  data_t      dout1,
  input  data_t      dout2,
  input  coef_t      beta1,
  input  coef_t      beta3,
  input  logic       cubic,
  output logic       out_valid,
  output logic [3:0] out_stage,
  output coef_t      beta1_new,
  output coef_t      beta3_new,
  output data_t      err
);

  localparam int PW = 2 * DW;
  // e*delta carries 2*DFRAC fraction bits; coefficients carry CFRAC
  localparam int SH1 = 2 * DFRAC - CFRAC + MU1_SHIFT;
  localparam int SH3 = 2 * DFRAC - CFRAC + MU3_SHIFT;

  data_t delta1, delta3, e;
  logic signed [PW-1:0] g1, g3;
  coef_t b1n, b3n;

  always_comb begin
    delta1 = dout2 - dout1;
    delta3 = cubic ? (cube(dout2) - cube(dout1)) : '0;
    e      = code_to_data(d) - cmul(beta1, delta1) - cmul(beta3, delta3);
    g1     = PW'(e) * PW'(delta1);
    g3     = PW'(e) * PW'(delta3);
    b1n    = beta1 + coef_t'(g1 >>> SH1);
    b3n    = cubic ? beta3 + coef_t'(g3 >>> SH3) : beta3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_stage <= '0;
      beta1_new <= '0;
      beta3_new <= '0;
      err       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_stage <= in_stage;
        beta1_new <= b1n;
        beta3_new <= b3n;
        err       <= e;
      end
    end
  end

endmodule
