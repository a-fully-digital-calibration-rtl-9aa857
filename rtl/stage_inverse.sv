// Digital inverse function of one 1.5-bit pipeline stage.
//
// A stage with sub-ADC decision D and (digitized) output D_out had the input
//     D_in = D + beta1 * D_out + beta3 * D_out^3
// where beta1 absorbs capacitor mismatch and finite amplifier gain and beta3 the
// third-order amplifier nonlinearity. With D_out taken from the already corrected
// back-end stages, this cell returns the corrected value of the stage input.
// HAS_CUBIC = 0 drops the cubic term (the converter uses it only in the leading
// stages).
//
// Timing: one register stage. The decision, the back-end value and the sample tag
// are registered alongside the result so that a calibration unit can pick up the
// (D, D_out) pair of a tagged sample at this cell's output.
// The polynomial is the stage model of the converter; the fixed-point formats
// (see adc_cal_pkg) and the single register are choices of this design.
module stage_inverse
  import adc_cal_pkg::*;
#(
  parameter bit HAS_CUBIC = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  code_t     d,        // sub-ADC decision of this stage
  input  data_t     dout,     // corrected input of the next stage = output of this one
  input  coef_t     beta1,
  input  coef_t     beta3,
  input  slot_tag_t tag,
  output data_t     din_q,    // corrected input of this stage
  output code_t     d_q,
  output data_t     dout_q,
  output slot_tag_t tag_q
);

  data_t lin, nl, sum;

  always_comb begin
    lin = cmul(beta1, dout);
    nl  = HAS_CUBIC ? cmul(beta3, cube(dout)) : '0;
    sum = code_to_data(d) + lin + nl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_q  <= '0;
      d_q    <= '0;
      dout_q <= '0;
      tag_q  <= '0;
    end else begin
      din_q  <= sum;
      d_q    <= d;
      dout_q <= dout;
      tag_q  <= tag;
    end
  end

endmodule
