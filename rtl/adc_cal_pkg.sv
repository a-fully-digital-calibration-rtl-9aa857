// Shared types and constants of the calibrated pipelined ADC digital back end.
//
// Number formats (all two's complement):
//   data_t : digital equivalent of a stage input or output, in units of Vref/2,
//            DFRAC fraction bits. The ADC input range [-Vref, +Vref] maps to [-2, +2).
//   coef_t : stage coefficient beta1 / beta3, CFRAC fraction bits (range [-2, 2)).
//   code_t : sub-ADC decision D in {-1, 0, +1}.
// slot_tag_t travels with every sample through the reconstruction pipeline and
// marks the skipped samples that carry a calibration measurement.
package adc_cal_pkg;

  localparam int NSTAGES_DEF = 14;   // 1.5-bit stages in front of the 2-bit flash
  localparam int NCUBIC_DEF  = 2;    // leading stages that also get a cubic term
  localparam int DFRAC       = 20;
  localparam int DW          = 26;
  localparam int CFRAC       = 30;
  localparam int CW          = 32;
  localparam int OUT_BITS    = 12;   // resolution of the converter

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [1:0]    code_t;

  // Ideal starting values of the coefficients (gain of exactly two).
  localparam coef_t BETA1_IDEAL = coef_t'(1) <<< (CFRAC - 1);   // 0.5
  localparam coef_t BETA3_IDEAL = '0;

  typedef struct packed {
    logic       skip;    // input sample was skipped; the output must be filled in
    logic       cal;     // a calibration signal was inserted in this slot
    logic [3:0] stage;   // stage under calibration, 1-based
    logic       x2;      // stage was in multiply-by-two configuration
    logic       vsel;    // 0: calibration level V1, 1: level V2
  } slot_tag_t;

  // Sign-extend a sub-ADC decision into the data format.
  function automatic data_t code_to_data(code_t d);
    return data_t'(d) <<< DFRAC;
  endfunction

  // 2-bit flash code 0..3 to its mid-level -1.5, -0.5, +0.5, +1.5 (Vref/2 units).
  function automatic data_t flash_to_data(logic [1:0] c);
    return (data_t'(2 * int'(c)) - data_t'(3)) <<< (DFRAC - 1);
  endfunction

  // x^3 in the data format.
  function automatic data_t cube(data_t x);
    logic signed [2*DW-1:0] sq, cu;
    sq = (2*DW)'(x) * (2*DW)'(x);
    sq = sq >>> DFRAC;
    cu = sq * (2*DW)'(x);
    cu = cu >>> DFRAC;
    return data_t'(cu);
  endfunction

  // coefficient * data, result in the data format.
  function automatic data_t cmul(coef_t c, data_t x);
    logic signed [CW+DW-1:0] p;
    p = (CW+DW)'(c) * (CW+DW)'(x);
    p = p >>> CFRAC;
    return data_t'(p);
  endfunction

endpackage
