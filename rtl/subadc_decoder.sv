// 1.5-bit sub-ADC decoder with two-mode sub-DAC selection.
//
// The two comparators of a stage compare the stage input with +Vref/4 (b1) and
// -Vref/4 (b0). The decoder turns this thermometer pair into the stage decision
// D in {-1, 0, +1}, which also selects the sub-DAC level k*Vref/2 applied to the
// sampling capacitor. In multiply-by-two mode, used while the stage is being
// calibrated, the multiplexer is forced to k = 0 so the stage amplifies its input
// by two without subtraction.
//
// Purely combinational. Interface: b1, b0, mode_x2 in; d (signed decision) and
// dac_sel (one-hot {+Vref/2, 0, -Vref/2}) out.
// The comparator levels and the -1/0/+1 decision follow the stage drawing; the
// handling of the invalid pair b1=1, b0=0 (treated as D = 0) and the one-hot
// multiplexer encoding are choices of this design.
module subadc_decoder
  import adc_cal_pkg::*;
(
  input  logic       b1,        // input above +Vref/4
  input  logic       b0,        // input above -Vref/4
  input  logic       mode_x2,   // 1: multiply-by-two configuration
  output code_t      d,         // decision used by the MDAC and the digital back end
  output logic [2:0] dac_sel    // one-hot: [2] +Vref/2, [1] 0, [0] -Vref/2
);

  always_comb begin
    if (mode_x2)        d = 2'sd0;
    else if (b1 && b0)  d = 2'sd1;
    else if (!b1 && !b0) d = -2'sd1;
    else                d = 2'sd0;
    unique case (d)
      2'sd1:   dac_sel = 3'b100;
      -2'sd1:  dac_sel = 3'b001;
      default: dac_sel = 3'b010;
    endcase
  end

endmodule
