// Output reconstruction of the pipelined converter.
//
// Starting from the 2-bit flash at the end of the pipeline, the inverse function
// of every stage is applied in turn (stage NSTAGES first, stage 1 last), so the
// corrected input of stage i+1 is the digitized output of stage i. The result of
// stage 1 is the corrected converter output in units of Vref/2.
// Stages 1..NCUBIC use beta1 and beta3, the other stages beta1 only.
//
// Timing convention of the inputs: the decision of stage i for sample n is
// presented in cycle n + (i-1)/2 (integer division: consecutive stages work on
// opposite clock phases, so two stages share each clock period), the flash code in
// cycle n + NSTAGES/2, and the sample's tag in cycle n. Internal delay lines line
// them up; the cell of stage j works in cycle n + NSTAGES/2 + (NSTAGES - j).
// Latency from the tag to dout: NSTAGES/2 + NSTAGES cycles (21 for 14 stages).
// All per-cell results (d, D_out, tag) are brought out for the calibration unit.
module recon_chain
  import adc_cal_pkg::*;
#(
  parameter int NSTAGES = 14,
  parameter int NCUBIC  = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  code_t      d_in   [NSTAGES],   // index 0 is stage 1
  input  logic [1:0] flash_code,
  input  slot_tag_t  tag_in,
  input  coef_t      beta1  [NSTAGES],
  input  coef_t      beta3  [NCUBIC],
  output data_t      dout,               // corrected converter output
  output slot_tag_t  tag_out,
  output code_t      cell_d    [NSTAGES],
  output data_t      cell_dout [NSTAGES],
  output slot_tag_t  cell_tag  [NSTAGES]
);

  localparam int FLASH_T = NSTAGES / 2;

  data_t     din_q [NSTAGES];
  slot_tag_t tag_al;

  delay_line #(.W($bits(slot_tag_t)), .LEN(FLASH_T)) u_tag_dly (
    .clk, .rst_n, .din(tag_in), .dout(tag_al));

  for (genvar j = 0; j < NSTAGES; j++) begin : g_cell
    // stage number s = j+1 arrives in cycle n + j/2, is used in cycle
    // n + FLASH_T + (NSTAGES - 1 - j)
    localparam int DLY = FLASH_T + (NSTAGES - 1 - j) - (j / 2);
    code_t     d_al;
    data_t     back;
    slot_tag_t tg;
    coef_t     b3;

    delay_line #(.W(2), .LEN(DLY)) u_d_dly (
      .clk, .rst_n, .din(d_in[j]), .dout(d_al));

    if (j == NSTAGES - 1) begin : g_last
      assign back = flash_to_data(flash_code);
      assign tg   = tag_al;
    end else begin : g_mid
      assign back = din_q[j+1];
      assign tg   = cell_tag[j+1];
    end

    if (j < NCUBIC) begin : g_b3
      assign b3 = beta3[j];
    end else begin : g_nob3
      assign b3 = '0;
    end

    stage_inverse #(.HAS_CUBIC(j < NCUBIC)) u_inv (
      .clk, .rst_n,
      .d(d_al), .dout(back), .beta1(beta1[j]), .beta3(b3), .tag(tg),
      .din_q(din_q[j]), .d_q(cell_d[j]), .dout_q(cell_dout[j]), .tag_q(cell_tag[j]));
  end

  assign dout    = din_q[0];
  assign tag_out = cell_tag[0];

endmodule
