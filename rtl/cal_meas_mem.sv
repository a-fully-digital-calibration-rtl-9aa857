// Measurement memory of the coefficient extraction.
//
// For each calibration level (V1, V2) the stage under calibration is measured
// twice: once in its normal 1.5-bit configuration, giving the decision D_i and
// the digitized output D_out1, and once in multiply-by-two configuration, giving
// D_out2. This memory keeps D_i and D_out1 until the matching D_out2 arrives and
// then presents the complete set (D_i, D_out1, D_out2) for one LMS update.
//
// Interface: a write (wr_en) carries the sample tag fields x2/vsel/stage and the
// pair (d, dout) captured at the output of the stage's reconstruction cell.
// A multiply-by-two write without a stored 1.5-bit entry of the same level and
// stage is dropped. Timing: pair_valid is a one-cycle pulse, registered, in the
// cycle after the completing write; the pair outputs hold until the next pulse.
// The storage of both values follows the calibration procedure; the pairing rule
// and the one-entry-per-level organisation are choices of this design.
module cal_meas_mem
  import adc_cal_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       wr_en,
  input  logic       wr_x2,
  input  logic       wr_vsel,
  input  logic [3:0] wr_stage,
  input  code_t      wr_d,
  input  data_t      wr_dout,
  output logic       pair_valid,
  output logic [3:0] pair_stage,
  output logic       pair_vsel,
  output code_t      pair_d,
  output data_t      pair_dout1,
  output data_t      pair_dout2
);

  typedef struct packed {
    logic       have1;
    logic [3:0] stage;
    code_t      d;
    data_t      dout1;
  } entry_t;

  entry_t mem [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem[0]     <= '0;
      mem[1]     <= '0;
      pair_valid <= 1'b0;
      pair_stage <= '0;
      pair_vsel  <= 1'b0;
      pair_d     <= '0;
      pair_dout1 <= '0;
      pair_dout2 <= '0;
    end else begin
      pair_valid <= 1'b0;
      if (clear) begin
        mem[0].have1 <= 1'b0;
        mem[1].have1 <= 1'b0;
      end else if (wr_en) begin
        if (!wr_x2) begin
          mem[wr_vsel] <= '{have1: 1'b1, stage: wr_stage, d: wr_d, dout1: wr_dout};
        end else if (mem[wr_vsel].have1 && mem[wr_vsel].stage == wr_stage) begin
          mem[wr_vsel].have1 <= 1'b0;
          pair_valid <= 1'b1;
          pair_stage <= wr_stage;
          pair_vsel  <= wr_vsel;
          pair_d     <= mem[wr_vsel].d;
          pair_dout1 <= mem[wr_vsel].dout1;
          pair_dout2 <= wr_dout;
        end
      end
    end
  end

endmodule
