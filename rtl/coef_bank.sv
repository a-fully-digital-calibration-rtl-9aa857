// Coefficient register file of the stage inverse functions.
//
// Holds beta1 of every stage and beta3 of the leading NCUBIC stages. All values are
// read in parallel by the reconstruction pipeline; one extra read port (rd_stage)
// feeds the LMS update, and one write port stores its result. Reset, or a pulse on
// init, loads the ideal values beta1 = 0.5 and beta3 = 0, the starting point of the
// coefficient extraction.
//
// Timing: writes take effect at the next clock edge; reads are combinational.
// Stage numbers on the ports are 1-based. The register organisation and the
// ports are choices of this design; the set of coefficients follows the stage model.
module coef_bank
  import adc_cal_pkg::*;
#(
  parameter int NSTAGES = 14,
  parameter int NCUBIC  = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       we,
  input  logic [3:0] wr_stage,
  input  coef_t      wr_beta1,
  input  coef_t      wr_beta3,      // ignored for stages above NCUBIC
  input  logic [3:0] rd_stage,
  output coef_t      rd_beta1,
  output coef_t      rd_beta3,      // 0 for stages above NCUBIC
  output logic       rd_cubic,      // stage rd_stage has a cubic term
  output coef_t      beta1 [NSTAGES],
  output coef_t      beta3 [NCUBIC]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTAGES; i++) beta1[i] <= BETA1_IDEAL;
      for (int i = 0; i < NCUBIC;  i++) beta3[i] <= BETA3_IDEAL;
    end else if (init) begin
      for (int i = 0; i < NSTAGES; i++) beta1[i] <= BETA1_IDEAL;
      for (int i = 0; i < NCUBIC;  i++) beta3[i] <= BETA3_IDEAL;
    end else if (we) begin
      for (int i = 0; i < NSTAGES; i++)
        if (int'(wr_stage) == i + 1) beta1[i] <= wr_beta1;
      for (int i = 0; i < NCUBIC; i++)
        if (int'(wr_stage) == i + 1) beta3[i] <= wr_beta3;
    end
  end

  always_comb begin
    rd_beta1 = BETA1_IDEAL;
    rd_beta3 = '0;
    rd_cubic = 1'b0;
    for (int i = 0; i < NSTAGES; i++)
      if (int'(rd_stage) == i + 1) rd_beta1 = beta1[i];
    for (int i = 0; i < NCUBIC; i++)
      if (int'(rd_stage) == i + 1) begin
        rd_beta3 = beta3[i];
        rd_cubic = 1'b1;
      end
  end

endmodule
