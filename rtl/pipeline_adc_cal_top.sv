// Digital back end of a 12-bit pipelined ADC with fully digital background
// calibration of capacitor mismatch, gain error and amplifier nonlinearity.
//
// The analog part (outside this module) is a chain of NSTAGES 1.5-bit stages
// followed by a 2-bit flash. Each stage delivers its comparator pair (b1, b0); this
// module decodes them (subadc_decoder), drives each stage's sub-DAC multiplexer and
// two-mode switch, and rebuilds the converter output by applying every stage's
// inverse function D_in = D + beta1*D_out + beta3*D_out^3 from the flash back to
// stage 1 (recon_chain, coef_bank). The coefficients are measured on the running
// converter: the controller (skip_cal_ctrl) skips an input sample and lets the
// stage under calibration convert a calibration level in the freed slot, once in
// its normal configuration and once as a plain multiply-by-two stage. The two
// back-end readings of the same input (cal_meas_mem) give one LMS update of that
// stage's beta1/beta3 (lms_update). The skipped output sample is then filled in by
// an FIR interpolator (skip_fill_interp).
//
// Timing: the comparator outputs of stage i are sampled at the clock edge that
// ends cycle n + (i-1)/2 for sample n (two stages per clock period, on opposite
// phases); the flash code at the end of cycle n + NSTAGES/2. cal_insert, mode_x2
// and vcal_sel are valid during the cycle in which the stage takes its sample.
// adc_code follows the sample by 1 + NSTAGES/2 + NSTAGES + N_SIDE + 3 cycles
// (45 at the defaults).
// The structure follows the calibration method; the cycle-level timing, number
// formats and output coding (offset binary, 0 = -Vref) are choices of this design.
module pipeline_adc_cal_top
  import adc_cal_pkg::*;
#(
  parameter int NSTAGES         = 14,
  parameter int NCUBIC          = 2,
  parameter int SKIP_INTERVAL   = 64,
  parameter int SLOTS_PER_STAGE = 4096,
  parameter int DRAIN           = 32,
  parameter int MU1_SHIFT       = 7,
  parameter int MU3_SHIFT       = 8,
  parameter int N_SIDE          = 20,
  parameter int BAND_PCT        = 80
) (
  input  logic               clk,
  input  logic               rst_n,
  // control
  input  logic               cal_en,        // run the coefficient extraction
  input  logic               foreground,    // 1: converter stopped, every sample calibrates
  input  logic               coef_init,     // reload the ideal coefficients
  // analog pipeline interface
  input  logic [NSTAGES-1:0] comp_b1,       // stage comparators at +Vref/4 (index 0: stage 1)
  input  logic [NSTAGES-1:0] comp_b0,       // stage comparators at -Vref/4
  input  logic [1:0]         flash_code,    // 2-bit flash after the last stage
  output logic [2:0]         dac_sel [NSTAGES], // sub-DAC selection per stage, one-hot
  output logic [NSTAGES-1:0] mode_x2,       // stage in multiply-by-two configuration
  output logic [NSTAGES-1:0] cal_insert,    // stage samples the calibration level
  output logic               vcal_sel,      // calibration level: 0 = V1, 1 = V2
  output logic               skip_in,       // stage 1 skips the input sample
  // converter output
  output logic [OUT_BITS-1:0] adc_code,
  output logic               adc_filled,    // this sample was interpolated
  // calibration status
  output logic               cal_busy,
  output logic               cal_done,
  output logic [3:0]         cal_stage,
  output logic               lms_valid,     // one pulse per LMS update
  output data_t              lms_err,
  output coef_t              beta1 [NSTAGES],
  output coef_t              beta3 [NCUBIC]
);

  // ---------------- control ----------------
  slot_tag_t tag, tag_q;
  logic      sweep_start;

  skip_cal_ctrl #(
    .NSTAGES(NSTAGES), .NCUBIC(NCUBIC), .SKIP_INTERVAL(SKIP_INTERVAL),
    .SLOTS_PER_STAGE(SLOTS_PER_STAGE), .DRAIN(DRAIN)
  ) u_ctrl (
    .clk, .rst_n, .cal_en, .foreground,
    .tag, .skip_in, .cal_insert, .mode_x2, .vcal_sel, .cal_stage,
    .sweep_start, .busy(cal_busy), .done(cal_done));

  // ---------------- sub-ADC decoding and capture ----------------
  code_t      d_now [NSTAGES];
  code_t      d_cap [NSTAGES];
  logic [1:0] flash_cap;

  for (genvar i = 0; i < NSTAGES; i++) begin : g_dec
    subadc_decoder u_dec (
      .b1(comp_b1[i]), .b0(comp_b0[i]), .mode_x2(mode_x2[i]),
      .d(d_now[i]), .dac_sel(dac_sel[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTAGES; i++) d_cap[i] <= '0;
      flash_cap <= '0;
      tag_q     <= '0;
    end else begin
      for (int i = 0; i < NSTAGES; i++) d_cap[i] <= d_now[i];
      flash_cap <= flash_code;
      tag_q     <= tag;     // the captured codes are one cycle late; so is the tag
    end
  end

  // ---------------- reconstruction ----------------
  data_t     recon;
  slot_tag_t recon_tag;
  code_t     cell_d    [NSTAGES];
  data_t     cell_dout [NSTAGES];
  slot_tag_t cell_tag  [NSTAGES];

  recon_chain #(.NSTAGES(NSTAGES), .NCUBIC(NCUBIC)) u_recon (
    .clk, .rst_n, .d_in(d_cap), .flash_code(flash_cap), .tag_in(tag_q),
    .beta1, .beta3, .dout(recon), .tag_out(recon_tag),
    .cell_d, .cell_dout, .cell_tag);

  // ---------------- measurement capture ----------------
  logic       m_wr;
  logic       m_x2, m_vsel;
  logic [3:0] m_stage;
  code_t      m_d;
  data_t      m_dout;

  always_comb begin
    m_wr = 1'b0; m_x2 = 1'b0; m_vsel = 1'b0; m_stage = '0; m_d = '0; m_dout = '0;
    for (int i = 0; i < NSTAGES; i++) begin
      if (cell_tag[i].cal && int'(cell_tag[i].stage) == i + 1) begin
        m_wr    = 1'b1;
        m_x2    = cell_tag[i].x2;
        m_vsel  = cell_tag[i].vsel;
        m_stage = cell_tag[i].stage;
        m_d     = cell_d[i];
        m_dout  = cell_dout[i];
      end
    end
  end

  logic       p_valid, p_vsel;
  logic [3:0] p_stage;
  code_t      p_d;
  data_t      p_dout1, p_dout2;

  cal_meas_mem u_mem (
    .clk, .rst_n, .clear(sweep_start),
    .wr_en(m_wr), .wr_x2(m_x2), .wr_vsel(m_vsel), .wr_stage(m_stage),
    .wr_d(m_d), .wr_dout(m_dout),
    .pair_valid(p_valid), .pair_stage(p_stage), .pair_vsel(p_vsel),
    .pair_d(p_d), .pair_dout1(p_dout1), .pair_dout2(p_dout2));

  // ---------------- coefficients and LMS ----------------
  coef_t      rd_b1, rd_b3, new_b1, new_b3;
  logic       rd_cubic;
  logic [3:0] upd_stage;

  coef_bank #(.NSTAGES(NSTAGES), .NCUBIC(NCUBIC)) u_coef (
    .clk, .rst_n, .init(coef_init),
    .we(lms_valid), .wr_stage(upd_stage), .wr_beta1(new_b1), .wr_beta3(new_b3),
    .rd_stage(p_stage), .rd_beta1(rd_b1), .rd_beta3(rd_b3), .rd_cubic,
    .beta1, .beta3);

  lms_update #(.MU1_SHIFT(MU1_SHIFT), .MU3_SHIFT(MU3_SHIFT)) u_lms (
    .clk, .rst_n, .in_valid(p_valid), .in_stage(p_stage),
    .d(p_d), .dout1(p_dout1), .dout2(p_dout2),
    .beta1(rd_b1), .beta3(rd_b3), .cubic(rd_cubic),
    .out_valid(lms_valid), .out_stage(upd_stage),
    .beta1_new(new_b1), .beta3_new(new_b3), .err(lms_err));

  // ---------------- skip fill and output coding ----------------
  data_t y;
  logic  y_filled;

  skip_fill_interp #(.N_SIDE(N_SIDE), .BAND_PCT(BAND_PCT)) u_fill (
    .clk, .rst_n, .x(recon), .skip(recon_tag.skip), .y, .filled(y_filled));

  localparam int OSH = DFRAC - (OUT_BITS - 2);   // Vref/2 units -> output LSBs

  data_t code_s;
  always_comb begin
    code_s = (y + (data_t'(1) <<< (OSH - 1))) >>> OSH;
    code_s = code_s + data_t'(1 << (OUT_BITS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_code   <= '0;
      adc_filled <= 1'b0;
    end else begin
      adc_filled <= y_filled;
      if (code_s < 0)                              adc_code <= '0;
      else if (code_s > data_t'((1 << OUT_BITS) - 1)) adc_code <= '1;
      else                                         adc_code <= code_s[OUT_BITS-1:0];
    end
  end

  // the interpolator needs clean neighbours around every skipped sample
  initial assert (SKIP_INTERVAL > 2 * N_SIDE)
    else $error("SKIP_INTERVAL must exceed 2*N_SIDE");

endmodule
