// Skipping and calibration control.
//
// Creates the time slots in which a stage is calibrated while the converter keeps
// running. In a slot the converter input sample n0 is skipped (skip_in tells the
// first stage not to take the input), and the stage under calibration, stage i,
// takes the calibration level instead of its predecessor's residue at the moment
// the skipped sample would have reached it, (i-1)/2 clock periods later
// (cal_insert[i-1], with mode_x2 and vcal_sel). The digital back end later
// fills the skipped output sample in by interpolation.
//
// Slot sequence for one stage: (V1, 1.5-bit), (V1, x2) and, for the leading
// NCUBIC stages, then (V2, 1.5-bit), (V2, x2), repeated SLOTS_PER_STAGE times in all.
// Stages are calibrated from stage NSTAGES down to stage 1, so that the stages
// behind the one being measured are already corrected; between stages the
// controller idles DRAIN cycles so the last measurements leave the pipeline.
//
// Modes: foreground = 1 makes every sample a slot (converter stopped) and stops
// after stage 1 with done = 1. foreground = 0 (background) makes one slot every
// SKIP_INTERVAL samples and restarts at stage NSTAGES after stage 1, tracking
// drift; done rises after the first full sweep. cal_en = 0 aborts, idles and
// clears done.
//
// Outputs are registered (tag: the slot information of the current sample,
// enters the reconstruction with it). Stage-indexed vectors are 0-based
// (index 0 is stage 1). Sequencing and timing of the slots follow the
// calibration method; the slot order, SKIP_INTERVAL, DRAIN and the restart in
// background mode are choices of this design.
module skip_cal_ctrl
  import adc_cal_pkg::*;
#(
  parameter int NSTAGES         = 14,
  parameter int NCUBIC          = 2,
  parameter int SKIP_INTERVAL   = 64,
  parameter int SLOTS_PER_STAGE = 4096,
  parameter int DRAIN           = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cal_en,
  input  logic              foreground,
  output slot_tag_t         tag,
  output logic              skip_in,
  output logic [NSTAGES-1:0] cal_insert,
  output logic [NSTAGES-1:0] mode_x2,
  output logic              vcal_sel,
  output logic [3:0]        cal_stage,
  output logic              sweep_start,   // pulse: calibration of stage NSTAGES begins
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  localparam int HALF = NSTAGES / 2;

  state_t    state;
  logic [1:0] phase;           // [1]: level V2, [0]: x2 configuration
  logic [$clog2(SLOTS_PER_STAGE+1)-1:0] slot_cnt;
  logic [$clog2(SKIP_INTERVAL+1)-1:0]   icnt;
  logic [$clog2(DRAIN+2)-1:0]           dcnt;
  logic      fg;
  slot_tag_t hist [HALF];     // hist[k-1]: tag of the sample k cycles back
  slot_tag_t sr   [HALF+1];   // sr[0] = tag, sr[k] = hist[k-1]
  logic      slot_now;

  assign slot_now = (state == S_RUN) && (fg || icnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      phase       <= '0;
      slot_cnt    <= '0;
      icnt        <= '0;
      dcnt        <= '0;
      fg          <= 1'b0;
      cal_stage   <= '0;
      done        <= 1'b0;
      sweep_start <= 1'b0;
      tag         <= '0;
    end else begin
      sweep_start <= 1'b0;
      tag         <= '0;
      if (!cal_en) begin
        state <= S_IDLE;
        done  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: if (!done || !fg) begin
            state       <= S_RUN;
            fg          <= foreground;
            cal_stage   <= 4'(NSTAGES);
            phase       <= '0;
            slot_cnt    <= '0;
            icnt        <= '0;
            sweep_start <= 1'b1;
          end
          S_RUN: begin
            icnt <= (int'(icnt) == SKIP_INTERVAL - 1) ? '0 : icnt + 1'b1;
            if (slot_now) begin
              tag <= '{skip: 1'b1, cal: 1'b1, stage: cal_stage,
                       x2: phase[0], vsel: phase[1]};
              if (int'(cal_stage) <= NCUBIC) phase <= phase + 1'b1;
              else                          phase <= {1'b0, ~phase[0]};
              if (int'(slot_cnt) == SLOTS_PER_STAGE - 1) begin
                state <= S_DRAIN;
                dcnt  <= '0;
              end else begin
                slot_cnt <= slot_cnt + 1'b1;
              end
            end
          end
          S_DRAIN: begin
            if (int'(dcnt) == DRAIN - 1) begin
              slot_cnt <= '0;
              phase    <= '0;
              icnt     <= '0;
              if (cal_stage == 4'd1) begin
                done <= 1'b1;
                if (fg) begin
                  state <= S_IDLE;
                end else begin
                  state       <= S_RUN;
                  cal_stage   <= 4'(NSTAGES);
                  sweep_start <= 1'b1;
                end
              end else begin
                state     <= S_RUN;
                cal_stage <= cal_stage - 1'b1;
              end
            end else begin
              dcnt <= dcnt + 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // history of slot tags, for the stage-by-stage insertion times
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < HALF; k++) hist[k] <= '0;
    end else begin
      hist[0] <= tag;
      for (int k = 1; k < HALF; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    sr[0] = tag;
    for (int k = 1; k <= HALF; k++) sr[k] = hist[k-1];
  end

  always_comb begin
    skip_in  = tag.skip;
    vcal_sel = 1'b0;
    for (int i = 0; i < NSTAGES; i++) begin
      cal_insert[i] = sr[i/2].cal && (int'(sr[i/2].stage) == i + 1);
      mode_x2[i]    = cal_insert[i] && sr[i/2].x2;
      if (cal_insert[i]) vcal_sel = sr[i/2].vsel;
    end
  end

  assign busy = (state != S_IDLE);

endmodule
