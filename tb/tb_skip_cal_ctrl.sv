// Test of the skipping and calibration controller at reduced sizes (6 stages,
// 8 slots per stage, one slot per 8 samples). Checks the stage order (last stage
// first), the slot order of linear and cubic stages, the slot spacing in
// background mode, the insertion time of the calibration level (stage i, (i-1)/2
// cycles after the skipped sample) with its configuration and level, the end of
// a foreground sweep and the restart of the background sweep.
module tb_skip_cal_ctrl;
  import adc_cal_pkg::*;

  localparam int NS = 6, NC = 2, SI = 8, SPS = 8, DR = 4, MAXC = 4000;

  logic clk = 1'b0, rst_n = 1'b0, cal_en = 1'b0, foreground = 1'b0;
  slot_tag_t tag;
  logic skip_in, vcal_sel, sweep_start, busy, done;
  logic [NS-1:0] cal_insert, mode_x2;
  logic [3:0] cal_stage;
  int checks = 0, failures = 0;

  skip_cal_ctrl #(.NSTAGES(NS), .NCUBIC(NC), .SKIP_INTERVAL(SI), .SLOTS_PER_STAGE(SPS),
    .DRAIN(DR)) dut (.clk, .rst_n, .cal_en, .foreground, .tag, .skip_in, .cal_insert,
    .mode_x2, .vcal_sel, .cal_stage, .sweep_start, .busy, .done);

  always #5 clk = ~clk;

  slot_tag_t th [MAXC];
  int cyc = 0;
  // slot log
  int slot_cyc [512];
  slot_tag_t slot_tag [512];
  int nslots = 0, nstarts = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (cycle %0d): %s", cyc, what); end
  endtask

  // sample all outputs in the middle of each cycle
  always @(negedge clk) if (rst_n) begin
    th[cyc] = tag;
    chk(skip_in == tag.skip, "skip_in follows the slot");
    if (tag.cal) begin
      slot_cyc[nslots] = cyc;
      slot_tag[nslots] = tag;
      nslots++;
    end
    if (sweep_start) nstarts++;
    for (int i = 0; i < NS; i++) begin
      bit ins, x2;
      ins = 0; x2 = 0;
      if (cyc >= i / 2) begin
        ins = th[cyc - i / 2].cal && int'(th[cyc - i / 2].stage) == i + 1;
        x2  = ins && th[cyc - i / 2].x2;
        if (ins) chk(vcal_sel == th[cyc - i / 2].vsel, "calibration level");
      end
      chk(cal_insert[i] == ins, $sformatf("cal_insert[%0d]", i));
      chk(mode_x2[i] == x2, $sformatf("mode_x2[%0d]", i));
    end
    cyc++;
  end

  task automatic check_sweep(int first, bit fg);
    // NS stages, SPS slots each, from stage NS down to 1
    for (int s = NS; s >= 1; s--)
      for (int k = 0; k < SPS; k++) begin
        int idx;
        slot_tag_t t;
        idx = first + (NS - s) * SPS + k;
        t = slot_tag[idx];
        chk(int'(t.stage) == s, $sformatf("slot %0d stage %0d expected %0d", idx, t.stage, s));
        chk(t.skip, "slot skips the input");
        chk(t.x2 == k[0], "configuration alternates");
        chk(t.vsel == ((s <= NC) ? k[1] : 1'b0), "level order");
        if (k > 0) chk(slot_cyc[idx] - slot_cyc[idx-1] == (fg ? 1 : SI), "slot spacing");
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // foreground sweep
    @(negedge clk); foreground = 1'b1; cal_en = 1'b1;
    wait (done);
    @(negedge clk);
    repeat (5) @(negedge clk);
    chk(!busy, "foreground sweep ends idle");
    chk(done, "done holds");
    chk(nslots == NS * SPS, $sformatf("foreground slots %0d", nslots));
    check_sweep(0, 1'b1);
    @(negedge clk); cal_en = 1'b0;
    @(negedge clk);
    chk(!done, "done cleared with cal_en");
    // background: one full sweep, then it starts again
    nslots = 0; nstarts = 0;
    @(negedge clk); foreground = 1'b0; cal_en = 1'b1;
    wait (done);
    repeat (3 * SI) @(negedge clk);
    chk(busy, "background keeps running");
    chk(nstarts == 2, $sformatf("background restarts (%0d starts)", nstarts));
    chk(nslots > NS * SPS, "slots of the second sweep");
    check_sweep(0, 1'b0);
    chk(int'(slot_tag[NS * SPS].stage) == NS, "second sweep starts at the last stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (MAXC - 10));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
