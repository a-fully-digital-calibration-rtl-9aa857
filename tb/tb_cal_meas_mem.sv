// Test of the measurement memory: interleaved V1/V2 measurements, pairing of a
// 1.5-bit reading with the following multiply-by-two reading of the same level
// and stage, one-cycle pulse latency, dropping of unmatched readings and clear.
module tb_cal_meas_mem;
  import adc_cal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic wr_en = 1'b0, wr_x2 = 1'b0, wr_vsel = 1'b0;
  logic [3:0] wr_stage = '0;
  code_t wr_d = '0;
  data_t wr_dout = '0;
  logic pair_valid, pair_vsel;
  logic [3:0] pair_stage;
  code_t pair_d;
  data_t pair_dout1, pair_dout2;
  int checks = 0, failures = 0, pulses = 0;

  cal_meas_mem dut (.clk, .rst_n, .clear, .wr_en, .wr_x2, .wr_vsel, .wr_stage, .wr_d,
    .wr_dout, .pair_valid, .pair_stage, .pair_vsel, .pair_d, .pair_dout1, .pair_dout2);

  always #5 clk = ~clk;
  always @(posedge clk) if (pair_valid) pulses++;

  task automatic write(bit x2, bit vs, int st, int d, data_t v);
    @(negedge clk);
    wr_en = 1'b1; wr_x2 = x2; wr_vsel = vs; wr_stage = 4'(st); wr_d = code_t'(d); wr_dout = v;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic expect_pair(bit exp, bit vs, int st, int d, data_t v1, data_t v2);
    // called right after write(): the pulse is visible in this cycle only
    checks++;
    if (pair_valid !== exp) begin
      failures++; $display("FAIL: pair_valid=%0d expected %0d", pair_valid, exp);
    end else if (exp && (pair_vsel != vs || int'(pair_stage) != st || int'(pair_d) != d ||
                        pair_dout1 != v1 || pair_dout2 != v2)) begin
      failures++; $display("FAIL: wrong pair contents");
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int r = 0; r < 100; r++) begin
      data_t a1, a2, c1, c2;
      int st;
      st = int'($urandom_range(1, 14));
      a1 = data_t'($urandom); a2 = data_t'($urandom);
      c1 = data_t'($urandom); c2 = data_t'($urandom);
      write(0, 0, st, 1, a1);  expect_pair(0, 0, 0, 0, '0, '0);
      write(0, 1, st, 1, c1);  expect_pair(0, 0, 0, 0, '0, '0);
      write(1, 0, st, 0, a2);  expect_pair(1, 0, st, 1, a1, a2);
      @(negedge clk);
      checks++;
      if (pair_valid) begin failures++; $display("FAIL: pulse longer than one cycle"); end
      write(1, 1, st, 0, c2);  expect_pair(1, 1, st, 1, c1, c2);
      // a second x2 reading without a new 1.5-bit reading is dropped
      write(1, 1, st, 0, c2);  expect_pair(0, 0, 0, 0, '0, '0);
      // a reading of another stage does not complete the pair
      write(0, 0, st, 1, a1);
      write(1, 0, (st % 14) + 1, 0, a2); expect_pair(0, 0, 0, 0, '0, '0);
      // clear drops the stored reading
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      write(1, 0, st, 0, a2);  expect_pair(0, 0, 0, 0, '0, '0);
    end
    checks++;
    if (pulses != 200) begin failures++; $display("FAIL: %0d pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
