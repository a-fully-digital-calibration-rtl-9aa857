// Test of the coefficient register file: reset values, writes of beta1/beta3 to
// every stage, the read port, beta3 ignored above NCUBIC, and reload by init.
module tb_coef_bank;
  import adc_cal_pkg::*;

  localparam int NS = 14, NC = 2;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, we = 1'b0;
  logic [3:0] wr_stage = '0, rd_stage = '0;
  coef_t wr_beta1 = '0, wr_beta3 = '0, rd_beta1, rd_beta3;
  logic rd_cubic;
  coef_t beta1 [NS];
  coef_t beta3 [NC];
  coef_t exp1 [NS];
  coef_t exp3 [NC];
  int checks = 0, failures = 0;

  coef_bank #(.NSTAGES(NS), .NCUBIC(NC)) dut (.clk, .rst_n, .init, .we, .wr_stage,
    .wr_beta1, .wr_beta3, .rd_stage, .rd_beta1, .rd_beta3, .rd_cubic, .beta1, .beta3);

  always #5 clk = ~clk;

  task automatic compare(string when);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (beta1[s] != exp1[s]) begin failures++; $display("FAIL %s beta1[%0d]", when, s); end
      rd_stage = 4'(s + 1);
      #1;
      checks++;
      if (rd_beta1 != exp1[s] || rd_cubic != (s < NC) ||
          rd_beta3 != ((s < NC) ? exp3[s] : coef_t'(0))) begin
        failures++; $display("FAIL %s read port stage %0d", when, s + 1);
      end
    end
    for (int s = 0; s < NC; s++) begin
      checks++;
      if (beta3[s] != exp3[s]) begin failures++; $display("FAIL %s beta3[%0d]", when, s); end
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) exp1[s] = coef_t'(1) <<< (CFRAC - 1);
    for (int s = 0; s < NC; s++) exp3[s] = '0;
    #12 rst_n = 1'b1;
    compare("reset");
    for (int r = 0; r < 200; r++) begin
      int s;
      @(negedge clk);
      s = int'($urandom_range(1, NS));
      wr_stage = 4'(s);
      wr_beta1 = coef_t'($urandom);
      wr_beta3 = coef_t'($urandom);
      we = 1'b1;
      @(negedge clk);
      we = 1'b0;
      exp1[s-1] = wr_beta1;
      if (s <= NC) exp3[s-1] = wr_beta3;
      if (r % 20 == 0) compare("write");
    end
    compare("writes");
    @(negedge clk); init = 1'b1; @(negedge clk); init = 1'b0;
    for (int s = 0; s < NS; s++) exp1[s] = coef_t'(1) <<< (CFRAC - 1);
    for (int s = 0; s < NC; s++) exp3[s] = '0;
    compare("init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
