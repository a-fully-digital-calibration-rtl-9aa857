// Test of the output reconstruction: random stage decisions, flash codes and
// tags are presented with the staggered arrival times of the pipeline (stage j
// of sample n in cycle n + (j-1)/2, flash in cycle n + 7), with random fixed
// coefficients. Every output must equal the stage inverse functions applied in
// floating point from the flash back to stage 1, 21 cycles after the sample,
// and the per-cell taps must carry the matching decision and tag.
module tb_recon_chain;
  import adc_cal_pkg::*;

  localparam int NS = 14, NC = 2, LAT = NS / 2 + NS, H = 64;
  localparam real DS = real'(1 << DFRAC);
  localparam real CS = real'(64'sd1 << CFRAC);

  logic clk = 1'b0, rst_n = 1'b0;
  code_t d_in [NS];
  logic [1:0] flash_code;
  slot_tag_t tag_in, tag_out;
  coef_t beta1 [NS];
  coef_t beta3 [NC];
  data_t dout;
  code_t cell_d [NS];
  data_t cell_dout [NS];
  slot_tag_t cell_tag [NS];

  // per-sample history, indexed by sample number modulo H
  code_t      hd [H][NS];
  logic [1:0] hf [H];
  slot_tag_t  ht [H];

  int checks = 0, failures = 0;
  int cyc = 0;

  recon_chain #(.NSTAGES(NS), .NCUBIC(NC)) dut (.clk, .rst_n, .d_in, .flash_code, .tag_in,
    .beta1, .beta3, .dout, .tag_out, .cell_d, .cell_dout, .cell_tag);

  always #5 clk = ~clk;

  function automatic real expected(int n);
    real x;
    x = real'(2 * int'(hf[n % H]) - 3) / 2.0;
    for (int j = NS - 1; j >= 0; j--) begin
      real b1, b3;
      b1 = real'(beta1[j]) / CS;
      b3 = (j < NC) ? real'(beta3[j]) / CS : 0.0;
      x = real'(hd[n % H][j]) + b1 * x + b3 * x * x * x;
    end
    return x;
  endfunction

  initial begin
    for (int j = 0; j < NS; j++) begin
      d_in[j] = '0;
      beta1[j] = coef_t'($rtoi((0.45 + real'($urandom_range(0, 10000)) / 100000.0) * CS));
    end
    for (int j = 0; j < NC; j++)
      beta3[j] = coef_t'($rtoi((real'($urandom_range(0, 20000)) - 10000.0) * 1e-7 * CS));
    flash_code = '0;
    tag_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // outputs visible now belong to sample cyc - LAT
      if (cyc >= LAT + 2) begin
        real e, g;
        int n;
        n = cyc - LAT;
        e = expected(n);
        g = real'(dout) / DS;
        checks += 3;
        if ((g - e) > 40.0 / DS || (e - g) > 40.0 / DS) begin
          failures++; $display("FAIL: sample %0d got %f expected %f", n, g, e);
        end
        if (tag_out != ht[n % H]) begin failures++; $display("FAIL: tag of sample %0d", n); end
        // cell of stage 6 (index 5): output visible in cycle n + NS/2 + (NS-1-5) + 1
        n = cyc - (NS / 2 + (NS - 1 - 5) + 1);
        if (cell_d[5] != hd[n % H][5] || cell_tag[5] != ht[n % H]) begin
          failures++; $display("FAIL: cell tap of sample %0d", n);
        end
      end
      // new sample cyc, and the staggered inputs of this cycle
      for (int j = 0; j < NS; j++) hd[cyc % H][j] = code_t'(int'($urandom_range(0, 2)) - 1);
      hf[cyc % H] = 2'($urandom);
      ht[cyc % H] = slot_tag_t'($urandom);
      for (int j = 0; j < NS; j++) d_in[j] = (cyc >= j / 2) ? hd[(cyc - j / 2) % H][j] : '0;
      flash_code = (cyc >= NS / 2) ? hf[(cyc - NS / 2) % H] : '0;
      tag_in = ht[cyc % H];
    end
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
