// Test of the skip-fill interpolator at its default length (20 taps per side),
// with both weight sets. Sine waves at 1/80, 10/80 and 30/80 of the sample rate,
// a constant and a cubic ramp are fed with every 64th sample skipped and replaced
// by a wrong value. Unskipped samples must come out unchanged N_SIDE+2 cycles
// later; skipped ones must be flagged and recovered:
//   least-squares weights (default, band 80 % of Nyquist): within 0.2 LSB of a
//     12-bit converter for all signals;
//   polynomial weights: within a few units of the data format's last place for
//     all signals below 30/80 of the sample rate, which lies outside their band.
module tb_skip_fill_interp;
  import adc_cal_pkg::*;

  localparam int N = 20, LAT = N + 2, H = 128;
  localparam real DS  = real'(1 << DFRAC);
  localparam real PI  = 3.14159265358979;
  localparam real LSB = 4.0 / 4096.0;     // 12-bit LSB in units of Vref/2

  logic clk = 1'b0, rst_n = 1'b0, skip = 1'b0, filled_ls, filled_lg;
  data_t x = '0, y_ls, y_lg;
  data_t hx [H];      // true value of each sample
  logic  hs [H];
  int    hseg [H];
  int checks = 0, failures = 0, nfill = 0;

  skip_fill_interp #(.N_SIDE(N)) dut (.clk, .rst_n, .x, .skip, .y(y_ls), .filled(filled_ls));
  skip_fill_interp #(.N_SIDE(N), .BAND_PCT(0)) dut_lg (.clk, .rst_n, .x, .skip,
    .y(y_lg), .filled(filled_lg));

  always #5 clk = ~clk;

  function automatic int segment(int c);
    return c / 1000;
  endfunction

  function automatic real signal(int c);
    case (segment(c))
      0:       return 1.9 * $sin(2.0 * PI * 0.01237 * real'(c));
      1:       return 1.9 * $sin(2.0 * PI * 0.1251 * real'(c));
      2:       return 1.9 * $sin(2.0 * PI * 0.3751 * real'(c) + 0.3);
      3:       return -0.731;
      default: return 1.5e-9 * real'((c - 4500) * (c - 4500) * (c - 4500)) / 8.0;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      if (c >= LAT + 2 * N + 2) begin
        int n;
        real e_ls, e_lg;
        n = c - LAT;
        checks += 2;
        if (filled_ls != hs[n % H] || filled_lg != hs[n % H]) begin
          failures++; $display("FAIL: filled flag at %0d", n);
        end
        // skip samples whose window spans two segments
        if (hs[n % H] && hseg[n % H] == segment(n - N) && hseg[n % H] == segment(n + N)) begin
          nfill++;
          checks++;
          e_ls = real'(y_ls - hx[n % H]) / DS;
          e_lg = real'(y_lg - hx[n % H]) / DS;
          if (e_ls > 0.2 * LSB || e_ls < -0.2 * LSB) begin
            failures++; $display("FAIL: sample %0d (least squares) filled with error %g", n, e_ls);
          end
          if (hseg[n % H] != 2 && (e_lg > 8.0 / DS || e_lg < -8.0 / DS)) begin
            failures++; $display("FAIL: sample %0d (polynomial) filled with error %g", n, e_lg);
          end
        end else if (!hs[n % H] && (y_ls != hx[n % H] || y_lg != hx[n % H])) begin
          failures++; $display("FAIL: sample %0d changed", n);
        end
      end
      hx[c % H]   = data_t'($rtoi(signal(c) * DS));
      hs[c % H]   = (c % 64 == 37);
      hseg[c % H] = segment(c);
      skip = hs[c % H];
      x = skip ? data_t'($urandom) : hx[c % H];
    end
    checks++;
    if (nfill < 60) begin failures++; $display("FAIL: only %0d fills", nfill); end
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
