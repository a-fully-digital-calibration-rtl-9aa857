// Fixed delay of LEN clock cycles for a W-bit word (LEN = 0 is a plain wire).
// Used to line up the stage decisions, which leave the analog pipeline half a
// clock period apart, with the stage-by-stage reconstruction. Registers reset to 0.
module delay_line #(
  parameter int W   = 8,
  parameter int LEN = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (LEN == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] sr [LEN];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LEN; i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[LEN-1];
  end

endmodule
