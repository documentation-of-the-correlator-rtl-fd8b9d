// delay_line: N-clock delay of a W-bit word through a chain of registers.
// Used as the 2-clock delay that aligns an ASUM2ND FPGA's own sums with those
// arriving from ASUMEND, and as the 6-count delay line of ASUMMID.  The
// registers are not reset; the output is valid N clocks after the input.
module delay_line #(
  parameter int unsigned W = 6,
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [N];
  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
  end
  assign q = sr[N-1];
endmodule
