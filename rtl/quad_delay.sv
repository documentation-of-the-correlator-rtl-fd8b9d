// quad_delay: output timing adjust in quarter-clock steps (QUADCAP and the
// Dataout 0 quadrature output).  din, launched from clk, is first delayed by
// int_dly whole clocks (0..MAXI) in a register chain; the result is then
// retimed on the clk90 rising edge (+1/4), the clk falling edge (+1/2) and
// the clk90 falling edge (+3/4), and frac_dly picks one of the four.
// clk90 must be clk delayed by a quarter period.  Which field encodings map
// to which delays is set by the instantiating FPGA.  The documentation gives
// only the delay steps; this retiming structure is this design's choice
// (the original relies on floorplanned placement for the fractions).
module quad_delay #(
  parameter int unsigned W    = 8,
  parameter int unsigned MAXI = 4
) (
  input  logic         clk,
  input  logic         clk90,
  input  logic [2:0]   int_dly,
  input  logic [1:0]   frac_dly,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] sr [MAXI+1];
  logic [W-1:0] q0, q25, q50, q75;
  assign sr[0] = din;
  for (genvar i = 1; i <= MAXI; i++) begin : g_sr
    always_ff @(posedge clk) sr[i] <= sr[i-1];
  end
  assign q0 = (int_dly > 3'(MAXI)) ? sr[MAXI] : sr[int_dly];
  always_ff @(posedge clk90) q25 <= q0;
  always_ff @(negedge clk)   q50 <= q25;
  always_ff @(negedge clk90) q75 <= q50;
  always_comb begin
    unique case (frac_dly)
      2'd0: dout = q0;
      2'd1: dout = q25;
      2'd2: dout = q50;
      default: dout = q75;
    endcase
  end
endmodule
