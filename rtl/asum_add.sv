// asum_add: signed adder of two partial analog sums (ADD16ANT, ADD32ANT,
// ADD56ANT, FINALADD).  The output is WO bits wide, normally one bit wider
// than the inputs since the number of antennas doubles.  REG = 1 registers
// the result (1 clock); REG = 0 leaves it combinational, which the middle
// FPGA uses for ADD56ANT so that its result and the 6-clock-delayed local
// 8-antenna sum meet in the registered FINALADD.  Register placement is this
// design's choice.
module asum_add #(
  parameter int unsigned WA  = 5,
  parameter int unsigned WB  = 5,
  parameter int unsigned WO  = 6,
  parameter bit          REG = 1'b1
) (
  input  logic                 clk,
  input  logic signed [WA-1:0] a,
  input  logic signed [WB-1:0] b,
  output logic signed [WO-1:0] sum
);
  logic signed [WO-1:0] s;
  assign s = WO'(a) + WO'(b);
  if (REG) begin : g_reg
    always_ff @(posedge clk) sum <= s;
  end else begin : g_comb
    assign sum = s;
  end
endmodule
