// add4ant: halved analog sum of the four antennas of one memory on one bus
// (ADD4ANT).  Two two_bit_adder cells each add a pair of masked 2-bit samples;
// their 3-bit results are added into a 4-bit signed sum (-6..+6).
// Combinational; the pipeline register follows in add8ant (a choice of this
// design, the documentation does not place the registers).
// Sample i occupies ants[2i+1:2i] and is included when mask[i] is 1.
module add4ant (
  input  logic [7:0] ants,
  input  logic [3:0] mask,
  output logic signed [3:0] sum
);
  logic [2:0] s01, s23;
  two_bit_adder u_a01 (.ant_a(ants[1:0]), .ant_b(ants[3:2]), .mask(mask[1:0]), .sum(s01));
  two_bit_adder u_a23 (.ant_a(ants[5:4]), .ant_b(ants[7:6]), .mask(mask[3:2]), .sum(s23));
  assign sum = 4'(signed'(s01)) + 4'(signed'(s23));
endmodule
