// add_offset: adds the signed 8-bit offset that cancels masked antennas
// (ADDOFFSET).  A masked antenna reads as 00 and adds +1/2 to the halved
// sum; the microprocessor writes -(masked antennas / 2), truncated, as a two's
// complement byte (5 masked antennas -> -2).  Output registered, 1 clock.
// The 64-antenna sum spans -96..+96 and the offset -32..0, so 8 bits hold
// the result without overflow.
module add_offset (
  input  logic              clk,
  input  logic signed [7:0] sum,
  input  logic signed [7:0] offset,
  output logic signed [7:0] q
);
  always_ff @(posedge clk) q <= sum + offset;
endmodule
