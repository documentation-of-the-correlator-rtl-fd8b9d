// two_bit_adder: adds two 2-bit antenna samples under the card's biased
// weighting (01=+3, 00=+1, 11=-1, 10=-3, i.e. weight = 2*lsb + 1 - 4*msb).
// The sum of two weights is always even, so its lsb is dropped and the halved
// sum x + z + 1 - 2(w + y), in -3..+3, is output as the 3-bit two's complement
// number {a,b,c}.  A mask bit of 0 forces its sample to 00, which still adds
// +1/2 to the halved sum; that bias is removed later by the offset adder.
// Purely combinational.
// The weighting, the halving and the mask behaviour follow the card
// documentation, whose Karnaugh map gives c = xz + x'z' (the XNOR used below);
// a and b are produced by the arithmetic form instead of the printed
// sum-of-products terms.
module two_bit_adder (
  input  logic [1:0] ant_a,   // {w,x}
  input  logic [1:0] ant_b,   // {y,z}
  input  logic [1:0] mask,    // mask[0] for ant_a, mask[1] for ant_b, 1 = include
  output logic [2:0] sum      // {a,b,c}, two's complement
);
  logic w, x, y, z;
  always_comb begin
    {w, x} = mask[0] ? ant_a : 2'b00;
    {y, z} = mask[1] ? ant_b : 2'b00;
    sum[0] = ~(x ^ z);
    sum[2:1] = 2'(({1'b0, x} + {1'b0, z} + 2'd1) >> 1) - 2'({1'b0, w} + {1'b0, y});
  end
endmodule
