// bb8ant: analog sums for the two memories of one ASIC input (2BB8ANT).
// Each 16-bit antenna bus carries memory M0 in bits 7:0 and M1 in bits 15:8,
// four 2-bit antennas each (ANT0 in the lowest pair).  One add8ant sums M0 of
// the MAIN and AUX buses, another M1, so m0_sum and m1_sum are 8-antenna
// halved sums, 1 clock after the inputs.  HAS_AUX = 0 gives the MAIN-only
// variant (2BB8ANTSP, a 4-antenna sum).  Mask bit i belongs to bus bits
// [2i+1:2i] (this design's mask layout; the documentation gives one mask bit
// per 2-bit number without fixing the order).
module bb8ant #(
  parameter bit HAS_AUX = 1'b1
) (
  input  logic              clk,
  input  logic [15:0]       main_bus,
  input  logic [15:0]       aux_bus,
  input  logic [7:0]        main_mask,
  input  logic [7:0]        aux_mask,
  output logic signed [4:0] m0_sum,
  output logic signed [4:0] m1_sum
);
  add8ant #(.HAS_AUX(HAS_AUX)) u_m0 (
    .clk, .main_ants(main_bus[7:0]), .aux_ants(aux_bus[7:0]),
    .main_mask(main_mask[3:0]), .aux_mask(aux_mask[3:0]), .sum(m0_sum));
  add8ant #(.HAS_AUX(HAS_AUX)) u_m1 (
    .clk, .main_ants(main_bus[15:8]), .aux_ants(aux_bus[15:8]),
    .main_mask(main_mask[7:4]), .aux_mask(aux_mask[7:4]), .sum(m1_sum));
endmodule
