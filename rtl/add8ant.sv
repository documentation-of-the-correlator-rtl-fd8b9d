// add8ant: halved analog sum of the four antennas of one memory on the MAIN
// bus plus the four of the same memory on the AUX bus (ADD8ANT), giving a
// 5-bit signed sum (-12..+12) registered once (1 clock latency).
// With HAS_AUX = 0 only the MAIN antennas are added (the single-bus variant
// used where an FPGA has no AUX bus); the result is then a 4-antenna sum,
// sign-extended to 5 bits.
// Following the documentation: one extra sum bit per doubling of antennas.
// This design's choice: the register at the output of this stage.
module add8ant #(
  parameter bit HAS_AUX = 1'b1
) (
  input  logic              clk,
  input  logic [7:0]        main_ants,
  input  logic [7:0]        aux_ants,
  input  logic [3:0]        main_mask,
  input  logic [3:0]        aux_mask,
  output logic signed [4:0] sum
);
  logic signed [3:0] s_main, s_aux;
  add4ant u_main (.ants(main_ants), .mask(main_mask), .sum(s_main));
  add4ant u_aux  (.ants(aux_ants),  .mask(aux_mask),  .sum(s_aux));
  always_ff @(posedge clk)
    sum <= HAS_AUX ? 5'(s_main) + 5'(s_aux) : 5'(s_main);
endmodule
