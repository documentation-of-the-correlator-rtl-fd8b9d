// asummid: the middle Analog Sum FPGA (ASUMMID).  It buffers one MAIN/AUX
// bus pair (buses 0/1) and forms its 8-antenna sums, delays them 6 clocks to
// meet the 28-antenna sums arriving from both ASUM2ND neighbours (input
// registered), adds the two 28-sums (ADD56ANT, combinational) and the local
// 8-sum (FINALADD, registered) into 64-antenna sums, adds the per-memory
// offsets that cancel masked antennas (ADDOFFSET), and sends each memory's
// byte through a quarter-clock delay (QUADCAP) to the LVDS output.
// OUTCTRL[1:0]/[5:4] give 0, 1/4, 1/2, 3/4 clock and OUTCTRL[3:2]/[7:6]
// give 3, 2, 1, 0 clocks of delay for M0/M1.  CONTROL[7] sends the random
// word (low byte on M0, high byte on M1) instead of the sums.
// Timing: with all buses entering at T the sums are out of ADDOFFSET at
// T+10, plus the QUADCAP delay.  Follows the documentation; the register
// placement and the random-byte split are this design's choices.
module asummid (
  input  logic              clk,
  input  logic              clk90,
  input  logic              rst,
  input  logic              ms16,
  input  logic              up_cs,
  input  logic              up_we,
  input  logic              up_re,
  input  logic [4:0]        up_sel,
  input  logic [7:0]        up_wdata,
  output logic [7:0]        up_rdata,
  input  logic [15:0]       bus_in  [2],
  output logic [15:0]       bus_out [2],
  input  logic signed [6:0] l_m0,
  input  logic signed [6:0] l_m1,
  input  logic signed [6:0] r_m0,
  input  logic signed [6:0] r_m1,
  output logic [7:0]        m0_out,
  output logic [7:0]        m1_out,
  output logic signed [7:0] m0_sum64,
  output logic signed [7:0] m1_sum64
);
  logic [7:0]  masks [2];
  logic [7:0]  control, offset0, offset1, outctrl;
  logic [15:0] rnd;
  asum_core #(.NBUS(2)) u_core (.clk, .rst, .ms16, .up_cs, .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata, .bus_in, .bus_out, .masks, .control,
    .offset0, .offset1, .outctrl, .rnd);

  logic signed [4:0] e_m0, e_m1, e_m0d, e_m1d;
  logic signed [6:0] il_m0, il_m1, ir_m0, ir_m1;
  logic signed [7:0] f_m0, f_m1, g_m0, g_m1;
  bb8ant u_bb (.clk, .main_bus(bus_out[0]), .aux_bus(bus_out[1]),
               .main_mask(masks[0]), .aux_mask(masks[1]), .m0_sum(e_m0), .m1_sum(e_m1));
  delay_line #(.W(5), .N(6)) u_dl0 (.clk, .d(e_m0), .q(e_m0d));
  delay_line #(.W(5), .N(6)) u_dl1 (.clk, .d(e_m1), .q(e_m1d));
  always_ff @(posedge clk) begin
    il_m0 <= l_m0;
    il_m1 <= l_m1;
    ir_m0 <= r_m0;
    ir_m1 <= r_m1;
  end
  asum_add #(.WA(7), .WB(7), .WO(8), .REG(1'b0)) u_a56_0 (.clk, .a(il_m0), .b(ir_m0), .sum(f_m0));
  asum_add #(.WA(7), .WB(7), .WO(8), .REG(1'b0)) u_a56_1 (.clk, .a(il_m1), .b(ir_m1), .sum(f_m1));
  asum_add #(.WA(8), .WB(5), .WO(8)) u_fin0 (.clk, .a(f_m0), .b(e_m0d), .sum(g_m0));
  asum_add #(.WA(8), .WB(5), .WO(8)) u_fin1 (.clk, .a(f_m1), .b(e_m1d), .sum(g_m1));
  add_offset u_off0 (.clk, .sum(g_m0), .offset(offset0), .q(m0_sum64));
  add_offset u_off1 (.clk, .sum(g_m1), .offset(offset1), .q(m1_sum64));

  logic [7:0] o0, o1;
  assign o0 = control[7] ? rnd[7:0]  : m0_sum64;
  assign o1 = control[7] ? rnd[15:8] : m1_sum64;
  quad_delay #(.W(8), .MAXI(4)) u_q0 (.clk, .clk90, .int_dly({1'b0, ~outctrl[3:2]}),
                                      .frac_dly(outctrl[1:0]), .din(o0), .dout(m0_out));
  quad_delay #(.W(8), .MAXI(4)) u_q1 (.clk, .clk90, .int_dly({1'b0, ~outctrl[7:6]}),
                                      .frac_dly(outctrl[5:4]), .din(o1), .dout(m1_out));
endmodule
