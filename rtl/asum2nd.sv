// asum2nd: the second and fourth Analog Sum FPGA (ASUM2ND).  It buffers
// three buses (bus 0/1 = MAIN/AUX of one ASIC, bus 2 = a MAIN-only bus),
// forms 8- and 4-antenna sums (bb8ant and its MAIN-only variant), adds them
// into 12-antenna sums (ADD16ANT), delays those 2 clocks (2X6DELAY) so they
// meet the 16-antenna sums arriving from the neighbouring ASUMEND through
// its output register and this FPGA's input register, and adds both
// (ADD32ANT) into 28-antenna sums, which leave through an output register.
// Timing: with all buses entering at clock T, the end FPGA's sums arrive at
// T+4, are registered at T+5 as are the delayed local sums, and the 28-sums
// leave at T+7.  Structure and the 2-clock delay follow the documentation;
// the register placement that makes it 2 is this design's choice.
module asum2nd (
  input  logic              clk,
  input  logic              rst,
  input  logic              ms16,
  input  logic              up_cs,
  input  logic              up_we,
  input  logic              up_re,
  input  logic [4:0]        up_sel,
  input  logic [7:0]        up_wdata,
  output logic [7:0]        up_rdata,
  input  logic [15:0]       bus_in  [3],
  output logic [15:0]       bus_out [3],
  input  logic signed [5:0] m0_in16,
  input  logic signed [5:0] m1_in16,
  output logic signed [6:0] m0_sum28,
  output logic signed [6:0] m1_sum28
);
  logic [7:0]  masks [3];
  logic [7:0]  control, offset0, offset1, outctrl;
  logic [15:0] rnd;
  asum_core #(.NBUS(3)) u_core (.clk, .rst, .ms16, .up_cs, .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata, .bus_in, .bus_out, .masks, .control,
    .offset0, .offset1, .outctrl, .rnd);

  logic signed [4:0] c_m0, c_m1, d_m0, d_m1;
  logic signed [5:0] s_m0, s_m1, dl_m0, dl_m1, in_m0, in_m1;
  logic signed [6:0] t_m0, t_m1;
  bb8ant u_bbc (.clk, .main_bus(bus_out[0]), .aux_bus(bus_out[1]),
                .main_mask(masks[0]), .aux_mask(masks[1]), .m0_sum(c_m0), .m1_sum(c_m1));
  bb8ant #(.HAS_AUX(1'b0)) u_bbd (.clk, .main_bus(bus_out[2]), .aux_bus(16'h0000),
                .main_mask(masks[2]), .aux_mask(8'h00), .m0_sum(d_m0), .m1_sum(d_m1));
  asum_add #(.WA(5), .WB(5), .WO(6)) u_add0 (.clk, .a(c_m0), .b(d_m0), .sum(s_m0));
  asum_add #(.WA(5), .WB(5), .WO(6)) u_add1 (.clk, .a(c_m1), .b(d_m1), .sum(s_m1));
  delay_line #(.W(6), .N(2)) u_dl0 (.clk, .d(s_m0), .q(dl_m0));
  delay_line #(.W(6), .N(2)) u_dl1 (.clk, .d(s_m1), .q(dl_m1));
  always_ff @(posedge clk) begin
    in_m0 <= m0_in16;
    in_m1 <= m1_in16;
  end
  asum_add #(.WA(6), .WB(6), .WO(7)) u_add2 (.clk, .a(dl_m0), .b(in_m0), .sum(t_m0));
  asum_add #(.WA(6), .WB(6), .WO(7)) u_add3 (.clk, .a(dl_m1), .b(in_m1), .sum(t_m1));
  always_ff @(posedge clk) begin
    m0_sum28 <= t_m0;
    m1_sum28 <= t_m1;
  end
endmodule
