// asumend: the Analog Sum FPGA at either end of the bottom row (ASUMEND).
// Four 16-bit antenna buses pass through it to two ASICs (bus 0/1 = MAIN/AUX
// of ASIC A, bus 2/3 = MAIN/AUX of ASIC B), buffered by the test
// multiplexers.  Each ASIC's MAIN+AUX pair is summed per memory (bb8ant),
// the two ASICs' sums are added (ADD16ANT) and the 16-antenna M0 and M1 sums
// leave through an output register toward the next FPGA.
// Timing: buses out 1 clock after bus_in, sums out 4 clocks after bus_in.
// Structure follows the documentation; the pipeline registers are this
// design's choice (see asum2nd for how they line up).
module asumend (
  input  logic              clk,
  input  logic              rst,
  input  logic              ms16,
  input  logic              up_cs,
  input  logic              up_we,
  input  logic              up_re,
  input  logic [4:0]        up_sel,
  input  logic [7:0]        up_wdata,
  output logic [7:0]        up_rdata,
  input  logic [15:0]       bus_in  [4],
  output logic [15:0]       bus_out [4],
  output logic signed [5:0] m0_sum16,
  output logic signed [5:0] m1_sum16
);
  logic [7:0]  masks [4];
  logic [7:0]  control, offset0, offset1, outctrl;
  logic [15:0] rnd;
  asum_core #(.NBUS(4)) u_core (.clk, .rst, .ms16, .up_cs, .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata, .bus_in, .bus_out, .masks, .control,
    .offset0, .offset1, .outctrl, .rnd);

  logic signed [4:0] a_m0, a_m1, b_m0, b_m1;
  logic signed [5:0] s_m0, s_m1;
  bb8ant u_bba (.clk, .main_bus(bus_out[0]), .aux_bus(bus_out[1]),
                .main_mask(masks[0]), .aux_mask(masks[1]), .m0_sum(a_m0), .m1_sum(a_m1));
  bb8ant u_bbb (.clk, .main_bus(bus_out[2]), .aux_bus(bus_out[3]),
                .main_mask(masks[2]), .aux_mask(masks[3]), .m0_sum(b_m0), .m1_sum(b_m1));
  asum_add #(.WA(5), .WB(5), .WO(6)) u_add0 (.clk, .a(a_m0), .b(b_m0), .sum(s_m0));
  asum_add #(.WA(5), .WB(5), .WO(6)) u_add1 (.clk, .a(a_m1), .b(b_m1), .sum(s_m1));
  always_ff @(posedge clk) begin
    m0_sum16 <= s_m0;
    m1_sum16 <= s_m1;
  end
endmodule
