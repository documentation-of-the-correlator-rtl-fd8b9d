// correlator_card: the programmable logic of one correlator card.
//
// Sixty-four ALMA1 correlator ASICs sit in an 8 x 8 array.  Antenna data
// (16-bit buses, 4 two-bit antennas per memory M0/M1) enter along the bottom
// through five Analog Sum FPGAs, which buffer them on to the ASICs (with test
// data substitution) and add all 64 antennas per memory every clock: the two
// end FPGAs (asumend, buses 0-3 and 12-15) send 16-antenna sums inward, the
// second/fourth (asum2nd, buses 4-6 and 9-11) add their own 12 antennas into
// 28-antenna sums, and the middle one (asummid, buses 7-8) produces the
// 64-antenna sums asum_m0/asum_m1.
// Eight Dataout FPGAs (dataout_xilinx, index k = XID[2:0]) each read their
// eight ASICs under microcode control; their byte streams merge along the
// chain 7->3, 6->2, 5->1, 4->0 and 3->2->1->0, and Dataout 0 drives lta_data.
// Dataout 3's chain output is also brought out as pins3, and Dataout 0's
// millisecond test bus (MSEC when its XID7 is set) as test_msec.  Each merge hop is
// one register, so the 16 ms pulse reaching Dataout k is delayed by
// 4 - hops(k) clocks to make all streams line up at Dataout 0.
// The ASICs, LVDS drivers, clock DLLs and microprocessor CPLD are outside
// this module; their signals are ports.  Microprocessor: up_cs[k] selects
// Dataout k for k = 0..7 and Analog Sum FPGA k-8 for k = 8..12; up_rdata is
// the OR of the FPGAs' read data, valid the clock after a read strobe.
// Structure and chain order follow the card documentation; the stagger
// values are this design's choice.
module correlator_card #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned MS_TICKS = 62500
) (
  input  logic              clk,
  input  logic              clk90,
  input  logic              rst,
  input  logic              ms16_in,
  input  logic [12:0]       up_cs,
  input  logic              up_we,
  input  logic              up_re,
  input  logic [4:0]        up_sel,
  input  logic [7:0]        up_wdata,
  output logic [7:0]        up_rdata,
  // analog sum side
  input  logic [15:0]       asum_in  [16],
  output logic [15:0]       asum_out [16],
  output logic [7:0]        asum_m0,
  output logic [7:0]        asum_m1,
  // ASIC side, per Dataout FPGA
  input  logic [15:0]       asic_bot [8],
  input  logic [15:0]       asic_top [8],
  output logic [7:0]        asic_rdclken [8],
  output logic [3:0]        asic_cnum [8],
  output logic [3:0]        asic_blk [8],
  output logic [7:0]        cw_clk,
  output logic [7:0]        cw_data,
  output logic [7:0]        cw_stb,
  input  logic [7:0]        cw_ret_clk,
  input  logic [7:0]        cw_ret_data,
  output logic [7:0]        blanking,
  output logic [7:0]        dumpenbl,
  // outputs to the LTA
  output logic [7:0]        lta_data,
  output logic [7:0]        pins3,
  output logic [3:0]        test_msec
);
  // ---------------- Analog Sum FPGAs ----------------
  logic [7:0]        ar [5];
  logic signed [5:0] e0_m0, e0_m1, e4_m0, e4_m1;
  logic signed [6:0] s1_m0, s1_m1, s3_m0, s3_m1;
  logic signed [7:0] m0_64, m1_64;

  asumend u_asum0 (.clk, .rst, .ms16(ms16_in), .up_cs(up_cs[8]), .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata(ar[0]), .bus_in(asum_in[0:3]), .bus_out(asum_out[0:3]),
    .m0_sum16(e0_m0), .m1_sum16(e0_m1));
  asum2nd u_asum1 (.clk, .rst, .ms16(ms16_in), .up_cs(up_cs[9]), .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata(ar[1]), .bus_in(asum_in[4:6]), .bus_out(asum_out[4:6]),
    .m0_in16(e0_m0), .m1_in16(e0_m1), .m0_sum28(s1_m0), .m1_sum28(s1_m1));
  asummid u_asum2 (.clk, .clk90, .rst, .ms16(ms16_in), .up_cs(up_cs[10]), .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata(ar[2]), .bus_in(asum_in[7:8]), .bus_out(asum_out[7:8]),
    .l_m0(s1_m0), .l_m1(s1_m1), .r_m0(s3_m0), .r_m1(s3_m1),
    .m0_out(asum_m0), .m1_out(asum_m1), .m0_sum64(m0_64), .m1_sum64(m1_64));
  asum2nd u_asum3 (.clk, .rst, .ms16(ms16_in), .up_cs(up_cs[11]), .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata(ar[3]), .bus_in(asum_in[9:11]), .bus_out(asum_out[9:11]),
    .m0_in16(e4_m0), .m1_in16(e4_m1), .m0_sum28(s3_m0), .m1_sum28(s3_m1));
  asumend u_asum4 (.clk, .rst, .ms16(ms16_in), .up_cs(up_cs[12]), .up_we, .up_re,
    .up_sel, .up_wdata, .up_rdata(ar[4]), .bus_in(asum_in[12:15]), .bus_out(asum_out[12:15]),
    .m0_sum16(e4_m0), .m1_sum16(e4_m1));

  // ---------------- Dataout FPGAs ----------------
  // chain_in of each FPGA: 0 <- 1 and 4, 1 <- 2 and 5, 2 <- 3 and 6, 3 <- 7.
  // An FPGA with two feeders takes the OR of both (two registered inputs).
  localparam int unsigned HOPS [8] = '{0, 1, 2, 3, 1, 2, 3, 4};
  logic [7:0] chain_out [8];
  logic [7:0] chain_in  [8];
  logic [7:0] dr [8];
  logic [7:0] lta [8];
  logic [3:0] msec [8];
  logic [3:0] tmsec [8];
  logic [7:0] msstb_k, xfer_k;

  always_comb begin
    chain_in[0] = chain_out[1] | chain_out[4];
    chain_in[1] = chain_out[2] | chain_out[5];
    chain_in[2] = chain_out[3] | chain_out[6];
    chain_in[3] = chain_out[7];
    for (int k = 4; k < 8; k++) chain_in[k] = 8'h00;
  end

  for (genvar k = 0; k < 8; k++) begin : g_do
    dataout_xilinx #(.CNT_W(CNT_W), .MS_TICKS(MS_TICKS), .MS_DLY(4 - HOPS[k])) u_do (
      .clk, .clk90, .rst, .ms16_in, .up_cs(up_cs[k]), .up_we, .up_re, .up_sel,
      .up_wdata, .up_rdata(dr[k]), .asic_bot(asic_bot[k]), .asic_top(asic_top[k]),
      .rdclken(asic_rdclken[k]), .asic_cnum(asic_cnum[k]), .asic_blk(asic_blk[k]),
      .cw_clk(cw_clk[k]), .cw_data(cw_data[k]), .cw_stb(cw_stb[k]),
      .cw_ret_clk(cw_ret_clk[k]), .cw_ret_data(cw_ret_data[k]),
      .blanking(blanking[k]), .dumpenbl(dumpenbl[k]),
      .chain_in(chain_in[k]), .chain_out(chain_out[k]), .lta_out(lta[k]),
      .msec(msec[k]), .test_msec(tmsec[k]), .msstb(msstb_k[k]), .xfer_active(xfer_k[k]));
  end

  assign lta_data = lta[0];
  assign pins3    = chain_out[3];
  assign test_msec = tmsec[0];

  always_comb begin
    up_rdata = 8'h00;
    for (int k = 0; k < 8; k++) up_rdata |= dr[k];
    for (int k = 0; k < 5; k++) up_rdata |= ar[k];
  end
endmodule
