// asum_core: the part shared by the three Analog Sum FPGA personalities.
// It holds the microprocessor registers (CONTROL at write select 1, offsets
// at 2 and 3, PNCHECK bus select and restart at 4, logic-analyzer clear at 5,
// antenna masks at 6..9 for buses 0..3, seed bytes at 12, OUTCTRL at 14),
// the 8-bit COUNT and the random generator (both restarted by the 16 ms
// pulse), one test multiplexer per bus (the buffered bus goes on to the
// ASICs and to the adders), a 256 x 16 logic analyzer per bus, and the input
// stream checker.  Reads: select 16 + 2k gives the low byte and 17 + 2k the
// high byte of logic-analyzer word UP_ADR of bus k (the high-byte read
// advances UP_ADR); 24/25 give the checker's error count.  Read data appear
// on up_rdata the clock after the read strobe, zero otherwise.
// Select numbers 2, 3, 5, 12 and 14 follow the documentation; the others,
// and the read protocol, are this design's choices.
module asum_core #(
  parameter int unsigned NBUS = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ms16,
  input  logic        up_cs,
  input  logic        up_we,
  input  logic        up_re,
  input  logic [4:0]  up_sel,
  input  logic [7:0]  up_wdata,
  output logic [7:0]  up_rdata,
  input  logic [15:0] bus_in  [NBUS],
  output logic [15:0] bus_out [NBUS],
  output logic [7:0]  masks   [NBUS],
  output logic [7:0]  control,
  output logic [7:0]  offset0,
  output logic [7:0]  offset1,
  output logic [7:0]  outctrl,
  output logic [15:0] rnd
);
  logic [31:0] wr_en, rd_en;
  logic [10:0] up_adr;
  up_decode #(.AW(11), .INC_MASK(32'h00AA_0000)) u_up (
    .clk, .rst, .cs(up_cs), .we(up_we), .re(up_re), .sel(up_sel),
    .wr_en, .rd_en, .up_adr);

  logic [1:0] pn_sel;
  always_ff @(posedge clk) begin
    if (rst) begin
      control <= 8'h04;        // normal input data
      offset0 <= '0;
      offset1 <= '0;
      outctrl <= 8'hCC;        // no delay on either byte
      pn_sel  <= '0;
      for (int k = 0; k < NBUS; k++) masks[k] <= 8'hFF;
    end else begin
      if (wr_en[1])  control <= up_wdata;
      if (wr_en[2])  offset0 <= up_wdata;
      if (wr_en[3])  offset1 <= up_wdata;
      if (wr_en[4])  pn_sel  <= up_wdata[1:0];
      if (wr_en[14]) outctrl <= up_wdata;
      for (int k = 0; k < NBUS; k++)
        if (wr_en[6 + k]) masks[k] <= up_wdata;
    end
  end

  logic [7:0] count;
  always_ff @(posedge clk)
    if (rst || ms16) count <= '0;
    else             count <= count + 8'd1;

  logic [31:0] seed;
  datagen u_gen (.clk, .rst, .seed_we(wr_en[12]), .seed_byte(up_wdata),
                 .init(ms16), .rnd, .seed);

  logic [15:0] la_q [NBUS];
  logic        la_full [NBUS];
  for (genvar k = 0; k < NBUS; k++) begin : g_bus
    testmux u_tm (.clk, .control(control[2:0]), .din(bus_in[k]), .count,
                  .rnd, .dout(bus_out[k]));
    la_ram #(.W(16), .AW(8)) u_la (.clk, .rst, .clear(wr_en[5]), .en(1'b1),
                  .din(bus_out[k]), .raddr(up_adr[7:0]), .rdata(la_q[k]),
                  .full(la_full[k]));
  end

  logic [15:0] pn_err;
  logic        pn_locked;
  pncheck #(.NBUS(NBUS)) u_pn (.clk, .rst, .buses(bus_out),
                  .sel(pn_sel[$clog2(NBUS)-1:0]), .restart(wr_en[4]),
                  .errors(pn_err), .locked(pn_locked));

  logic [7:0] rsel;
  always_comb begin
    rsel = 8'h00;
    for (int k = 0; k < NBUS; k++) begin
      if (rd_en[16 + 2*k]) rsel = la_q[k][7:0];
      if (rd_en[17 + 2*k]) rsel = la_q[k][15:8];
    end
    if (rd_en[24]) rsel = pn_err[7:0];
    if (rd_en[25]) rsel = pn_err[15:8];
  end
  always_ff @(posedge clk) up_rdata <= rsel;
endmodule
