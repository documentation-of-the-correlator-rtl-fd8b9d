// cw_shifter: ASIC control-word storage and serial loading of a Dataout FPGA.
// The control-word RAM holds 16 banks of NBITS bits (the words for the eight
// ASICs of the daisy chain), written and read a byte at a time at
// {wbank, addr}.  A start pulse (SHIFTCW) clears the bit counter CWCNT; while
// CWCNT is below NBITS (done low), bit CWCNT of bank sbank is put on cw_data
// on an instruction-cycle clock (ce) with cw_clk low, cw_clk rises on the
// following clock, and the counter advances: one bit per 62.5 MHz cycle,
// byte 0 bit 0 first.  The chain's output (ret_clk/ret_data from the last
// ASIC, or cw_clk/cw_data themselves when jumper is set) is sampled at each
// rising clock edge using the data seen just before it, and written into a
// 2-bank read-back RAM (bank rbank) at INCNT, also cleared by start.  The
// read-back therefore holds the words the ASICs held before the shift.
// From the documentation: banks, CWCNT/INCNT, done flag, 62.5 MHz CWCLK,
// read-back RAM, jumper bit.  This design's choices: bit order, clock phase
// of CWDATA, the bank size derived as 1024 bits.
module cw_shifter #(
  parameter int unsigned NBITS = 1024,
  localparam int unsigned BW = $clog2(NBITS),
  localparam int unsigned BYW = BW - 3
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ce,
  input  logic           start,
  input  logic [3:0]     wbank,
  input  logic [3:0]     sbank,
  input  logic           rbank,
  input  logic           we,
  input  logic [BYW-1:0] addr,
  input  logic [7:0]     wdata,
  output logic [7:0]     cw_rdata,
  output logic [7:0]     rb_rdata,
  output logic           cw_clk,
  output logic           cw_data,
  input  logic           ret_clk,
  input  logic           ret_data,
  input  logic           jumper,
  output logic           done
);
  logic [7:0] cw_mem [16 * NBITS / 8];
  logic [7:0] rb_mem [2 * NBITS / 8];
  logic [BW:0] cwcnt, incnt;
  logic        half;

  always_ff @(posedge clk)
    if (we) cw_mem[{wbank, addr}] <= wdata;
  assign cw_rdata = cw_mem[{wbank, addr}];
  assign rb_rdata = rb_mem[{rbank, addr}];
  assign done = cwcnt[BW];

  // serial output
  always_ff @(posedge clk) begin
    if (rst) begin
      cwcnt   <= (BW+1)'(NBITS);
      cw_clk  <= 1'b0;
      cw_data <= 1'b0;
      half    <= 1'b0;
    end else if (start) begin
      cwcnt  <= '0;
      cw_clk <= 1'b0;
      half   <= 1'b0;
    end else if (!done) begin
      if (ce && !half) begin
        cw_data <= cw_mem[{sbank, cwcnt[BW-1:3]}][cwcnt[2:0]];
        cw_clk  <= 1'b0;
        half    <= 1'b1;
      end else if (half) begin
        cw_clk <= 1'b1;
        half   <= 1'b0;
        cwcnt  <= cwcnt + 1'b1;
      end
    end else begin
      cw_clk <= 1'b0;
    end
  end

  // read-back capture
  logic rc, rd, rc_q, rd_q;
  assign rc = jumper ? cw_clk  : ret_clk;
  assign rd = jumper ? cw_data : ret_data;
  always_ff @(posedge clk) begin
    if (rst) begin
      rc_q  <= 1'b0;
      rd_q  <= 1'b0;
      incnt <= (BW+1)'(NBITS);
    end else begin
      rc_q <= rc;
      rd_q <= rd;
      if (start) incnt <= '0;
      else if (rc && !rc_q && !incnt[BW]) begin
        rb_mem[{rbank, incnt[BW-1:3]}][incnt[2:0]] <= rd_q;
        incnt <= incnt + 1'b1;
      end
    end
  end
endmodule
