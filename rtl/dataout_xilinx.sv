// dataout_xilinx: one of the eight Dataout FPGAs.  It serves eight ALMA1
// ASICs (chips 0-3 on the bottom tri-state bus, 4-7 on the top bus) and
// passes their results, merged with the stream of the FPGAs before it in the
// chain, on toward Dataout 0 and the LTA.
//
// Operation.  A 16 ms pulse, delayed by MS_DLY clocks to stagger the eight
// FPGAs by their distance from Dataout 0, restarts the millisecond timing
// (do_timing) and aligns the 62.5 MHz instruction-cycle enable ce.  Each
// millisecond msstb starts the microcode sequencer (do_sequencer), which
// walks the 96 intersections (32 of Timeslot 0, 64 of Timeslot 1) and, for
// each one marked in the transfer RAM (xfer_ram), issues 256 RDCLKENBLs in
// 16 blocks of 16.  int_addr_mux turns the intersection count and msec into
// an FPGA number, chip and intersection-in-chip; when the FPGA number is
// this one's XID[2:0], RDCLKEN goes to the addressed chip.
// The ASIC's word is expected in the input register ASIC_LAT clocks after
// the RDCLKENBL cycle began (rdclken leaves after 2 registers, so an ASIC
// must drive the word on its bus during clocks ASIC_LAT-3 and ASIC_LAT-2
// after rdclken rose).  The word (or TESTADR = {intersection, result count}
// with XID7, delayed identically) is cut into two bytes (out16to8, XID3
// keeps only the low byte), replaced by random bytes with XID6, forced to
// zero outside this FPGA's read slots, ORed with chain_in and registered as
// chain_out.  lta_out is chain_out after the quadrature delay
// XID[11:10] clocks + (2 + XID[9:8]) quarter clocks (180..450 degrees).
// With XID7 the millisecond number is also put on test_msec (a separate
// low-speed test bus of the FPGA that drives the card output), zero
// otherwise.
//
// Control words: 16 banks of 1024 bits are written at select 7, shifted to
// the ASIC chain by a write to select 17 (cw_shifter; the returned chain is
// kept in a read-back RAM read at select 8, done flag at select 10) and
// strobed into the ASICs by cwstb_gen (write select 11, data = LOADCNT)
// during a BLANKING & DUMPENBL period.  The same strobe switches the
// transfer-RAM bank to BANK0.
//
// Microprocessor selects (writes): 1 program RAM byte, 2 UPADDRESS, 3 XID
// (two bytes, low first), 4 transfer RAM byte, 5 blanking RAM byte, 6 dump
// RAM byte, 7 control-word byte, 9 CWBANK, 11 LOADCNT + strobe request,
// 12 seed byte, 13 BANK, 17 shift start (also clears the program logic
// analyzer); reads: 7, 8, 10, and 15 (program logic analyzer, 8 bits
// {PC[3:0], PROGWRD[9:8], LDPAC, TRANSFER}).  RAM accesses use UP_ADR, which
// a write to select 0 clears.  Selects 2, 3, 7-13 and 17 follow the
// documentation; 1, 4, 5, 6 and 15, the stream merge by OR and the TESTADR
// result counter are this design's choices.
module dataout_xilinx #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned MS_TICKS = 62500,
  parameter int unsigned MS_DLY   = 0,
  parameter int unsigned ASIC_LAT = 7
) (
  input  logic        clk,
  input  logic        clk90,
  input  logic        rst,
  input  logic        ms16_in,
  input  logic        up_cs,
  input  logic        up_we,
  input  logic        up_re,
  input  logic [4:0]  up_sel,
  input  logic [7:0]  up_wdata,
  output logic [7:0]  up_rdata,
  input  logic [15:0] asic_bot,
  input  logic [15:0] asic_top,
  output logic [7:0]  rdclken,
  output logic [3:0]  asic_cnum,
  output logic [3:0]  asic_blk,
  output logic        cw_clk,
  output logic        cw_data,
  output logic        cw_stb,
  input  logic        cw_ret_clk,
  input  logic        cw_ret_data,
  output logic        blanking,
  output logic        dumpenbl,
  input  logic [7:0]  chain_in,
  output logic [7:0]  chain_out,
  output logic [7:0]  lta_out,
  output logic [3:0]  msec,
  output logic [3:0]  test_msec,
  output logic        msstb,
  output logic        xfer_active
);
  import corr_pkg::*;

  // ---------------- microprocessor registers ----------------
  logic [31:0] wr_en, rd_en;
  logic [10:0] up_adr;
  up_decode #(.AW(11), .INC_MASK(32'h0000_81F2)) u_up (
    .clk, .rst, .cs(up_cs), .we(up_we), .re(up_re), .sel(up_sel),
    .wr_en, .rd_en, .up_adr);

  logic [15:0] xid;
  logic [7:0]  bank, cwbank, upaddress;
  always_ff @(posedge clk) begin
    if (rst) begin
      xid       <= '0;
      bank      <= '0;
      cwbank    <= '0;
      upaddress <= '0;
    end else begin
      if (wr_en[2])  upaddress <= up_wdata;
      if (wr_en[3])  xid       <= {up_wdata, xid[15:8]};
      if (wr_en[9])  cwbank    <= up_wdata;
      if (wr_en[13]) bank      <= up_wdata;
    end
  end

  // ---------------- 16 ms alignment and instruction-cycle enable ----------------
  logic ms16_s, ce;
  if (MS_DLY == 0) begin : g_nodly
    assign ms16_s = ms16_in;
  end else begin : g_dly
    logic [MS_DLY-1:0] msd;
    always_ff @(posedge clk)
      if (rst) msd <= '0;
      else     msd <= MS_DLY'({msd, ms16_in});
    assign ms16_s = msd[MS_DLY-1];
  end
  always_ff @(posedge clk)
    if (rst)         ce <= 1'b0;
    else if (ms16_s) ce <= 1'b1;
    else             ce <= ~ce;

  // ---------------- timing, sequencer, transfer RAM ----------------
  logic [CNT_W-1:0] count;
  do_timing #(.CNT_W(CNT_W), .MS_TICKS(MS_TICKS)) u_tim (
    .clk, .rst, .ce, .ms16(ms16_s), .bank4(bank[4]), .bank5(bank[5]),
    .blk_we(wr_en[5]), .blk_waddr(up_adr[7:0]), .blk_wdata(up_wdata),
    .dmp_we(wr_en[6]), .dmp_waddr(up_adr[7:0]), .dmp_wdata(up_wdata),
    .msstb, .msec, .count, .blanking, .dumpenbl);

  logic        transfer, xbank;
  logic [7:0]  pc;
  logic [15:0] progwrd;
  logic [7:0]  int_cnt, sel_cnt, res_cnt;
  logic        rdclkenbl, ldpac, progce, pausing;
  do_sequencer u_seq (
    .clk, .rst, .ce, .msstb, .upaddress, .transfer,
    .pw_we(wr_en[1]), .pw_addr(up_adr[8:0]), .pw_data(up_wdata),
    .pc, .progwrd, .int_cnt, .sel_cnt, .res_cnt, .rdclkenbl, .ldpac,
    .progce, .pausing);

  xfer_ram u_xfer (
    .clk, .rst, .msec, .intn(int_cnt[6:0]), .bank_wr(wr_en[13]),
    .bank_in(up_wdata[0]), .cwstb(cw_stb), .we(wr_en[4]),
    .waddr(up_adr[8:0]), .wdata(up_wdata), .transfer, .bank(xbank));
  assign xfer_active = transfer;

  // ---------------- intersection addressing ----------------
  logic [2:0] fpga, chip;
  logic [3:0] cnum;
  logic       ts1, mine;
  logic [7:0] rdclken_c;
  int_addr_mux u_iam (
    .int_cnt(int_cnt[6:0]), .msec, .xid(xid[2:0]), .partial(xid[4]),
    .xadd0(xid[12]), .rden(rdclkenbl), .fpga, .chip, .cnum, .ts1, .mine,
    .rdclken(rdclken_c));

  logic [7:0] rdclken_q;
  logic [3:0] cnum_q, blk_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      rdclken_q <= '0;
      rdclken   <= '0;
    end else begin
      rdclken_q <= rdclken_c;
      rdclken   <= rdclken_q;
    end
    cnum_q    <= cnum;
    asic_cnum <= cnum_q;
    blk_q     <= sel_cnt[3:0];
    asic_blk  <= blk_q;
  end

  // ---------------- TESTADR ----------------
  logic [7:0] res_adr;
  always_ff @(posedge clk)
    if (rst) res_adr <= '0;
    else if (ce) begin
      if (progwrd[I_LOOPINT] || progwrd[I_LDINTCTR]) res_adr <= '0;
      else if (rdclkenbl)                            res_adr <= res_adr + 8'd1;
    end

  // ---------------- read-out path ----------------
  typedef struct packed {
    logic        valid;
    logic        top;
    logic        phase;
    logic [15:0] testadr;
  } rd_slot_t;
  rd_slot_t pipe [ASIC_LAT];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ASIC_LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= '{valid: rdclkenbl && mine, top: chip[2], phase: ce,
                   testadr: {int_cnt, res_adr}};
      for (int i = 1; i < ASIC_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end
  rd_slot_t slot;
  assign slot = pipe[ASIC_LAT-1];

  logic [15:0] asic_word;
  always_ff @(posedge clk) asic_word <= slot.top ? asic_top : asic_bot;

  logic [15:0] rnd;
  logic [31:0] seed;
  datagen u_gen (.clk, .rst, .seed_we(wr_en[12]), .seed_byte(up_wdata),
                 .init(ms16_s), .rnd, .seed);

  logic [15:0] word;
  logic [7:0]  byte_n, byte_g;
  assign word = xid[7] ? slot.testadr : asic_word;
  out16to8 u_o168 (.phase(slot.phase), .din(word), .mode62(xid[3]), .dout(byte_n));
  assign byte_g = !slot.valid ? 8'h00 : (xid[6] ? rnd[7:0] : byte_n);
  always_ff @(posedge clk)
    if (rst) chain_out <= '0;
    else     chain_out <= byte_g | chain_in;

  logic [2:0] qsum;
  assign qsum = 3'd2 + {1'b0, xid[9:8]};
  quad_delay #(.W(8), .MAXI(4)) u_quad (
    .clk, .clk90, .int_dly({1'b0, xid[11:10]} + {2'b00, qsum[2]}),
    .frac_dly(qsum[1:0]), .din(chain_out), .dout(lta_out));

  always_ff @(posedge clk)
    if (rst) test_msec <= '0;
    else     test_msec <= xid[7] ? msec : 4'h0;

  // ---------------- control words ----------------
  logic [7:0] cw_rdata, rb_rdata;
  logic       cw_done;
  cw_shifter #(.NBITS(1024)) u_cws (
    .clk, .rst, .ce, .start(wr_en[17]), .wbank(cwbank[3:0]), .sbank(cwbank[7:4]),
    .rbank(bank[1]), .we(wr_en[7]), .addr(up_adr[6:0]), .wdata(up_wdata),
    .cw_rdata, .rb_rdata, .cw_clk, .cw_data, .ret_clk(cw_ret_clk),
    .ret_data(cw_ret_data), .jumper(xid[3]), .done(cw_done));

  cwstb_gen u_stb (.clk, .rst, .ce, .wr(wr_en[11]), .loadcnt(up_wdata[5:0]),
                   .blanking, .dumpenbl, .cwstb(cw_stb));

  // ---------------- program logic analyzer ----------------
  logic [7:0] la_q;
  logic       la_full;
  la_ram #(.W(8), .AW(8)) u_la (.clk, .rst, .clear(wr_en[17]), .en(progce),
    .din({pc[3:0], progwrd[9:8], ldpac, transfer}), .raddr(up_adr[7:0]),
    .rdata(la_q), .full(la_full));

  // ---------------- read-back ----------------
  always_ff @(posedge clk) begin
    up_rdata <= 8'h00;
    if (rd_en[7])  up_rdata <= cw_rdata;
    if (rd_en[8])  up_rdata <= rb_rdata;
    if (rd_en[10]) up_rdata <= {7'b0, cw_done};
    if (rd_en[15]) up_rdata <= la_q;
  end
endmodule
