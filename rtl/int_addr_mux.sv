// int_addr_mux: intersection addressing of a Dataout FPGA (INTADDRESSMUX).
// The sequencer's intersection counter runs A0..FF each millisecond (INT[6:0]
// is used here); INT6
// tells the timeslot.  In Timeslot 0 (s = INT[4:0], the 32 diagonal
// intersections) the map is
//   c   = {s1, s0, s1, s0}
//   full card:    chip = {s3, s2, s2 & ~s3},  fpga = {s4, s4, s3}
//   partial card: chip = {0, 0, s2},          fpga = {0, s4, s3}
// and in Timeslot 1 (t = INT[5:0], ms = msec)
//   c = {ms0, t5, t1, t0},  chip = {ms2, ms1, t2},  fpga = {ms3, t4, t3}.
// xadd0 (XID12) forces the FPGA number to 0.  mine is high when the number
// equals this FPGA's xid; rdclken then copies rden onto the one line of the
// addressed chip, so at most one ASIC is enabled at a time (the job of the
// 74LVC139 guard on the card).  Combinational.
// The maps follow the documentation's tables and intersection-map figures.
module int_addr_mux (
  input  logic [6:0] int_cnt,
  input  logic [3:0] msec,
  input  logic [2:0] xid,
  input  logic       partial,
  input  logic       xadd0,
  input  logic       rden,
  output logic [2:0] fpga,
  output logic [2:0] chip,
  output logic [3:0] cnum,
  output logic       ts1,
  output logic       mine,
  output logic [7:0] rdclken
);
  logic [4:0] s;
  logic [5:0] t;
  logic [2:0] x;
  assign s   = int_cnt[4:0];
  assign t   = int_cnt[5:0];
  assign ts1 = int_cnt[6];
  always_comb begin
    if (!ts1) begin
      cnum = {s[1], s[0], s[1], s[0]};
      if (partial) begin
        chip = {2'b00, s[2]};
        x    = {1'b0, s[4], s[3]};
      end else begin
        chip = {s[3], s[2], s[2] & ~s[3]};
        x    = {s[4], s[4], s[3]};
      end
    end else begin
      cnum = {msec[0], t[5], t[1], t[0]};
      chip = {msec[2], msec[1], t[2]};
      x    = {msec[3], t[4], t[3]};
    end
    fpga    = xadd0 ? 3'd0 : x;
    mine    = (fpga == xid);
    rdclken = (rden && mine) ? (8'd1 << chip) : 8'd0;
  end
endmodule
