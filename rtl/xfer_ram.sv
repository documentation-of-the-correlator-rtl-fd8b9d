// xfer_ram: the Timeslot 0 & 1 transfer/skip RAM of a Dataout FPGA.  For each
// millisecond (msec) and intersection (intn = INT[6:0]; 32..63 are the
// Timeslot 0 intersections, 64..127 those of Timeslot 1) one bit says whether
// the intersection is read out (1) or skipped (0).  Two banks of 2048 bits;
// the bank used follows BANK0, which is double-buffered: a new value written
// with bank_wr takes effect at the next cwstb (ASICCWSTB), in step with the
// ASIC control words.  The read is registered every clock.  Defaults: bank 0
// transfers all Timeslot 1 intersections, bank 1 all Timeslot 0 ones, in
// every millisecond.  A byte write port (bit 0 of a byte = lowest address)
// rewrites the RAM.  From the documentation: addressing, banks, double
// buffering and defaults.  This design's choice: the write port.
module xfer_ram (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] msec,
  input  logic [6:0] intn,
  input  logic       bank_wr,
  input  logic       bank_in,
  input  logic       cwstb,
  input  logic       we,
  input  logic [8:0] waddr,
  input  logic [7:0] wdata,
  output logic       transfer,
  output logic       bank
);
  logic [7:0] mem [512];
  initial
    for (int i = 0; i < 512; i++)
      // byte i holds addresses 8i..8i+7: i = {bank, msec, intn[6:3]}, so
      // i[8] is the bank and i[3] is INT6 (Timeslot 1)
      mem[i] = (i[8] == 1'b0) ? (i[3] ? 8'hFF : 8'h00) : (i[3] ? 8'h00 : 8'hFF);
  logic pend;
  always_ff @(posedge clk) begin
    if (rst) begin
      pend <= 1'b0;
      bank <= 1'b0;
    end else begin
      if (bank_wr) pend <= bank_in;
      if (cwstb)   bank <= bank_wr ? bank_in : pend;
    end
  end
  logic [11:0] ra;
  assign ra = {bank, msec, intn};
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    transfer <= mem[ra[11:3]][ra[2:0]];
  end
endmodule
