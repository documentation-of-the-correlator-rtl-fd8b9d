// do_timing: millisecond timing of a Dataout FPGA.  COUNT advances once per
// instruction cycle (ce, 62.5 MHz) and wraps after MS_TICKS counts (1 ms);
// each wrap gives a one-cycle msstb and advances the millisecond number msec.
// A 16 ms sync pulse (held until the next ce) restarts COUNT and sets msec to
// 15, so the first msstb, one millisecond later, starts millisecond 0; a sync
// that coincides with a wrap keeps that wrap and sets msec to 0.
// BLANKING is read from a 2-bank blanking RAM addressed by
// {bank4, COUNT[CNT_W-1:CNT_W-10]} (1.024 us steps at the default size) and
// DUMPENBL from a 2-bank dump-enable RAM addressed by
// {bank5, msec, COUNT[CNT_W-1:CNT_W-6]} (16.384 us steps).  Both outputs are
// registered.  RAM contents start at the documented defaults (blanking
// locations 4 and 5 set in both banks, dump-enable bank 0 location 0 set) and
// can be rewritten a byte at a time.
// From the documentation: COUNT at 62.5 MHz, COUNT[15:10] as dump-enable
// address lsbs, the banks and defaults.  This design's choices: the blanking
// address bits, the sync handling, the write ports.
module do_timing #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned MS_TICKS = 62500
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic             ms16,
  input  logic             bank4,
  input  logic             bank5,
  input  logic             blk_we,
  input  logic [7:0]       blk_waddr,
  input  logic [7:0]       blk_wdata,
  input  logic             dmp_we,
  input  logic [7:0]       dmp_waddr,
  input  logic [7:0]       dmp_wdata,
  output logic             msstb,
  output logic [3:0]       msec,
  output logic [CNT_W-1:0] count,
  output logic             blanking,
  output logic             dumpenbl
);
  logic [7:0] blk_mem [256];   // 2048 bits: {bank, 10-bit address}
  logic [7:0] dmp_mem [256];   // 2048 bits: {bank, msec, 6-bit address}
  initial begin
    for (int i = 0; i < 256; i++) begin
      blk_mem[i] = 8'h00;
      dmp_mem[i] = 8'h00;
    end
    blk_mem[0]   = 8'h30;      // bank 0, locations 4 and 5
    blk_mem[128] = 8'h30;      // bank 1, locations 4 and 5
    dmp_mem[0]   = 8'h01;      // bank 0, msec 0, location 0
  end
  always_ff @(posedge clk) begin
    if (blk_we) blk_mem[blk_waddr] <= blk_wdata;
    if (dmp_we) dmp_mem[dmp_waddr] <= dmp_wdata;
  end

  logic sync_pend, wrap;
  assign wrap  = ce && (count == CNT_W'(MS_TICKS - 1));
  assign msstb = wrap;
  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      msec      <= 4'd15;
      sync_pend <= 1'b0;
    end else begin
      if (ms16) sync_pend <= 1'b1;
      if (ce) begin
        if (wrap) begin
          count <= '0;
          msec  <= (ms16 || sync_pend) ? 4'd0 : msec + 4'd1;
        end else if (ms16 || sync_pend) begin
          count <= '0;
          msec  <= 4'd15;
        end else begin
          count <= count + 1'b1;
        end
        sync_pend <= 1'b0;
      end
    end
  end

  logic [10:0] ba;
  logic [10:0] da;
  assign ba = {bank4, count[CNT_W-1 -: 10]};
  assign da = {bank5, msec, count[CNT_W-1 -: 6]};
  always_ff @(posedge clk) begin
    blanking <= blk_mem[ba[10:3]][ba[2:0]];
    dumpenbl <= dmp_mem[da[10:3]][da[2:0]];
  end
endmodule
