// do_sequencer: the microcoded read-out sequencer of a Dataout FPGA.
// A 256 x 16 program RAM holds up to eight 32-word programs.  Each 16-bit
// word is an instruction field PROGWRD[15:6] (one bit per operation, all
// zero = NOOP) and an address/value field A = PROGWRD[5:0].  The machine
// advances only on clocks with ce high (62.5 MHz, one instruction cycle =
// two 125 MHz clocks).  The RAM output is registered (progwrd), so the word
// executed in a cycle is the one fetched in the previous cycle: the
// instruction after any branch is always executed (a delay slot), and a
// HOLD needs a second HOLD behind it.
//   HOLD      freeze the PC until msstb
//   JUMPUP    PC <= upaddress
//   JUMPSEQ   PC <= {upaddress[7:6], A}
//   LDINTCTR  intersection counter <= {2'b10, A}
//   LOOPINT   jump to A unless the intersection counter is all ones; count
//   PAUSE     result counter <= {2'b11, A}; freeze the PC until the result
//             counter, advancing each cycle, is all ones
//   LDSELCTR  select counter <= {2'b11, A}
//   LOOPSEL   jump to A unless the select counter is all ones; count
//   RDCLKENBL assert rdclkenbl for this instruction cycle
//   JUMPXFER  jump to A if transfer is high
// While the PC is frozen the word after the PAUSE is fetched again every
// cycle, so a RDCLKENBL placed there is issued once per paused cycle plus
// once more.  msstb (a one-cycle pulse on a ce clock) loads the PC with
// {upaddress[7:5], 5'b0} and replaces the word in execution by NOOP.
// Jump targets keep upaddress[7:6] as their two msbs.
// Everything above follows the card documentation except the NOOP flush on
// msstb, the idle state between reset and the first msstb, the JUMPUP target
// width and the byte write port of the program RAM (pw_we/pw_addr/pw_data;
// address bit 0 selects the high byte), which are this design's choices.
// The RAM starts with the documented default program.
module do_sequencer #(
  parameter int unsigned PROG_AW = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ce,
  input  logic               msstb,
  input  logic [7:0]         upaddress,
  input  logic               transfer,
  input  logic               pw_we,
  input  logic [PROG_AW:0]   pw_addr,
  input  logic [7:0]         pw_data,
  output logic [PROG_AW-1:0] pc,
  output logic [15:0]        progwrd,
  output logic [7:0]         int_cnt,
  output logic [7:0]         sel_cnt,
  output logic [7:0]         res_cnt,
  output logic               rdclkenbl,
  output logic               ldpac,
  output logic               progce,
  output logic               pausing
);
  import corr_pkg::*;

  logic [15:0] mem [2**PROG_AW];
  initial for (int i = 0; i < 2**PROG_AW; i++) mem[i] = default_prog(8'(i));

  always_ff @(posedge clk)
    if (pw_we) begin
      if (pw_addr[0]) mem[pw_addr[PROG_AW:1]][15:8] <= pw_data;
      else            mem[pw_addr[PROG_AW:1]][7:0]  <= pw_data;
    end

  logic       run;   // cleared by reset, set by the first msstb
  logic [5:0] a;
  logic tc_int, tc_sel, tc_res;
  logic jump, freeze;
  logic [PROG_AW-1:0] target;

  assign a      = progwrd[5:0];
  assign tc_int = (int_cnt == 8'hFF);
  assign tc_sel = (sel_cnt == 8'hFF);
  assign tc_res = (res_cnt == 8'hFF);

  always_comb begin
    jump   = 1'b0;
    target = PROG_AW'({upaddress[7:6], a});
    if (progwrd[I_JUMPUP]) begin
      jump   = 1'b1;
      target = PROG_AW'(upaddress);
    end
    if (progwrd[I_JUMPSEQ])                jump = 1'b1;
    if (progwrd[I_LOOPINT] && !tc_int)     jump = 1'b1;
    if (progwrd[I_LOOPSEL] && !tc_sel)     jump = 1'b1;
    if (progwrd[I_JUMPXFER] && transfer)   jump = 1'b1;
    freeze = progwrd[I_HOLD] || progwrd[I_PAUSE] || (pausing && !tc_res);
  end

  assign rdclkenbl = progwrd[I_RDCLKENBL];
  assign ldpac     = ce && (jump || msstb);
  assign progce    = ce && (jump || msstb || (run && !freeze));

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      progwrd <= 16'h0040;   // HOLD until the first msstb
      int_cnt <= '0;
      sel_cnt <= '0;
      res_cnt <= '0;
      pausing <= 1'b0;
      run     <= 1'b0;
    end else if (ce && (run || msstb)) begin
      run <= 1'b1;
      // program counter and pipeline register
      if (msstb) begin
        pc      <= PROG_AW'({upaddress[7:5], 5'b0});
        progwrd <= '0;
      end else begin
        progwrd <= mem[pc];
        if (jump)         pc <= target;
        else if (!freeze) pc <= pc + 1'b1;
      end
      // counters
      if (progwrd[I_LDINTCTR]) int_cnt <= {2'b10, a};
      else if (progwrd[I_LOOPINT]) int_cnt <= int_cnt + 8'd1;
      if (progwrd[I_LDSELCTR]) sel_cnt <= {2'b11, a};
      else if (progwrd[I_LOOPSEL]) sel_cnt <= sel_cnt + 8'd1;
      if (msstb) pausing <= 1'b0;
      else if (progwrd[I_PAUSE]) begin
        res_cnt <= {2'b11, a};
        pausing <= 1'b1;
      end else if (pausing) begin
        if (tc_res) pausing <= 1'b0;
        else        res_cnt <= res_cnt + 8'd1;
      end
    end
  end
endmodule
