// corr_pkg: constants and helpers shared by the correlator-card FPGA logic.
// It holds the 2-bit sample weighting used by the analog-sum adders, the
// microcode instruction bit positions of the Dataout sequencer together with
// the default sequencer program, and the step function of the 32-bit
// pseudo-random generator that the Analog Sum and Dataout FPGAs share.
// The instruction bits and the default program follow the card documentation;
// the generator polynomial is this design's choice.
package corr_pkg;

  // Sequencer instruction bits of PROGWRD[15:6]; PROGWRD[5:0] is the A field.
  localparam int unsigned I_HOLD      = 6;
  localparam int unsigned I_JUMPUP    = 7;
  localparam int unsigned I_JUMPSEQ   = 8;
  localparam int unsigned I_LDINTCTR  = 9;
  localparam int unsigned I_LOOPINT   = 10;
  localparam int unsigned I_PAUSE     = 11;
  localparam int unsigned I_LDSELCTR  = 12;
  localparam int unsigned I_LOOPSEL   = 13;
  localparam int unsigned I_RDCLKENBL = 14;
  localparam int unsigned I_JUMPXFER  = 15;

  // Default program (addresses 0x00..0x13, all others NOOP).  It processes
  // 96 intersections per millisecond: a skipped intersection takes 32
  // instruction cycles, a transferred one reads 16 blocks of 16 results with
  // 24 instruction cycles per block.
  function automatic logic [15:0] default_prog(input logic [7:0] adr);
    case (adr)
      8'h00: return 16'h0220;  // LDINTCTR 20 -> intersection counter A0
      8'h01: return 16'h0826;  // ILOOP: PAUSE 26 (26 extra cycles)
      8'h02: return 16'h0000;  // NOOP
      8'h03: return 16'h800A;  // JUMPXFER SELLOOP
      8'h04: return 16'h1030;  // LDSELCTR 30 -> 16 blocks
      8'h05: return 16'h0401;  // LOOPINT ILOOP
      8'h06: return 16'h0000;  // NOOP
      8'h07: return 16'h0040;  // HOLD
      8'h08: return 16'h0040;  // HOLD
      8'h0A: return 16'h0831;  // SELLOOP: PAUSE 31 (15 results)
      8'h0B: return 16'h4000;  // RDCLKENBL
      8'h0C: return 16'h083D;  // PAUSE 3D (3 cycles)
      8'h0D: return 16'h0000;  // NOOP
      8'h0E: return 16'h200A;  // LOOPSEL SELLOOP
      8'h0F: return 16'h0000;  // NOOP
      8'h10: return 16'h0401;  // LOOPINT ILOOP
      8'h11: return 16'h0000;  // NOOP
      8'h12: return 16'h0040;  // HOLD
      8'h13: return 16'h0040;  // HOLD
      default: return 16'h0000;
    endcase
  endfunction

  // One step of the Fibonacci LFSR x^32 + x^22 + x^2 + x + 1, shifting left.
  function automatic logic [31:0] lfsr_step(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  // Sixteen steps: the new state is {old[15:0], 16 new bits}.
  function automatic logic [31:0] lfsr_step16(input logic [31:0] s);
    logic [31:0] t;
    t = s;
    for (int i = 0; i < 16; i++) t = lfsr_step(t);
    return t;
  endfunction

  // Weight of a 2-bit sample: 01=+3, 00=+1, 11=-1, 10=-3.
  function automatic int weight2(input logic [1:0] v);
    case (v)
      2'b01: return 3;
      2'b00: return 1;
      2'b11: return -1;
      default: return -3;
    endcase
  endfunction

endpackage
