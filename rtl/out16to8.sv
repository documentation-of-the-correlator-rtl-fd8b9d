// out16to8: narrows the 16-bit, 62.5 MHz read-out word to the 8-bit,
// 125 MHz stream sent toward the LTA (OUT16TO8).  phase is 0 on the first
// 125 MHz clock of an instruction cycle and 1 on the second: the low byte
// goes out first, then the high byte.  With mode62 (XID3) set the low byte
// is sent on both clocks and the high byte is dropped.  Combinational.
// Follows the documentation; the byte order is this design's choice.
module out16to8 (
  input  logic        phase,
  input  logic [15:0] din,
  input  logic        mode62,
  output logic [7:0]  dout
);
  assign dout = (phase && !mode62) ? din[15:8] : din[7:0];
endmodule
