// testmux: the input buffer of one 16-bit antenna bus (TESTMUX).  CONTROL[2:0]
// selects what is passed on to the ASICs and to the analog-sum adders:
//   0..3 all zeros, 4 the input data, 5 the 8-bit COUNT (on both bytes),
//   6 the pseudo-random word, 7 all ones.
// The selected word is registered (1 clock).  The selection codes follow the
// documentation; the register and the COUNT placement on both bytes are this
// design's choices.
module testmux (
  input  logic        clk,
  input  logic [2:0]  control,
  input  logic [15:0] din,
  input  logic [7:0]  count,
  input  logic [15:0] rnd,
  output logic [15:0] dout
);
  always_ff @(posedge clk) begin
    unique case (control)
      3'd4:    dout <= din;
      3'd5:    dout <= {count, count};
      3'd6:    dout <= rnd;
      3'd7:    dout <= '1;
      default: dout <= '0;
    endcase
  end
endmodule
