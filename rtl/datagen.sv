// datagen: the pseudo-random test-data generator shared by the Analog Sum and
// Dataout FPGAs (DATAGEN).  A 32-bit seed is shifted in by four byte writes,
// least significant byte first.  The init pulse (16MSIN) reloads the
// generator from the seed; otherwise it advances 16 LFSR steps per clock and
// rnd shows the 16 newest bits, so two consecutive words hold the whole state.
// The polynomial x^32+x^22+x^2+x+1 is this design's choice; the documentation
// names a "standard" generator without giving it.  An all-zero seed would
// lock the LFSR, so a zero seed is replaced by 1.
module datagen (
  input  logic        clk,
  input  logic        rst,
  input  logic        seed_we,
  input  logic [7:0]  seed_byte,
  input  logic        init,
  output logic [15:0] rnd,
  output logic [31:0] seed
);
  import corr_pkg::*;
  logic [31:0] state;
  always_ff @(posedge clk) begin
    if (rst) begin
      seed  <= 32'h1;
      state <= 32'h1;
    end else begin
      if (seed_we) seed <= {seed_byte, seed[31:8]};
      if (init) state <= (seed == 32'h0) ? 32'h1 : seed;
      else      state <= lfsr_step16(state);
    end
  end
  assign rnd = state[15:0];
endmodule
