// pncheck: checks that one input bus carries the standard pseudo-random
// stream (PNCHECK).  sel picks one of NBUS 16-bit buses.  After restart the
// first two words from that bus are taken as the generator state (the
// generator's words overlap by 16 bits, so two words fix all 32 state bits);
// from then on a local copy free-runs and each later word that differs from
// it adds one to a saturating 16-bit error count.  locked shows that the
// checker has seeded itself.  Input words are sampled every clock.
// From the documentation: seed from the stream, free run, compare, count
// errors, multiplexed stream choice.  This design's choices: a stream is a
// whole bus word, and the two-word seeding.
module pncheck #(
  parameter int unsigned NBUS = 4,
  localparam int unsigned SW = (NBUS > 1) ? $clog2(NBUS) : 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] buses [NBUS],
  input  logic [SW-1:0] sel,
  input  logic        restart,
  output logic [15:0] errors,
  output logic        locked
);
  import corr_pkg::*;
  logic [15:0] w;
  logic [31:0] state;
  logic [1:0]  seeded;
  logic [31:0] nxt;
  assign w   = buses[sel];
  assign nxt = lfsr_step16(state);
  always_ff @(posedge clk) begin
    if (rst || restart) begin
      seeded <= '0;
      errors <= '0;
      state  <= '0;
    end else if (seeded != 2'd2) begin
      state  <= {state[15:0], w};
      seeded <= seeded + 2'd1;
    end else begin
      state <= nxt;
      if (nxt[15:0] != w && errors != 16'hFFFF) errors <= errors + 16'd1;
    end
  end
  assign locked = (seeded == 2'd2);
endmodule
