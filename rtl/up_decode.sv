// up_decode: the microprocessor port of one FPGA.  The byte bus is taken as
// synchronous to the card clock with one-clock strobes: when cs and we are
// high, wr_en[sel] pulses for that clock (the D_WR_EN<sel> strobes); cs and re
// give rd_en[sel] (D_RD_EN<sel>).  up_adr is the auto-incrementing RAM
// address (UP_ADR): a write to select 0 clears it, and each access through a
// select whose bit is set in INC_MASK advances it after the access.
// The select numbering follows the documentation; the synchronous strobe
// timing and the clearing/advancing rules are this design's choices.
module up_decode #(
  parameter int unsigned AW       = 11,
  parameter logic [31:0] INC_MASK = 32'h0000_0180
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cs,
  input  logic          we,
  input  logic          re,
  input  logic [4:0]    sel,
  output logic [31:0]   wr_en,
  output logic [31:0]   rd_en,
  output logic [AW-1:0] up_adr
);
  always_comb begin
    wr_en = '0;
    rd_en = '0;
    if (cs && we) wr_en[sel] = 1'b1;
    if (cs && re) rd_en[sel] = 1'b1;
  end
  always_ff @(posedge clk) begin
    if (rst) up_adr <= '0;
    else if (cs && we && sel == 5'd0) up_adr <= '0;
    else if (cs && (we || re) && INC_MASK[sel]) up_adr <= up_adr + 1'b1;
  end
endmodule
