// la_ram: an internal logic analyzer built from a RAM.  clear restarts the
// address counter at 0; on every clock with en high the input word is
// written at the counter address and the counter advances, until the counter
// reaches all ones: that last address is written once and the counter then
// freezes, keeping a snapshot of 2**AW samples.  Read-back is a registered
// read at raddr (1 clock).  Behaviour follows the documentation (cleared by
// a microprocessor write, counts up, freezes at all ones, never wraps).
module la_ram #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          en,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic          full
);
  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt  <= '0;
      full <= 1'b0;
    end else if (en && !full) begin
      if (cnt == '1) full <= 1'b1;
      else           cnt  <= cnt + 1'b1;
    end
  end
  always_ff @(posedge clk) begin
    if (en && !full && !rst && !clear) mem[cnt] <= din;
    rdata <= mem[raddr];
  end
endmodule
