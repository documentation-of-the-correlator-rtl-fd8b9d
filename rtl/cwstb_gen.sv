// cwstb_gen: generator of the ASIC control-word strobe ASICCWSTB (CWSTBGEN).
// A write (D_WR_EN11) arms it and stores the 6-bit LOADCNT.  While armed and
// BLANKING & DUMPENBL is low, the counter is held at LOADCNT; while it is
// high the counter advances on each instruction cycle (ce, 62.5 MHz).  When
// the counter is all ones it is cleared, the generator disarms, and cwstb
// goes high for two clocks (16 ns) one clock later.  LOADCNT = 0x28 gives 24
// counts, 48 clocks, covering the blanking pulse's travel up the card and
// through the ASIC delay line, so every ASIC is strobed inside its blanking
// period.  Follows the documentation; the single register standing for its
// two-register synchronizer is this design's choice (the bus is synchronous).
module cwstb_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       wr,
  input  logic [5:0] loadcnt,
  input  logic       blanking,
  input  logic       dumpenbl,
  output logic       cwstb
);
  logic       armed, tc;
  logic [5:0] cnt, ld;
  logic [1:0] width;
  assign tc = armed && (cnt == 6'h3F);
  always_ff @(posedge clk) begin
    if (rst) begin
      armed <= 1'b0;
      cnt   <= '0;
      ld    <= '0;
      width <= '0;
    end else begin
      if (wr) begin
        armed <= 1'b1;
        ld    <= loadcnt;
        cnt   <= loadcnt;
      end else if (tc) begin
        armed <= 1'b0;
        cnt   <= '0;
      end else if (armed) begin
        if (!(blanking && dumpenbl)) cnt <= ld;
        else if (ce)                 cnt <= cnt + 6'd1;
      end
      width <= tc ? 2'd2 : (width != 0 ? width - 2'd1 : 2'd0);
    end
  end
  assign cwstb = (width != 0);
endmodule
