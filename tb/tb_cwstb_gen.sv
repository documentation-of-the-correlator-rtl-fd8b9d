// tb_cwstb_gen: after a strobe request with LOADCNT = 0x28 no strobe may
// come while BLANKING & DUMPENBL is low; once both are high the strobe must
// come about 48 clocks (24 counts at 62.5 MHz, 0x28..0x3F) later, give or take the enable
// phase, and last two clocks; only one strobe per request.
module tb_cwstb_gen;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, ce, wr, blanking, dumpenbl, cwstb;
  logic [5:0] loadcnt;
  cwstb_gen dut (.clk, .rst, .ce, .wr, .loadcnt, .blanking, .dumpenbl, .cwstb);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask
  always @(posedge clk) ce <= rst ? 1'b0 : ~ce;
  int nstb = 0, width = 0;
  always @(posedge clk) if (cwstb) width++;
  initial begin
    int t_gate, t_stb;
    rst = 1; wr = 0; blanking = 0; dumpenbl = 0; loadcnt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < 3; r++) begin
      wr = 1; loadcnt = 6'h28;
      @(negedge clk) wr = 0;
      blanking = (r == 1);          // blanking alone must not start it
      repeat (100) begin @(negedge clk); chk(!cwstb, "no strobe before gate"); end
      blanking = 1; dumpenbl = 1; t_gate = cyc;
      width = 0;
      while (!cwstb && cyc < t_gate + 200) @(negedge clk);
      t_stb = cyc;
      chk(t_stb - t_gate >= 45 && t_stb - t_gate <= 50, $sformatf("strobe after %0d clocks", t_stb - t_gate));
      repeat (100) @(negedge clk);
      chk(width == 2, $sformatf("strobe width %0d", width));
      blanking = 0; dumpenbl = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
