// tb_quad_delay: 8 ns clock with a quadrature clock 2 ns later.  For every
// whole-clock (0..4) and quarter (0..3) setting, a new word is launched just
// after a clk rising edge and the time until it appears on dout is measured;
// it must be int_dly clocks plus frac_dly quarters after that edge (the
// undelayed case appears at the launching edge itself).
module tb_quad_delay;
  int checks = 0, failures = 0;
  logic clk = 0, clk90 = 0;
  always #4 clk = ~clk;
  initial begin #2; forever #4 clk90 = ~clk90; end
  logic [2:0] int_dly;
  logic [1:0] frac_dly;
  logic [7:0] din, dout, src;
  quad_delay #(.W(8), .MAXI(4)) dut (.clk, .clk90, .int_dly, .frac_dly, .din(src), .dout);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 5000) begin
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
  always @(posedge clk) src <= din;   // launch register in the clk domain
  initial begin
    realtime t0, t1;
    din = 0; int_dly = 0; frac_dly = 0;
    repeat (10) @(posedge clk);
    for (int i = 0; i <= 4; i++)
      for (int f = 0; f < 4; f++) begin
        @(negedge clk);
        int_dly = 3'(i); frac_dly = 2'(f);
        din = 8'h00;
        repeat (8) @(posedge clk);
        @(negedge clk) din = 8'(8'h10 * i + f + 1);
        @(posedge clk) t0 = $realtime;
        wait (dout === 8'(8'h10 * i + f + 1));
        t1 = $realtime;
        chk((t1 - t0) > (8.0 * i + 2.0 * f) - 0.5 && (t1 - t0) < (8.0 * i + 2.0 * f) + 0.5,
            $sformatf("int %0d frac %0d delay %0.2f ns", i, f, t1 - t0));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
