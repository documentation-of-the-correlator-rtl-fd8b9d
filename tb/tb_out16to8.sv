// tb_out16to8: low byte on phase 0, high byte on phase 1, and the low byte
// on both phases in the 62.5 MHz mode.
module tb_out16to8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic phase, mode62;
  logic [15:0] din;
  logic [7:0] dout;
  out16to8 dut (.phase, .din, .mode62, .dout);
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
  initial begin
    for (int i = 0; i < 200; i++) begin
      din = 16'($urandom); phase = i[0]; mode62 = i[1];
      #1;
      chk(dout === ((phase && !mode62) ? din[15:8] : din[7:0]), $sformatf("din %h ph %0d m %0d -> %h", din, phase, mode62, dout));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
