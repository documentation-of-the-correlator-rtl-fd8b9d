// tb_testmux: every CONTROL code of the test multiplexer with random data,
// count and random words; the output is checked one clock later.
module tb_testmux;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] control;
  logic [15:0] din, rnd, dout, e;
  logic [7:0] count;
  testmux dut (.clk, .control, .din, .count, .rnd, .dout);
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
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      control = 3'(i); din = 16'($urandom); rnd = 16'($urandom); count = 8'($urandom);
      case (control)
        3'd4: e = din;
        3'd5: e = {count, count};
        3'd6: e = rnd;
        3'd7: e = 16'hFFFF;
        default: e = 16'h0000;
      endcase
      @(posedge clk); #1;
      chk(dout === e, $sformatf("control %0d got %h exp %h", control, dout, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
