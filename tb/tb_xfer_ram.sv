// tb_xfer_ram: default contents of both banks for every millisecond and
// intersection, double-buffered bank switching at the control-word strobe,
// and a byte write.
module tb_xfer_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, bank_wr, bank_in, cwstb, we, transfer, bank;
  logic [3:0] msec;
  logic [6:0] intn;
  logic [8:0] waddr;
  logic [7:0] wdata;
  xfer_ram dut (.clk, .rst, .msec, .intn, .bank_wr, .bank_in, .cwstb, .we, .waddr, .wdata, .transfer, .bank);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
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
  task automatic scan(int b);
    for (int ms = 0; ms < 16; ms++)
      for (int n = 0; n < 128; n++) begin
        msec = 4'(ms); intn = 7'(n);
        @(negedge clk);
        chk(transfer == (b == 0 ? (n >= 64) : (n < 64)), $sformatf("bank %0d ms %0d int %0d", b, ms, n));
      end
  endtask
  initial begin
    rst = 1; bank_wr = 0; bank_in = 0; cwstb = 0; we = 0; waddr = 0; wdata = 0; msec = 0; intn = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    scan(0);
    bank_wr = 1; bank_in = 1;
    @(negedge clk) bank_wr = 0;
    chk(bank == 0, "bank not switched before strobe");
    cwstb = 1;
    @(negedge clk) cwstb = 0;
    chk(bank == 1, "bank switched by strobe");
    scan(1);
    // write byte: bank 1, ms 3, intersections 72..79 -> byte index {1,3,9}
    we = 1; waddr = {1'b1, 4'd3, 4'd9}; wdata = 8'b1010_0101;
    @(negedge clk) we = 0;
    for (int k = 0; k < 8; k++) begin
      msec = 3; intn = 7'(72 + k);
      @(negedge clk);
      chk(transfer == wdata[k], $sformatf("written bit %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
