// tb_cw_shifter: fills two control-word banks with random bytes, shifts
// them one after the other through a model of the eight-ASIC daisy chain (a
// 1024-bit shift register clocked by CWCLK), and checks the chain contents,
// the 62.5 MHz bit rate (2048 clocks per bank), the done flag, and that the
// read-back RAM holds what the chain held prev each shift.  The jumper
// mode is checked to read back the bank just sent.
module tb_cw_shifter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, ce, start, rbank, we, cw_clk, cw_data, jumper, done;
  logic [3:0] wbank, sbank;
  logic [6:0] addr;
  logic [7:0] wdata, cw_rdata, rb_rdata;
  logic [1023:0] chain;
  cw_shifter #(.NBITS(1024)) dut (.clk, .rst, .ce, .start, .wbank, .sbank, .rbank, .we, .addr, .wdata,
    .cw_rdata, .rb_rdata, .cw_clk, .cw_data, .ret_clk(cw_clk), .ret_data(chain[1023]), .jumper, .done);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 40000) begin
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
  always @(posedge cw_clk) chain <= {chain[1022:0], cw_data};
  logic [7:0] img [2][128];
  task automatic shift_bank(int b, int rb, output int clocks);
    int t0;
    @(negedge clk);
    sbank = 4'(b); rbank = rb[0];
    start = 1;
    @(negedge clk) start = 0;
    t0 = cyc;
    chk(!done, $sformatf("busy after start b%0d", b));
    while (!done && cyc < t0 + 5000) @(negedge clk);
    clocks = cyc - t0;
  endtask
  initial begin
    int clocks;
    logic [1023:0] prev;
    rst = 1; start = 0; we = 0; jumper = 0; wbank = 0; sbank = 0; rbank = 0; addr = 0; wdata = 0;
    chain = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(done, "idle done");
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 128; a++) begin
        img[b][a] = 8'($urandom);
        wbank = 4'(5 + b); addr = 7'(a); wdata = img[b][a]; we = 1;
        @(negedge clk);
      end
    we = 0;
    wbank = 5; addr = 17; #1;
    chk(cw_rdata === img[0][17], "byte read-back of the bank");
    for (int b = 0; b < 2; b++) begin
      prev = chain;
      shift_bank(5 + b, b, clocks);
      chk(clocks >= 2046 && clocks <= 2050, $sformatf("shift took %0d clocks", clocks));
      repeat (4) @(negedge clk);
      // first bit sent (byte 0 bit 0) is now deepest in the chain
      for (int i = 0; i < 1024; i++)
        chk(chain[1023 - i] === img[b][i / 8][i % 8], $sformatf("bank %0d bit %0d in chain", b, i));
      rbank = b[0];
      for (int a = 0; a < 128; a++) begin
        addr = 7'(a); #1;
        chk(rb_rdata === {prev[1023 - 8*a - 7], prev[1023 - 8*a - 6], prev[1023 - 8*a - 5], prev[1023 - 8*a - 4],
                          prev[1023 - 8*a - 3], prev[1023 - 8*a - 2], prev[1023 - 8*a - 1], prev[1023 - 8*a]},
            $sformatf("read-back byte %0d of shift %0d", a, b));
      end
    end
    jumper = 1;
    shift_bank(5, 0, clocks);
    repeat (4) @(negedge clk);
    rbank = 0;
    for (int a = 0; a < 128; a++) begin
      addr = 7'(a); #1;
      chk(rb_rdata === img[0][a], $sformatf("jumper read-back byte %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
