// tb_la_ram: clears the logic analyzer, records an incrementing pattern with
// gaps in the enable, checks that 256 samples are kept in order, that
// recording freezes after the last address, and that a clear restarts it.
module tb_la_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, clear, en, full;
  logic [15:0] din, rdata;
  logic [7:0] raddr;
  la_ram #(.W(16), .AW(8)) dut (.clk, .rst, .clear, .en, .din, .raddr, .rdata, .full);
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
  initial begin
    int n;
    rst = 1; clear = 0; en = 0; din = 0; raddr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0; clear = 1;
    @(negedge clk) clear = 0;
    n = 0;
    for (int i = 0; i < 700; i++) begin
      en = (i % 3) != 1;
      din = 16'(16'hA000 + i);
      @(negedge clk);
    end
    en = 0;
    chk(full, "full after 256 samples");
    // expected: samples taken on cycles with en, first 256 of them
    n = 0;
    for (int i = 0; i < 700 && n < 256; i++) begin
      if ((i % 3) != 1) begin
        raddr = 8'(n);
        @(negedge clk);
        chk(rdata === 16'(16'hA000 + i), $sformatf("addr %0d got %h exp %h", n, rdata, 16'(16'hA000 + i)));
        n++;
      end
    end
    clear = 1;
    @(negedge clk) clear = 0;
    chk(!full, "clear restarts");
    en = 1; din = 16'h5555;
    @(negedge clk) en = 0;
    raddr = 0;
    @(negedge clk);
    chk(rdata === 16'h5555, "new sample at address 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
