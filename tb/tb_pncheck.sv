// tb_pncheck: feeds the random stream of a bit-serial LFSR model (random
// start state) on each bus in turn, with garbage on the others.  After a
// restart selecting that bus the checker must lock after two words, and its
// error count must equal, every clock, the number of words corrupted so far
// (single-bit flips, about 1 in 50).  A bus of random words must pile up
// errors.
module tb_pncheck;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, restart;
  logic [15:0] buses [4];
  logic [1:0] sel;
  logic [15:0] errors;
  logic locked;
  pncheck #(.NBUS(4)) dut (.clk, .rst, .buses, .sel, .restart, .errors, .locked);
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
  logic [31:0] m = 32'h1234_5678;
  int corrupt = 0;
  task automatic step_stream();
    for (int k = 0; k < 16; k++) m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]};
  endtask
  initial begin
    rst = 1; restart = 0; sel = 0;
    for (int k = 0; k < 4; k++) buses[k] = 16'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // each bus in turn carries the stream, the others carry garbage
    for (int b = 0; b < 4; b++) begin
      corrupt = 0;
      m = $urandom;
      if (m == 0) m = 1;
      sel = 2'(b); restart = 1;
      @(negedge clk) restart = 0;
      for (int i = 0; i < 1500; i++) begin
        // counted so far: one per corrupted word already compared
        if (i > 3) chk(errors == 16'(corrupt), $sformatf("bus %0d word %0d: errors %0d exp %0d", b, i, errors, corrupt));
        if (i == 3) chk(locked, "locked after two words");
        step_stream();
        for (int k = 0; k < 4; k++) buses[k] = 16'($urandom);
        buses[b] = m[15:0];
        if (i > 10 && $urandom_range(0, 49) == 0) begin
          buses[b] ^= 16'(1 << $urandom_range(0, 15));
          corrupt++;
        end
        @(negedge clk);
      end
    end
    // select a bus of random words: errors must pile up
    sel = 0; restart = 1;
    @(negedge clk) restart = 0;
    repeat (50) begin buses[0] = 16'($urandom); @(negedge clk); end
    chk(errors > 40, $sformatf("garbage bus errors %0d", errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
