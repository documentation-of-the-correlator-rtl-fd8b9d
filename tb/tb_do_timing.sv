// tb_do_timing: a reduced millisecond (CNT_W = 10, 1000 counts) so that the
// blanking address is COUNT itself and the dump address is {msec,
// COUNT[9:4]}.  A reference model of COUNT/msec checks the msstb period,
// the millisecond numbering after a 16 ms sync, and every BLANKING and
// DUMPENBL value against a model of both RAMs (defaults, then rewritten
// bytes and the other banks).
module tb_do_timing;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int T = 1000;
  logic rst, ce, ms16, bank4, bank5, blk_we, dmp_we, msstb, blanking, dumpenbl;
  logic [7:0] blk_waddr, blk_wdata, dmp_waddr, dmp_wdata;
  logic [3:0] msec;
  logic [9:0] count;
  do_timing #(.CNT_W(10), .MS_TICKS(T)) dut (.clk, .rst, .ce, .ms16, .bank4, .bank5, .blk_we, .blk_waddr,
    .blk_wdata, .dmp_we, .dmp_waddr, .dmp_wdata, .msstb, .msec, .count, .blanking, .dumpenbl);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 200000) begin
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
  logic blk [2048], dmp [2048];
  int mcount = 0, mmsec = 15, n_ms = 0, last_stb = -1;
  bit exp_blk = 0, exp_dmp = 0;
  always @(posedge clk) ce <= rst ? 1'b0 : ~ce;
  always @(posedge clk) if (!rst) begin
    // registered RAM outputs: compare with last cycle's address
    chk(blanking === exp_blk, $sformatf("blanking at count %0d", mcount));
    chk(dumpenbl === exp_dmp, $sformatf("dumpenbl at ms %0d count %0d", mmsec, mcount));
    exp_blk = blk[{bank4, 10'(mcount)}];
    exp_dmp = dmp[{bank5, 4'(mmsec), 6'(mcount >> 4)}];
    chk(count == 10'(mcount) && msec == 4'(mmsec), "count/msec");
    chk(msstb == (ce && mcount == T - 1), "msstb");
    if (ce) begin
      if (mcount == T - 1) begin
        mcount = 0; mmsec = (mmsec + 1) % 16; n_ms++;
        if (last_stb >= 0) chk(cyc - last_stb == 2 * T, "msstb period");
        last_stb = cyc;
      end else if (ms16) begin
        mcount = 0; mmsec = 15;
      end else mcount++;
    end
  end
  initial begin
    rst = 1; ms16 = 0; bank4 = 0; bank5 = 0; blk_we = 0; dmp_we = 0;
    blk_waddr = 0; blk_wdata = 0; dmp_waddr = 0; dmp_wdata = 0;
    foreach (blk[i]) begin blk[i] = 0; dmp[i] = 0; end
    blk[4] = 1; blk[5] = 1; blk[1028] = 1; blk[1029] = 1; dmp[0] = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (777) @(negedge clk);
    while (!ce) @(negedge clk);
    ms16 = 1;                       // sync on an instruction-cycle clock
    @(negedge clk) ms16 = 0;
    repeat (2 * T * 3) @(negedge clk);
    // rewrite some bytes of both RAMs, then switch banks
    for (int k = 0; k < 40; k++) begin
      blk_we = 1; blk_waddr = 8'($urandom); blk_wdata = 8'($urandom);
      dmp_we = 1; dmp_waddr = 8'($urandom); dmp_wdata = 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        blk[{blk_waddr, 3'(b)}] = blk_wdata[b];
        dmp[{dmp_waddr, 3'(b)}] = dmp_wdata[b];
      end
      @(negedge clk);
    end
    blk_we = 0; dmp_we = 0;
    repeat (2 * T * 3) @(negedge clk);
    bank4 = 1; bank5 = 1;
    repeat (2 * T * 18) @(negedge clk);
    chk(n_ms >= 23, "milliseconds counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
