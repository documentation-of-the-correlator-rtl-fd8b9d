// tb_partial_card: the partially populated card of the two-station
// correlator, at the default size.  Only the bottom row of eight ASICs is
// fitted: chips 0 and 1 of Dataout FPGAs 0-3.  All Dataout FPGAs get XID4
// (partial card).  Each ASIC's 4 x 4 intersection array then holds two
// useful 2 x 2 arrays, the upper-left {0, 1, 4, 5} and the lower-right
// {10, 11, 14, 15}.  Timeslot 0 reads the diagonal {0, 5, 10, 15} of every
// fitted chip; the transfer RAMs are programmed so that Timeslot 1 reads the
// remaining four, {1, 4} in millisecond 0 and {11, 14} in millisecond 1, and
// nothing from millisecond 2 on; a control-word strobe makes that bank
// the active one.  The testbench checks the LTA byte stream
// of milliseconds 0-2 against the expected word sequence (ASIC model words
// {1, FPGA[1:0], chip[0], intersection, block, result}, zero bytes left
// out), and that over one pass (Timeslot 0 of one millisecond plus Timeslot
// 1 of the whole cycle) the eight fitted ASICs deliver each of their eight
// useful intersections exactly once, 256 results each, with no read of an
// unfitted chip.  Timeslot 0 repeats every millisecond by design.
// The partial-card map, the fitted chips and the choice of useful
// intersections follow the card's description.  The ASIC word format and the
// model's latency (word driven on the 4th and 5th clocks after RDCLKEN, as in
// the other card-level testbench) are this testbench's own choices.  Runs
// about 560 k clocks (4.5 ms); the watchdog stops it at 900 k clocks.
module tb_partial_card;
  int checks = 0, failures = 0;
  logic clk = 0, clk90 = 0;
  always #5 clk = ~clk;
  initial begin #2.5; forever #5 clk90 = ~clk90; end
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 900000) begin
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
  logic rst, ms16 = 0;
  logic [12:0] up_cs = 0;
  logic up_we = 0, up_re = 0;
  logic [4:0] up_sel = 0;
  logic [7:0] up_wdata = 0, up_rdata;
  logic [15:0] asum_in [16], asum_out [16];
  logic [7:0] asum_m0, asum_m1;
  logic [15:0] asic_bot [8], asic_top [8];
  logic [7:0] asic_rdclken [8];
  logic [3:0] asic_cnum [8], asic_blk [8];
  logic [7:0] cw_clk, cw_data, cw_stb, blanking, dumpenbl, lta_data, pins3;
  logic [3:0] test_msec;
  correlator_card dut (.clk, .clk90, .rst, .ms16_in(ms16), .up_cs, .up_we, .up_re, .up_sel, .up_wdata,
    .up_rdata, .asum_in, .asum_out, .asum_m0, .asum_m1, .asic_bot, .asic_top, .asic_rdclken,
    .asic_cnum, .asic_blk, .cw_clk, .cw_data, .cw_stb, .cw_ret_clk(cw_clk), .cw_ret_data(cw_data),
    .blanking, .dumpenbl, .lta_data, .pins3, .test_msec);
  initial foreach (asum_in[b]) asum_in[b] = 16'h0000;

  task automatic upw(logic [12:0] cs, int sel, logic [7:0] d);
    @(negedge clk);
    up_cs = cs; up_we = 1; up_sel = 5'(sel); up_wdata = d;
    @(negedge clk);
    up_cs = 0; up_we = 0;
  endtask

  // ASIC models (only chips 0 and 1 of FPGAs 0-3 are fitted)
  localparam int AD = 3;
  logic [7:0] rq [8][AD+1];
  logic [3:0] cq [8][AD+1], bq [8][AD+1];
  logic [4:0] kq [8][AD+1][8];
  logic [4:0] kcnt [8][8];
  int unfitted = 0;
  initial foreach (kcnt[f, c]) kcnt[f][c] = 0;
  always @(posedge clk)
    for (int f = 0; f < 8; f++) begin
      for (int j = AD; j > 0; j--) begin
        rq[f][j] <= rq[f][j-1]; cq[f][j] <= cq[f][j-1]; bq[f][j] <= bq[f][j-1]; kq[f][j] <= kq[f][j-1];
      end
      rq[f][0] <= asic_rdclken[f]; cq[f][0] <= asic_cnum[f]; bq[f][0] <= asic_blk[f]; kq[f][0] <= kcnt[f];
      for (int c = 0; c < 8; c++) if (asic_rdclken[f][c]) begin
        kcnt[f][c] <= kcnt[f][c] + 1;
        if (!rst && (f > 3 || c > 1)) unfitted++;
      end
    end
  always_comb
    for (int f = 0; f < 8; f++) begin
      asic_bot[f] = 16'h0000;
      asic_top[f] = 16'h0000;
      for (int c = 0; c < 2; c++)
        if (f < 4 && rq[f][AD][c]) asic_bot[f] = {1'b1, 2'(f), 1'(c), cq[f][AD], bq[f][AD], kq[f][AD][c][4:1]};
    end

  logic [7:0] lta_q [16][$];
  always @(posedge clk) if (!rst && lta_data != 0) lta_q[dut.msec[0]].push_back(lta_data);

  // transfer pattern: TS0 all in ms 0 and 1, TS1 only the off-diagonal
  // intersections of the two useful 2 x 2 arrays
  function automatic void tmap(int m, int n, output int x, output int ch, output int cn);
    if (n < 8'hC0) begin
      int s = n - 8'hA0;
      x = s / 8; ch = (s / 4) % 2; cn = (s % 4) * 5;
    end else begin
      int t = n - 8'hC0;
      x  = (t % 32) / 8 + (m >= 8 ? 4 : 0);
      ch = ((m / 2) % 4) * 2 + (t / 4) % 2;
      cn = (m % 2) * 8 + (t / 32) * 4 + t % 4;
    end
  endfunction
  function automatic bit xfer_on(int m, int n);
    int x, ch, cn;
    if (m > 1) return 0;
    if (n < 8'hC0) return 1;
    tmap(m, n, x, ch, cn);
    return (m == 0) ? (cn == 1 || cn == 4) : (cn == 11 || cn == 14);
  endfunction

  int seen [4][2][16];
  task automatic check_ms(int m);
    logic [7:0] e [$];
    for (int n = 8'hA0; n <= 8'hFF; n++) if (xfer_on(m, n)) begin
      int x, ch, cn;
      tmap(m, n, x, ch, cn);
      chk(x < 4 && ch < 2, $sformatf("ms %0d int %0h maps to unfitted FPGA %0d chip %0d", m, n, x, ch));
      if (m == 0 || n >= 8'hC0) seen[x % 4][ch % 2][cn]++;
      for (int r = 0; r < 256; r++) begin
        logic [15:0] w;
        w = {1'b1, 2'(x), 1'(ch), 4'(cn), 4'(r / 16), 4'(r % 16)};
        if (w[7:0] != 0) e.push_back(w[7:0]);
        e.push_back(w[15:8]);
      end
    end
    chk(lta_q[m].size() == e.size(), $sformatf("ms %0d: %0d LTA bytes, expected %0d", m, lta_q[m].size(), e.size()));
    begin
      int bad = 0;
      for (int i = 0; i < e.size() && i < lta_q[m].size(); i++)
        if (lta_q[m][i] != e[i]) begin
          if (bad < 5) $display("FAIL ms %0d byte %0d: %h expected %h", m, i, lta_q[m][i], e[i]);
          bad++;
        end
      chk(bad == 0, $sformatf("ms %0d: %0d wrong bytes", m, bad));
    end
  endtask

  initial begin
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 8; f++) begin
      upw(13'(1 << f), 3, 8'(8'h10 | f));
      upw(13'(1 << f), 3, 8'h00);
    end
    // transfer RAM bank 0: byte {ms, int[6:3]}, bit int[2:0]
    upw(13'hFF, 0, 8'h00);
    for (int m = 0; m < 16; m++)
      for (int b = 0; b < 16; b++) begin
        logic [7:0] v;
        for (int j = 0; j < 8; j++) begin
          int n;
          n = 8'h80 + 8 * b + j;
          v[j] = (n >= 8'hA0) ? xfer_on(m, n) : 1'b0;
        end
        upw(13'hFF, 4, v);
      end
    @(negedge clk) ms16 = 1;
    @(negedge clk) ms16 = 0;
    // the control-word strobe makes the written bank the active one
    upw(13'hFF, 11, 8'h28);
    for (int m = 0; m <= 3; m++) begin
      wait (dut.g_do[0].u_do.msstb);
      repeat (3) @(negedge clk);
    end
    repeat (60000) @(negedge clk);
    for (int m = 0; m <= 2; m++) check_ms(m);
    foreach (seen[x, c, i]) begin
      bit useful;
      useful = (i / 4 < 2 && i % 4 < 2) || (i / 4 >= 2 && i % 4 >= 2);
      chk(seen[x][c][i] == (useful ? 1 : 0), $sformatf("FPGA %0d chip %0d intersection %0d read %0d times", x, c, i, seen[x][c][i]));
    end
    chk(unfitted == 0, $sformatf("%0d read enables to unfitted chips", unfitted));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
