// tb_correlator_card: the whole card at its default size (1 ms = 62500
// instruction cycles, 125000 clocks) for about nine milliseconds.
// Analog-sum side: 16 random antenna buses every clock; the 64-antenna M0/M1
// sums must equal a reference sum of the buses ten clocks earlier, first
// with all antennas, then with three buses partly masked and the matching
// offsets; buses must pass through in one clock.  At the end the middle FPGA
// is put in random-output mode (checked against the generator recurrence)
// and all Analog Sum FPGAs in random-data mode (the stream checker in the
// second one must see no errors).
// Read-out side: each Dataout FPGA gets XID = its index; a model of its
// eight ASICs answers RDCLKEN with words {FPGA, chip, intersection-in-chip
// bits 1:0, block, result}.  Transfer RAMs are written so that ms 0 reads all
// 96 intersections (both timeslots), ms 1 and ms 8 read Timeslot 1, and ms
// 2-7 read nothing.  The LTA byte stream of each millisecond must equal the
// expected word sequence built from the intersection maps (zero bytes are
// left out on both sides, as a zero byte cannot be told from an idle slot).
// Control words are written into Dataout 5, shifted twice through a model
// ASIC chain and read back, and a strobe request on all FPGAs must produce
// one strobe each inside the blanking/dump-enable window.
// Every mechanism below must be seen at least once, otherwise it counts as a
// failure: analog sums, masked sums with offsets, random analog output,
// stream checker, skipped intersection, transferred intersection, PAUSE,
// HOLD, millisecond strobe, words merged from each of the 8 Dataout FPGAs,
// control-word shift and read-back, control-word strobe, millisecond test
// bus.
module tb_correlator_card;
  int checks = 0, failures = 0;
  logic clk = 0, clk90 = 0;
  always #5 clk = ~clk;
  initial begin #2.5; forever #5 clk90 = ~clk90; end
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 1400000) begin
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
  logic [7:0] cw_clk, cw_data, cw_stb, cw_ret_clk, cw_ret_data, blanking, dumpenbl, lta_data, pins3;
  logic [3:0] test_msec;
  correlator_card dut (.clk, .clk90, .rst, .ms16_in(ms16), .up_cs, .up_we, .up_re, .up_sel, .up_wdata,
    .up_rdata, .asum_in, .asum_out, .asum_m0, .asum_m1, .asic_bot, .asic_top, .asic_rdclken,
    .asic_cnum, .asic_blk, .cw_clk, .cw_data, .cw_stb, .cw_ret_clk, .cw_ret_data, .blanking,
    .dumpenbl, .lta_data, .pins3, .test_msec);

  // mechanism counters
  typedef enum int {M_SUM, M_MASKED, M_RNDOUT, M_PNCHK, M_SKIP, M_XFER, M_PAUSE, M_HOLD, M_MSSTB,
                    M_CWSHIFT, M_CWSTB, M_TMSEC, M_MERGE0} mech_e;
  int mech [M_MERGE0 + 8];
  string mname [M_MERGE0 + 8] = '{"analog sum", "masked sum with offset", "random analog output",
    "stream checker", "skipped intersection", "transferred intersection", "PAUSE", "HOLD",
    "millisecond strobe", "control-word shift/read-back", "control-word strobe", "millisecond test bus",
    "merge from Dataout 0", "merge from Dataout 1", "merge from Dataout 2", "merge from Dataout 3",
    "merge from Dataout 4", "merge from Dataout 5", "merge from Dataout 6", "merge from Dataout 7"};

  // ---------------- microprocessor ----------------
  task automatic upw(logic [12:0] cs, int sel, logic [7:0] d);
    @(negedge clk);
    up_cs = cs; up_we = 1; up_sel = 5'(sel); up_wdata = d;
    @(negedge clk);
    up_cs = 0; up_we = 0;
  endtask
  task automatic upr(logic [12:0] cs, int sel, output logic [7:0] d);
    @(negedge clk);
    up_cs = cs; up_re = 1; up_sel = 5'(sel);
    @(negedge clk);
    up_cs = 0; up_re = 0;
    d = up_rdata;
  endtask

  // ---------------- analog sums ----------------
  function automatic int wt(logic [1:0] v);
    int t [4] = '{1, 3, -3, -1};
    return t[v];
  endfunction
  localparam int H = 32;
  logic [15:0] hist [H][16];
  logic [7:0] mk [16];
  int off [2] = '{0, 0};
  int quiet = 20;
  bit sums_on = 1, masked = 0;
  function automatic int ref64(int m);
    int e = 0;
    for (int b = 0; b < 16; b++)
      for (int a = 0; a < 4; a++)
        e += wt(mk[b][4*m + a] ? hist[(cyc - 10 + 4 * H) % H][b][8*m + 2*a +: 2] : 2'b00);
    return e / 2 + off[m];
  endfunction
  always @(negedge clk) if (!rst) begin
    if (quiet > 0) quiet--;
    else if (sums_on) begin
      for (int b = 0; b < 16; b++) chk(asum_out[b] == hist[(cyc - 1 + H) % H][b], "bus pass-through");
      chk(asum_m0 == 8'(ref64(0)) && asum_m1 == 8'(ref64(1)),
          $sformatf("64-antenna sums %0d %0d expected %0d %0d", $signed(asum_m0), $signed(asum_m1), ref64(0), ref64(1)));
      mech[masked ? M_MASKED : M_SUM]++;
    end
    for (int b = 0; b < 16; b++) begin
      asum_in[b] = 16'($urandom);
      hist[cyc % H][b] = asum_in[b];
    end
  end

  // ---------------- ASIC models ----------------
  localparam int AD = 3;
  logic [7:0] rq [8][AD+1];
  logic [3:0] cq [8][AD+1], bq [8][AD+1];
  logic [4:0] kq [8][AD+1][8];
  logic [4:0] kcnt [8][8];
  initial foreach (kcnt[f, c]) kcnt[f][c] = 0;
  always @(posedge clk)
    for (int f = 0; f < 8; f++) begin
      for (int j = AD; j > 0; j--) begin
        rq[f][j] <= rq[f][j-1]; cq[f][j] <= cq[f][j-1]; bq[f][j] <= bq[f][j-1]; kq[f][j] <= kq[f][j-1];
      end
      rq[f][0] <= asic_rdclken[f]; cq[f][0] <= asic_cnum[f]; bq[f][0] <= asic_blk[f]; kq[f][0] <= kcnt[f];
      for (int c = 0; c < 8; c++) if (asic_rdclken[f][c]) kcnt[f][c] <= kcnt[f][c] + 1;
    end
  always_comb
    for (int f = 0; f < 8; f++) begin
      asic_bot[f] = 16'hDEAD;
      asic_top[f] = 16'hBEEF;
      for (int c = 0; c < 8; c++)
        if (rq[f][AD][c]) begin
          if (c < 4) asic_bot[f] = {3'(f), 3'(c), cq[f][AD][1:0], bq[f][AD], kq[f][AD][c][4:1]};
          else       asic_top[f] = {3'(f), 3'(c), cq[f][AD][1:0], bq[f][AD], kq[f][AD][c][4:1]};
        end
    end

  // control-word chain of Dataout 5; the others are looped back
  logic [1023:0] chain5 = '0;
  always @(posedge cw_clk[5]) chain5 <= {chain5[1022:0], cw_data[5]};
  always_comb begin
    cw_ret_clk  = cw_clk;
    cw_ret_data = cw_data;
    cw_ret_data[5] = chain5[1023];
  end

  // ---------------- read-out observation ----------------
  logic [7:0] lta_q [16][$];
  always @(posedge clk) if (!rst && lta_data != 0) lta_q[dut.msec[0]].push_back(lta_data);
  always @(posedge clk) if (!rst && dut.g_do[0].u_do.ce) begin
    if (dut.g_do[0].u_do.progwrd[15]) mech[dut.g_do[0].u_do.transfer ? M_XFER : M_SKIP]++;
    if (dut.g_do[0].u_do.progwrd[11]) mech[M_PAUSE]++;
    if (dut.g_do[0].u_do.progwrd[6])  mech[M_HOLD]++;
    if (dut.g_do[0].u_do.msstb)       mech[M_MSSTB]++;
  end
  int n_stb [8], stb_ok [8];
  logic [7:0] stb_d = 0;
  always @(posedge clk) begin
    stb_d <= cw_stb;
    for (int f = 0; f < 8; f++)
      if (!rst && cw_stb[f] && !stb_d[f]) begin
        n_stb[f]++;
        if (blanking[f] && dumpenbl[f]) stb_ok[f]++;
      end
  end

  function automatic bit xfer_on(int m, int n);
    if (m == 0) return 1;
    if (m >= 2 && m <= 7) return 0;
    return n >= 8'hC0;
  endfunction
  task automatic check_ms(int m);
    logic [7:0] e [$];
    int nw [8];
    foreach (nw[f]) nw[f] = 0;
    for (int n = 8'hA0; n <= 8'hFF; n++) if (xfer_on(m, n)) begin
      int x, ch, cn;
      if (n < 8'hC0) begin
        int sx [8] = '{0, 0, 1, 1, 6, 6, 7, 7};
        int sc [8] = '{0, 3, 4, 6, 0, 3, 4, 6};
        x = sx[(n - 8'hA0) / 4]; ch = sc[(n - 8'hA0) / 4]; cn = ((n - 8'hA0) % 4) * 5;
      end else begin
        int t = n - 8'hC0;
        x  = (t % 32) / 8 + (m >= 8 ? 4 : 0);
        ch = ((m / 2) % 4) * 2 + (t / 4) % 2;
        cn = (m % 2) * 8 + (t / 32) * 4 + t % 4;
      end
      for (int r = 0; r < 256; r++) begin
        logic [15:0] w;
        w = {3'(x), 3'(ch), 2'(cn), 4'(r / 16), 4'(r % 16)};
        if (w[7:0] != 0) e.push_back(w[7:0]);
        if (w[15:8] != 0) e.push_back(w[15:8]);
        nw[x]++;
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
      if (bad == 0 && lta_q[m].size() == e.size())
        for (int f = 0; f < 8; f++) mech[M_MERGE0 + f] += nw[f];
    end
  endtask

  initial begin
    logic [7:0] d, lo, hi;
    logic [7:0] img [128];
    logic [15:0] w [3];
    rst = 1;
    foreach (mk[b]) mk[b] = 8'hFF;
    foreach (asum_in[b]) asum_in[b] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // XIDs
    for (int f = 0; f < 8; f++) begin
      upw(13'(1 << f), 3, 8'(f));
      upw(13'(1 << f), 3, 8'h00);
    end
    // transfer RAMs (all Dataout FPGAs alike): ms 0 everything, ms 2-7 nothing
    upw(13'hFF, 0, 8'h00);
    for (int i = 0; i < 16; i++) upw(13'hFF, 4, (i < 4) ? 8'h00 : 8'hFF);
    for (int i = 0; i < 16; i++) upw(13'hFF, 4, (i < 8) ? 8'h00 : 8'hFF);
    for (int i = 0; i < 96; i++) upw(13'hFF, 4, 8'h00);
    // control words of Dataout 5, bank 3, shifted twice
    upw(13'h20, 9, 8'h33);
    upw(13'h20, 0, 8'h00);
    for (int a = 0; a < 128; a++) begin img[a] = 8'($urandom); upw(13'h20, 7, img[a]); end
    upw(13'h20, 17, 8'h00);
    repeat (2100) @(negedge clk);
    upw(13'h20, 17, 8'h00);
    repeat (2100) @(negedge clk);
    upr(13'h20, 10, d);
    chk(d == 8'h01, "shift done");
    upw(13'h20, 0, 8'h00);
    begin
      int bad = 0;
      for (int a = 0; a < 128; a++) begin upr(13'h20, 8, d); if (d != img[a]) bad++; end
      for (int i = 0; i < 1024; i++) if (chain5[1023 - i] != img[i / 8][i % 8]) bad++;
      chk(bad == 0, $sformatf("control words: %0d mismatches", bad));
      if (bad == 0) mech[M_CWSHIFT]++;
    end
    // masks on buses 3, 8 and 13 with the matching offsets
    begin
      int nm [2];
      logic [7:0] m3, m8, m13;
      m3 = 8'($urandom); m8 = 8'($urandom); m13 = 8'($urandom);
      sums_on = 0;
      upw(13'h0100, 9, m3); upw(13'h0400, 7, m8); upw(13'h1000, 7, m13);
      mk[3] = m3; mk[8] = m8; mk[13] = m13;
      for (int m = 0; m < 2; m++) begin
        nm[m] = 12 - $countones(m3[4*m +: 4]) - $countones(m8[4*m +: 4]) - $countones(m13[4*m +: 4]);
        upw(13'h0400, 2 + m, 8'(-(nm[m] / 2)));
        off[m] = -(nm[m] / 2);
      end
      quiet = 20;
      masked = 1;
      sums_on = 1;
    end
    // 16 ms pulse, then strobe requests on every Dataout FPGA
    @(negedge clk) ms16 = 1;
    @(negedge clk) ms16 = 0;
    upw(13'hFF, 11, 8'h28);
    for (int m = 0; m <= 8; m++) begin
      wait (dut.g_do[0].u_do.msstb);
      repeat (3) @(negedge clk);
    end
    repeat (60000) @(negedge clk);
    for (int m = 0; m <= 8; m++) check_ms(m);
    for (int f = 0; f < 8; f++) chk(n_stb[f] == 1 && stb_ok[f] == 1, $sformatf("Dataout %0d strobes %0d", f, n_stb[f]));
    if (n_stb[0] == 1 && stb_ok[0] == 1) mech[M_CWSTB]++;
    // millisecond test bus of Dataout 0
    chk(test_msec == 0, "test bus idle without XID7");
    upw(13'h01, 3, 8'h80); upw(13'h01, 3, 8'h00);
    repeat (3) @(negedge clk);
    chk(test_msec == dut.msec[0] && test_msec != 0, $sformatf("test bus shows MSEC %0d", test_msec));
    if (test_msec == dut.msec[0] && test_msec != 0) mech[M_TMSEC]++;
    // random output of the middle Analog Sum FPGA
    sums_on = 0;
    upw(13'h0400, 1, 8'h84);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      w[i % 3] = {asum_m1, asum_m0};
      if (i >= 2) begin
        chk(w[i % 3] == 16'(corr_pkg::lfsr_step16({w[(i + 1) % 3], w[(i + 2) % 3]})), "random analog output");
        mech[M_RNDOUT]++;
      end
      @(negedge clk);
    end
    // random data on all buses, checked by the second FPGA's stream checker
    upw(13'h1F00, 1, 8'h06);
    @(negedge clk) ms16 = 1;
    @(negedge clk) ms16 = 0;
    repeat (4) @(negedge clk);
    upw(13'h0200, 4, 8'h02);
    repeat (300) @(negedge clk);
    upr(13'h0200, 24, lo); upr(13'h0200, 25, hi);
    chk({hi, lo} == 0, $sformatf("stream checker: %0d errors", {hi, lo}));
    if ({hi, lo} == 0) mech[M_PNCHK]++;
    foreach (mech[i]) begin
      chk(mech[i] > 0, $sformatf("mechanism never seen: %s", mname[i]));
      $display("mechanism %-30s %0d", mname[i], mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
