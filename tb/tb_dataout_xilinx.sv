// tb_dataout_xilinx: one Dataout FPGA (XID = 1, full card) at the default
// size with the default program and transfer RAM (all Timeslot 1
// intersections), driven through its microprocessor port.  A model of the
// eight ASICs answers each RDCLKEN (from the fourth clock after it rises,
// for as long as it was high) with a word naming the chip, the
// intersection-in-chip and block it was given and its result count.  After one 16 ms pulse the testbench collects the bytes the
// FPGA puts on its output chain (pairs, low byte first) and checks, per
// millisecond, the exact word sequence against the intersection maps:
//   ms 0: TESTADR mode (XID7) -> {intersection, result 0..255} words;
//   ms 1: ASIC mode -> {1, chip, intersection-in-chip, block, result};
// 16 intersections x 256 words each.  It also checks that the chain input
// passes through when the FPGA is idle, a control-word write/shift/read-back
// through select 7/17/10/8 with a model ASIC chain, and the control-word
// strobe request at select 11 landing inside the blanking/dump-enable
// window of millisecond 0, and the millisecond test bus (MSEC with XID7).
module tb_dataout_xilinx;
  int checks = 0, failures = 0;
  logic clk = 0, clk90 = 0;
  always #5 clk = ~clk;
  initial begin #2.5; forever #5 clk90 = ~clk90; end
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 700000) begin
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
  logic up_cs = 0, up_we = 0, up_re = 0;
  logic [4:0] up_sel = 0;
  logic [7:0] up_wdata = 0, up_rdata;
  logic [15:0] asic_bot, asic_top;
  logic [7:0] rdclken, chain_in = 0, chain_out, lta_out;
  logic [3:0] asic_cnum, asic_blk, msec, test_msec;
  logic cw_clk, cw_data, cw_stb, blanking, dumpenbl, msstb, xfer_active;
  logic [1023:0] chain = '0;
  dataout_xilinx dut (.clk, .clk90, .rst, .ms16_in(ms16), .up_cs, .up_we, .up_re, .up_sel, .up_wdata,
    .up_rdata, .asic_bot, .asic_top, .rdclken, .asic_cnum, .asic_blk, .cw_clk, .cw_data, .cw_stb,
    .cw_ret_clk(cw_clk), .cw_ret_data(chain[1023]), .blanking, .dumpenbl, .chain_in, .chain_out,
    .lta_out, .msec, .test_msec, .msstb, .xfer_active);
  always @(posedge cw_clk) chain <= {chain[1022:0], cw_data};

  task automatic upw(int sel, logic [7:0] d);
    @(negedge clk);
    up_cs = 1; up_we = 1; up_sel = 5'(sel); up_wdata = d;
    @(negedge clk);
    up_cs = 0; up_we = 0;
  endtask
  task automatic upr(int sel, output logic [7:0] d);
    @(negedge clk);
    up_cs = 1; up_re = 1; up_sel = 5'(sel);
    @(negedge clk);
    up_cs = 0; up_re = 0;
    d = up_rdata;
  endtask

  // ASIC model: what each chip was told, AD + 1 clocks after its RDCLKEN
  localparam int AD = 3;
  logic [7:0] rq [AD+1];
  logic [3:0] cq [AD+1], bq [AD+1];
  logic [4:0] kq [AD+1][8];
  logic [4:0] kcnt [8];
  initial foreach (kcnt[c]) kcnt[c] = 0;
  always @(posedge clk) begin
    for (int j = AD; j > 0; j--) begin rq[j] <= rq[j-1]; cq[j] <= cq[j-1]; bq[j] <= bq[j-1]; kq[j] <= kq[j-1]; end
    rq[0] <= rdclken; cq[0] <= asic_cnum; bq[0] <= asic_blk; kq[0] <= kcnt;
    for (int c = 0; c < 8; c++) if (rdclken[c]) kcnt[c] <= kcnt[c] + 1;
  end
  always_comb begin
    asic_bot = 16'hDEAD;
    asic_top = 16'hBEEF;
    for (int c = 0; c < 8; c++)
      if (rq[AD][c]) begin
        if (c < 4) asic_bot = {1'b1, 3'(c), cq[AD], bq[AD], kq[AD][c][4:1]};
        else       asic_top = {1'b1, 3'(c), cq[AD], bq[AD], kq[AD][c][4:1]};
      end
  end

  // collect the bytes the FPGA itself drives (valid read slots)
  logic [7:0] bytes_q [$];
  int byte_ms [$];
  bit valid_d = 0;
  always @(posedge clk) begin
    if (valid_d) begin
      bytes_q.push_back(chain_out);
      byte_ms.push_back(msec);
    end
    valid_d <= dut.slot.valid;
  end

  // expected word sequence of millisecond m for FPGA id
  function automatic void expect_ms(int m, int id, bit testadr, ref logic [15:0] w [$]);
    for (int t = 0; t < 64; t++) begin
      int x, ch, cn;
      x  = (t % 32) / 8 + (m >= 8 ? 4 : 0);
      ch = ((m / 2) % 4) * 2 + (t / 4) % 2;
      cn = (m % 2) * 8 + (t / 32) * 4 + t % 4;
      if (x == id)
        for (int r = 0; r < 256; r++)
          w.push_back(testadr ? {8'(8'hC0 + t), 8'(r)} : {1'b1, 3'(ch), 4'(cn), 4'(r / 16), 4'(r % 16)});
    end
  endfunction

  task automatic check_ms(int m, bit testadr);
    logic [15:0] w [$];
    logic [7:0] b [$];
    expect_ms(m, 1, testadr, w);
    foreach (bytes_q[i]) if (byte_ms[i] == m) b.push_back(bytes_q[i]);
    chk(b.size() == 2 * w.size(), $sformatf("ms %0d: %0d bytes, expected %0d", m, b.size(), 2 * w.size()));
    for (int i = 0; i < w.size() && 2 * i + 1 < b.size(); i++)
      chk({b[2*i+1], b[2*i]} == w[i], $sformatf("ms %0d word %0d: %h expected %h", m, i, {b[2*i+1], b[2*i]}, w[i]));
  endtask

  int n_stb = 0, stb_ms = -1;
  bit stb_in_window = 0;
  logic stb_d = 0;
  always @(posedge clk) begin
    stb_d <= cw_stb;
    if (!rst && cw_stb && !stb_d) begin
      n_stb++; stb_ms = msec; stb_in_window = blanking && dumpenbl;
    end
  end

  initial begin
    logic [7:0] d;
    logic [7:0] img [128];
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // XID = 0x0081: FPGA 1, TESTADR output
    upw(3, 8'h81); upw(3, 8'h00);
    // control words: bank 2 written and read back, then shifted
    upw(9, 8'h22);
    upw(0, 8'h00);
    for (int a = 0; a < 128; a++) begin img[a] = 8'($urandom); upw(7, img[a]); end
    upw(0, 8'h00);
    for (int a = 0; a < 8; a++) begin upr(7, d); chk(d == img[a], "control-word byte read-back"); end
    upw(17, 8'h00);
    upr(10, d);
    chk(d[0] == 0, "shift busy");
    repeat (2100) @(negedge clk);
    upr(10, d);
    chk(d[0] == 1, "shift done");
    for (int i = 0; i < 1024; i++) chk(chain[1023 - i] == img[i / 8][i % 8], "control word in the ASIC chain");
    upw(17, 8'h00);                   // shift again: read-back = first words
    repeat (2100) @(negedge clk);
    upw(0, 8'h00);
    for (int a = 0; a < 128; a++) begin upr(8, d); chk(d == img[a], $sformatf("chain read-back byte %0d", a)); end
    // chain input passes through while idle
    for (int i = 0; i < 50; i++) begin
      chain_in = 8'($urandom);
      @(negedge clk);
      chk(chain_out == chain_in, "chain pass-through");
    end
    chain_in = 0;
    // 16 ms pulse, strobe request armed for the first blanking window
    @(negedge clk) ms16 = 1;
    @(negedge clk) ms16 = 0;
    upw(11, 8'h28);
    // millisecond 0 runs with TESTADR; switch to ASIC data during its HOLD
    wait (msstb);
    repeat (110000) @(negedge clk);
    chk(msec == 0, "still in ms 0");
    chk(test_msec == msec, "MSEC on the test bus with XID7");
    upw(3, 8'h01); upw(3, 8'h00);
    wait (msstb);
    repeat (3) @(negedge clk);
    wait (msstb);
    repeat (10) @(negedge clk);
    chk(test_msec == 0, "test bus zero without XID7");
    check_ms(0, 1);
    check_ms(1, 0);
    chk(n_stb == 1 && stb_ms == 0 && stb_in_window, $sformatf("control-word strobe: %0d in ms %0d", n_stb, stb_ms));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
