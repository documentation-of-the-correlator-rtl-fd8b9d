// tb_int_addr_mux: every intersection count, millisecond, FPGA id and mode.
// Expected coordinates are written from the intersection-map drawings:
// Timeslot 0 (full card) walks the diagonal S0-S3 FPGA 0 chip 0, S4-S7
// FPGA 0 chip 3, S8-S11 FPGA 1 chip 4, S12-S15 FPGA 1 chip 6, S16-S19 FPGA 6
// chip 0, S20-S23 FPGA 6 chip 3, S24-S27 FPGA 7 chip 4, S28-S31 FPGA 7
// chip 6, intersection 0, 5, 10, 15 within each chip; the partial card uses
// chips 0/1 of FPGAs 0-3 in groups of four; in Timeslot 1, T groups of 8 go
// to FPGAs 0-3 (+4 from millisecond 8), T groups of 4 alternate between the
// even/odd chip of the pair picked by ms/2, and the intersection is
// 8*(ms odd) + 4*(T >= 32) + T mod 4.
module tb_int_addr_mux;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [6:0] int_cnt;
  logic [3:0] msec, cnum;
  logic [2:0] xid, fpga, chip;
  logic partial, xadd0, rden, ts1, mine;
  logic [7:0] rdclken;
  int_addr_mux dut (.int_cnt, .msec, .xid, .partial, .xadd0, .rden, .fpga, .chip, .cnum, .ts1, .mine, .rdclken);
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
  int ts0_x [8] = '{0, 0, 1, 1, 6, 6, 7, 7};
  int ts0_c [8] = '{0, 3, 4, 6, 0, 3, 4, 6};
  initial begin
    for (int p = 0; p < 2; p++)
    for (int ms = 0; ms < 16; ms++)
    for (int n = 32; n < 128; n++) begin
      int ex, ec, en;
      int_cnt = 7'(n); msec = 4'(ms); partial = p[0]; xadd0 = 0; rden = 1;
      xid = 3'($urandom);
      if (n < 64) begin
        int s;
        s = n - 32;
        en = (s % 4) * 5;
        if (p == 0) begin ex = ts0_x[s / 4]; ec = ts0_c[s / 4]; end
        else begin ex = s / 8; ec = (s / 4) % 2; end
      end else begin
        int t;
        t = n - 64;
        ex = (t % 32) / 8 + (ms >= 8 ? 4 : 0);
        ec = ((ms / 2) % 4) * 2 + (t / 4) % 2;
        en = (ms % 2) * 8 + (t / 32) * 4 + t % 4;
      end
      #1;
      chk(fpga == 3'(ex) && chip == 3'(ec) && cnum == 4'(en) && ts1 == (n >= 64),
          $sformatf("p%0d ms%0d n%0d got x%0d c%0d i%0d exp x%0d c%0d i%0d", p, ms, n, fpga, chip, cnum, ex, ec, en));
      chk(mine == (xid == 3'(ex)), "mine");
      chk(rdclken == ((xid == 3'(ex)) ? (8'd1 << ec) : 8'd0), "rdclken one-hot");
      xadd0 = 1; #1;
      chk(fpga == 0 && mine == (xid == 0), "xadd0 forces FPGA 0");
      rden = 0; #1;
      chk(rdclken == 0, "no enable without rden");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
