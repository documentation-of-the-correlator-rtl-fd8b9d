// tb_asummid: middle Analog Sum FPGA with two random antenna buses and
// random 28-antenna sums from both neighbours.  Every clock it checks the
// bus pass-through and that the 64-antenna sums equal the local 8-antenna
// sums from ten clocks earlier plus both incoming sums from three clocks
// earlier plus the offsets, and that the output bytes follow with the
// OUTCTRL delay.  Masks and offsets are then written, the whole-clock output
// delays 0..3 are stepped through, the random-output mode is checked
// against the generator recurrence, and the common checks run on bus 0.
module tb_asummid;
  localparam int NB = 2;
  int checks = 0, failures = 0;
  logic clk = 0, clk90 = 0;
  always #5 clk = ~clk;
  initial begin #2.5; forever #5 clk90 = ~clk90; end
  logic rst, ms16 = 0;
  logic signed [6:0] l0, l1, r0, r1;
  logic signed [7:0] s0, s1;
  logic [7:0] o0, o1;
  int ih [64][2];
  logic [7:0] sh [64][2];
  int off [2] = '{0, 0};
  int idly = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 80000) begin
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
  // 2-bit sample weights 00=+1, 01=+3, 10=-3, 11=-1; masked antennas read 00
  function automatic int wt(logic [1:0] v);
    int t [4] = '{1, 3, -3, -1};
    return t[v];
  endfunction
  function automatic int ref4(logic [7:0] a, logic [3:0] m);
    int e = 0;
    for (int k = 0; k < 4; k++) e += wt(m[k] ? a[2*k +: 2] : 2'b00);
    return e;
  endfunction
  // microprocessor byte write and read, one-clock strobes
  logic up_cs = 0, up_we = 0, up_re = 0;
  logic [4:0] up_sel = 0;
  logic [7:0] up_wdata = 0, up_rdata;
  int quiet = 0;                      // clocks left without output checks
  task automatic upw(int sel, logic [7:0] d);
    @(negedge clk);
    up_cs = 1; up_we = 1; up_sel = 5'(sel); up_wdata = d;
    @(negedge clk);
    up_cs = 0; up_we = 0;
    quiet = 14;
  endtask
  task automatic upr(int sel, output logic [7:0] d);
    @(negedge clk);
    up_cs = 1; up_re = 1; up_sel = 5'(sel);
    @(negedge clk);
    up_cs = 0; up_re = 0;
    d = up_rdata;
    @(negedge clk);
  endtask
  // history of the bus inputs, one entry per clock
  localparam int H = 64;
  logic [15:0] hist [H][NB];
  logic [15:0] bus_in [NB], bus_out [NB];
  logic [7:0] mk [NB];
  bit sums_on = 1;
  function automatic logic [15:0] hb(int back, int k);
    return hist[(cyc - back + 16 * H) % H][k];
  endfunction
  asummid dut (.clk, .clk90, .rst, .ms16, .up_cs, .up_we, .up_re, .up_sel, .up_wdata, .up_rdata,
               .bus_in, .bus_out, .l_m0(l0), .l_m1(l1), .r_m0(r0), .r_m1(r1),
               .m0_out(o0), .m1_out(o1), .m0_sum64(s0), .m1_sum64(s1));
  function automatic int ref64(int m);
    int e = 0;
    for (int k = 0; k < NB; k++) e += ref4(hb(10, k)[8*m +: 8], mk[k][4*m +: 4]);
    return e / 2 + ih[(cyc - 3 + 16 * H) % H][m] + off[m];
  endfunction
  always @(negedge clk) if (!rst) begin
    sh[cyc % H][0] = s0;
    sh[cyc % H][1] = s1;
    if (quiet > 0) quiet--;
    else if (sums_on) begin
      for (int k = 0; k < NB; k++) chk(bus_out[k] == hb(1, k), "bus pass-through");
      chk(s0 == 8'(ref64(0)), $sformatf("M0 sum %0d expected %0d", s0, ref64(0)));
      chk(s1 == 8'(ref64(1)), $sformatf("M1 sum %0d expected %0d", s1, ref64(1)));
      chk(o0 == sh[(cyc - idly + H) % H][0] && o1 == sh[(cyc - idly + H) % H][1],
          $sformatf("output bytes, delay %0d", idly));
    end
    for (int k = 0; k < NB; k++) begin
      bus_in[k] = 16'($urandom);
      hist[cyc % H][k] = bus_in[k];
    end
    // each neighbour's 28-antenna sum lies within -42..42
    {l0, r0} = {7'($urandom_range(0, 84) - 42), 7'($urandom_range(0, 84) - 42)};
    {l1, r1} = {7'($urandom_range(0, 84) - 42), 7'($urandom_range(0, 84) - 42)};
    ih[cyc % H][0] = l0 + r0;
    ih[cyc % H][1] = l1 + r1;
  end
  // generic checks of one FPGA: bus pass-through, logic analyzer, test
  // multiplexer modes and the random-stream checker
  task automatic common_checks(int lab);
    logic [7:0] lo, hi;
    logic [15:0] snap [300];
    int c0, off;
    sums_on = 0;
    // logic analyzer on bus lab: clear, record what the bus carried
    upw(5, 8'h00);
    c0 = cyc;
    for (int i = 0; i < 300; i++) begin
      snap[i] = bus_out[lab];
      @(negedge clk);
    end
    upw(0, 8'h00);                    // UP_ADR = 0
    off = -1;
    for (int a = 0; a < 256; a++) begin
      upr(16 + 2 * lab, lo);
      upr(17 + 2 * lab, hi);
      if (a == 0)
        for (int o = 0; o < 4; o++) if (snap[o] == {hi, lo}) off = o;
      if (a == 0) chk(off >= 0, "logic analyzer starts at the clear");
      if (off >= 0) chk({hi, lo} == snap[off + a], $sformatf("logic analyzer word %0d", a));
    end
    // all-ones and count modes
    upw(1, 8'h07);
    repeat (3) @(negedge clk);
    for (int k = 0; k < NB; k++) chk(bus_out[k] == 16'hFFFF, "all-ones mode");
    upw(1, 8'h00);
    repeat (3) @(negedge clk);
    for (int k = 0; k < NB; k++) chk(bus_out[k] == 16'h0000, "zero mode");
    upw(1, 8'h05);
    @(negedge clk) ms16 = 1;
    @(negedge clk) ms16 = 0;
    @(negedge clk);
    c0 = int'(bus_out[0][7:0]);
    chk(c0 <= 3, "count restarted by the 16 ms pulse");
    for (int i = 0; i < 300; i++) begin
      chk(bus_out[0] == {8'(c0 + i), 8'(c0 + i)}, $sformatf("count mode step %0d: %h", i, bus_out[0]));
      @(negedge clk);
    end
    // random mode: the stream checker must see no errors, then errors on data
    upw(12, 8'h5A); upw(12, 8'hC3); upw(12, 8'h11); upw(12, 8'h96);
    upw(1, 8'h06);
    @(negedge clk) ms16 = 1;
    @(negedge clk) ms16 = 0;
    repeat (4) @(negedge clk);
    upw(4, 8'(NB - 1));
    repeat (500) @(negedge clk);
    upr(24, lo); upr(25, hi);
    chk({hi, lo} == 16'h0000, $sformatf("random stream: %0d errors", {hi, lo}));
    upw(1, 8'h04);
    repeat (100) @(negedge clk);
    upr(24, lo); upr(25, hi);
    chk({hi, lo} > 16'd50, $sformatf("data stream: %0d errors", {hi, lo}));
    sums_on = 1;
    quiet = 14;
  endtask
  initial begin
    logic [15:0] w [3];
    rst = 1;
    foreach (mk[k]) mk[k] = 8'hFF;
    foreach (bus_in[k]) bus_in[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    quiet = 14;
    repeat (1000) @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      int nm [2];
      for (int k = 0; k < NB; k++) begin
        logic [7:0] m;
        m = 8'($urandom);
        upw(6 + k, m);
        mk[k] = m;
      end
      // offset = -(masked antennas / 2) per memory
      for (int m = 0; m < 2; m++) begin
        nm[m] = 0;
        for (int k = 0; k < NB; k++) nm[m] += 4 - $countones(mk[k][4*m +: 4]);
        upw(2 + m, 8'(-(nm[m] / 2)));
        off[m] = -(nm[m] / 2);
      end
      repeat (500) @(negedge clk);
    end
    // whole-clock output delays: OUTCTRL[3:2] = [7:6] = 3 - delay
    for (int d = 0; d < 4; d++) begin
      upw(14, {2'(3 - d), 2'b00, 2'(3 - d), 2'b00});
      idly = d;
      repeat (300) @(negedge clk);
    end
    upw(14, 8'hCC);
    idly = 0;
    // random output mode
    sums_on = 0;
    upw(1, 8'h84);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      w[i % 3] = {o1, o0};
      if (i >= 2) chk(w[i % 3] == 16'(corr_pkg::lfsr_step16({w[(i + 1) % 3], w[(i + 2) % 3]})),
                      "random output follows the generator");
      @(negedge clk);
    end
    upw(1, 8'h04);
    sums_on = 1;
    repeat (100) @(negedge clk);
    common_checks(0);
    repeat (200) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
