// tb_do_sequencer: runs the default program for four milliseconds with a
// random transfer pattern per intersection (a new one each millisecond) and
// checks, per millisecond: 96 intersections (A0..FF) tested in order, a
// skipped intersection lasting 32 instruction cycles, a transferred one
// giving 256 RDCLKENBLs in 16 bursts of 16 consecutive cycles spaced 24
// cycles apart, nothing after the last intersection until the next msstb
// (HOLD).  Then a small program written through the byte port at 0x20 is
// selected with UPADDRESS and must run once per msstb.
module tb_do_sequencer;
  import corr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, ce, msstb, transfer, pw_we, rdclkenbl, ldpac, progce, pausing;
  logic [7:0] upaddress, pc, int_cnt, sel_cnt, res_cnt, pw_data;
  logic [8:0] pw_addr;
  logic [15:0] progwrd;
  do_sequencer dut (.clk, .rst, .ce, .msstb, .upaddress, .transfer, .pw_we, .pw_addr, .pw_data,
    .pc, .progwrd, .int_cnt, .sel_cnt, .res_cnt, .rdclkenbl, .ldpac, .progce, .pausing);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 400000) begin
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
  localparam int MS = 20000;   // instruction cycles per test millisecond
  logic pat [256];
  assign transfer = pat[int_cnt];
  int ce_cnt = 0;
  always @(posedge clk) ce <= rst ? 1'b0 : ~ce;
  always @(posedge clk) if (ce) ce_cnt++;
  // per-millisecond bookkeeping, sampled on instruction cycles
  int n_int, last_x, last_int, n_rd, burst, last_burst, n_after, n_rd_ms;
  bit seen_last, user = 0;
  always @(posedge clk) if (!rst && ce) begin
    if (msstb) begin
      n_int = 0; n_rd = 0; burst = 0; last_burst = -100; seen_last = 0; n_after = 0; n_rd_ms = 0;
      last_x = ce_cnt; last_int = -1;
    end else begin
      if (progwrd[I_JUMPXFER]) begin
        if (last_int >= 0) begin
          if (pat[last_int]) chk(n_rd == 256, $sformatf("int %0h gave %0d rdclkenbl", last_int, n_rd));
          else begin
            chk(n_rd == 0, "skipped int reads nothing");
            chk(ce_cnt - last_x == 32, $sformatf("skip lasted %0d cycles", ce_cnt - last_x));
          end
        end
        chk(int_cnt == 8'(8'hA0 + n_int), $sformatf("intersection %0h expected %0h", int_cnt, 8'hA0 + n_int));
        n_int++; last_int = int_cnt; last_x = ce_cnt; n_rd = 0;
      end
      if (rdclkenbl) begin
        n_rd++; n_rd_ms++;
        if (burst == 0) begin
          if (n_rd > 1) chk(ce_cnt - last_burst == 24, $sformatf("burst spacing %0d", ce_cnt - last_burst));
          last_burst = ce_cnt;
        end
        burst++;
      end else if (burst != 0) begin
        if (!user) chk(burst == 16, $sformatf("burst of %0d", burst));
        burst = 0;
      end
      if (progwrd[I_LOOPINT] && int_cnt == 8'hFF) seen_last = 1;
      else if (seen_last && progwrd != 16'h0040 && progwrd != 16'h0000) n_after++;
    end
  end
  task automatic end_ms(int nx);
    // close the last intersection and check the millisecond totals
    chk(n_int == 96, $sformatf("%0d intersections", n_int));
    chk(seen_last && n_after == 0, "HOLD after the last intersection");
    chk(n_rd_ms == 256 * nx, $sformatf("%0d rdclkenbl, expected %0d", n_rd_ms, 256 * nx));
    chk(progwrd == 16'h0040 && (pc == 8'h08 || pc == 8'h13), "holding at 0x08 or 0x13");
  endtask
  task automatic pulse_ms();
    @(negedge clk); while (!ce) @(negedge clk);
    msstb = 1;
    @(negedge clk); msstb = 0;
  endtask
  initial begin
    int nx;
    rst = 1; msstb = 0; upaddress = 0; pw_we = 0; pw_addr = 0; pw_data = 0;
    foreach (pat[i]) pat[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(negedge clk);
    chk(pc == 0 && progwrd == 16'h0040 && !rdclkenbl, "idle until the first msstb");
    for (int m = 0; m < 4; m++) begin
      nx = 0;
      foreach (pat[i]) begin
        pat[i] = (m == 3) ? (i >= 8'hE0) : $urandom_range(0, 3) == 0;
        if (i >= 8'hA0 && pat[i]) nx++;
      end
      pulse_ms();
      repeat (2 * MS) @(negedge clk);
      end_ms(nx);
    end
    // user program at 0x20: RDCLKENBL, HOLD, HOLD
    for (int k = 0; k < 6; k++) begin
      pw_we = 1; pw_addr = 9'(2 * 8'h20 + k);
      pw_data = (k == 1) ? 8'h40 : (k == 2 || k == 4) ? 8'h40 : 8'h00;
      @(negedge clk);
    end
    pw_we = 0; upaddress = 8'h20; user = 1;
    for (int m = 0; m < 3; m++) begin
      pulse_ms();
      repeat (200) @(negedge clk);
      chk(n_rd_ms == 1 && pc == 8'h22, $sformatf("user program: %0d rdclkenbl, pc %0h", n_rd_ms, pc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
