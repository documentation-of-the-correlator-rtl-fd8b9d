// tb_up_decode: write and read strobes for every select, UP_ADR clearing by
// a write to select 0 and advancing only on selects in the increment mask.
module tb_up_decode;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, cs, we, re;
  logic [4:0] sel;
  logic [31:0] wr_en, rd_en;
  logic [10:0] up_adr;
  up_decode #(.AW(11), .INC_MASK(32'h0000_0180)) dut (.clk, .rst, .cs, .we, .re, .sel, .wr_en, .rd_en, .up_adr);
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 5000) begin
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
    int exp_adr;
    rst = 1; cs = 0; we = 0; re = 0; sel = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 32; s++) begin
      sel = 5'(s); cs = 1; we = 1; #1;
      chk(wr_en == (32'd1 << s) && rd_en == 0, $sformatf("write strobe %0d", s));
      we = 0; re = 1; #1;
      chk(rd_en == (32'd1 << s) && wr_en == 0, $sformatf("read strobe %0d", s));
      cs = 0; #1;
      chk(rd_en == 0 && wr_en == 0, "no strobe without cs");
      re = 0;
      @(negedge clk);
    end
    sel = 0; cs = 1; we = 1;
    @(negedge clk) cs = 0; we = 0;
    chk(up_adr == 0, "cleared");
    exp_adr = 0;
    for (int i = 0; i < 100; i++) begin
      sel = 5'($urandom_range(5, 9)); cs = 1; we = $urandom % 2; re = !we;
      if (sel == 7 || sel == 8) exp_adr++;
      @(negedge clk);
      cs = 0; we = 0; re = 0;
      @(negedge clk);
      chk(up_adr == 11'(exp_adr), $sformatf("up_adr %0d exp %0d", up_adr, exp_adr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
