// tb_add_offset: the offset correction for masked antennas.  Builds the
// 64-antenna sum of random masked samples, the offset -(masked/2) as the
// microprocessor would compute it, and checks that the registered result
// equals the sum over the unmasked antennas alone (to within the half that
// truncation of an odd masked count leaves).
module tb_add_offset;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [7:0] sum, offset, q;
  add_offset dut (.clk, .sum, .offset, .q);
  function automatic int wt(logic [1:0] v);
    int t [4] = '{1, 3, -3, -1};
    return t[v];
  endfunction
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  initial begin
    for (int i = 0; i < 400; i++) begin
      int raw2, clean2, nmask, e;
      raw2 = 0; clean2 = 0; nmask = 0;
      for (int k = 0; k < 64; k++) begin
        logic [1:0] v; logic m;
        v = 2'($urandom); m = ($urandom % 4) != 0;
        raw2 += wt(m ? v : 2'b00);
        if (m) clean2 += wt(v); else nmask++;
      end
      @(negedge clk);
      sum = 8'(raw2 / 2);           // sum of halved pair sums is exact: raw2 even
      offset = 8'(-(nmask / 2));
      e = raw2 / 2 - nmask / 2;
      @(posedge clk); #1;
      checks++;
      if (q !== 8'(e)) begin failures++; $display("FAIL q=%0d exp %0d", q, e); end
      checks++;
      if (int'(q) * 2 - clean2 < 0 || int'(q) * 2 - clean2 > 1) begin
        failures++; $display("FAIL unmasked sum %0d vs %0d", q, clean2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
