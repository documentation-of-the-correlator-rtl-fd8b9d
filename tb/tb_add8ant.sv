// tb_add8ant: random test of the 8-antenna adder (MAIN + AUX) and of its
// MAIN-only variant, including the one-clock latency.
module tb_add8ant;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] ma, aa;
  logic [3:0] mm, am;
  logic signed [4:0] s8, s4;
  add8ant dut (.clk, .main_ants(ma), .aux_ants(aa), .main_mask(mm), .aux_mask(am), .sum(s8));
  add8ant #(.HAS_AUX(1'b0)) dut4 (.clk, .main_ants(ma), .aux_ants(aa), .main_mask(mm), .aux_mask(am), .sum(s4));
  function automatic int wt(logic [1:0] v);
    int t [4] = '{1, 3, -3, -1};
    return t[v];
  endfunction
  function automatic int ref4(logic [7:0] a, logic [3:0] m);
    int e = 0;
    for (int k = 0; k < 4; k++) e += wt(m[k] ? a[2*k +: 2] : 2'b00);
    return e;
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
    int e8, e4;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {ma, aa, mm, am} = {$urandom, $urandom};
      e8 = (ref4(ma, mm) + ref4(aa, am)) / 2;
      e4 = ref4(ma, mm) / 2;
      @(posedge clk); #1;
      checks += 2;
      if (s8 !== 5'(e8)) begin failures++; $display("FAIL s8 %0d exp %0d", s8, e8); end
      if (s4 !== 5'(e4)) begin failures++; $display("FAIL s4 %0d exp %0d", s4, e4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
