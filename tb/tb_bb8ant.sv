// tb_bb8ant: random test of the per-memory split and summing of a MAIN/AUX
// bus pair: M0 is bits 7:0 and M1 bits 15:8 of each bus, one clock latency.
module tb_bb8ant;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [15:0] mb, ab;
  logic [7:0] mm, am;
  logic signed [4:0] m0, m1;
  bb8ant dut (.clk, .main_bus(mb), .aux_bus(ab), .main_mask(mm), .aux_mask(am), .m0_sum(m0), .m1_sum(m1));
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
    int e0, e1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {mb, ab} = $urandom;
      {mm, am} = 16'($urandom);
      if (i < 10) {mm, am} = '1;
      e0 = (ref4(mb[7:0], mm[3:0]) + ref4(ab[7:0], am[3:0])) / 2;
      e1 = (ref4(mb[15:8], mm[7:4]) + ref4(ab[15:8], am[7:4])) / 2;
      @(posedge clk); #1;
      checks += 2;
      if (m0 !== 5'(e0)) begin failures++; $display("FAIL m0 %0d exp %0d", m0, e0); end
      if (m1 !== 5'(e1)) begin failures++; $display("FAIL m1 %0d exp %0d", m1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
