// tb_add4ant: random test of the 4-antenna adder against a reference sum of
// the weighted, masked samples divided by two.
module tb_add4ant;
  int checks = 0, failures = 0;
  logic [7:0] ants;
  logic [3:0] mask;
  logic signed [3:0] sum;
  add4ant dut (.ants, .mask, .sum);
  function automatic int wt(logic [1:0] v);
    int t [4] = '{1, 3, -3, -1};
    return t[v];
  endfunction
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4096; i++) begin
      int e;
      {mask, ants} = 12'(i);
      #1;
      e = 0;
      for (int k = 0; k < 4; k++) e += wt(mask[k] ? ants[2*k +: 2] : 2'b00);
      checks++;
      if (sum !== 4'(e / 2)) begin
        failures++;
        if (failures < 10) $display("FAIL ants=%h mask=%b got %0d exp %0d", ants, mask, sum, e / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
