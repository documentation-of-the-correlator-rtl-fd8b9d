// tb_two_bit_adder: exhaustive test of the 2-bit antenna adder.  Every pair
// of samples and every mask setting is applied; the expected halved sum is
// computed from the weighting table 01=+3, 00=+1, 11=-1, 10=-3.
module tb_two_bit_adder;
  int checks = 0, failures = 0;
  logic [1:0] a, b, m;
  logic [2:0] s;
  two_bit_adder dut (.ant_a(a), .ant_b(b), .mask(m), .sum(s));
  function automatic int wt(logic [1:0] v);
    int t [4] = '{1, 3, -3, -1};   // index = value: 00, 01, 10, 11
    return t[v];
  endfunction
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      int exp_v;
      {m, a, b} = 6'(i);
      #1;
      exp_v = (wt(m[0] ? a : 2'b00) + wt(m[1] ? b : 2'b00)) / 2;
      checks++;
      if ($signed(s) !== 3'(exp_v)) begin
        failures++;
        $display("FAIL a=%b b=%b m=%b got %0d exp %0d", a, b, m, $signed(s), exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
