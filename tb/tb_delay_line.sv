// tb_delay_line: random words through the 2-clock and 6-clock delay lines;
// each output is compared with the input of 2 and 6 clocks before.
module tb_delay_line;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] d, q2, q6;
  logic [5:0] hist [16];
  delay_line #(.W(6), .N(2)) dut2 (.clk, .d, .q(q2));
  delay_line #(.W(6), .N(6)) dut6 (.clk, .d, .q(q6));
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
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d = 6'($urandom);
      for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d;
      if (i >= 8) begin
        checks += 2;
        // at this point q shows what was sampled N edges ago: hist[N]
        if (q2 !== hist[2]) begin failures++; $display("FAIL q2 %h exp %h", q2, hist[2]); end
        if (q6 !== hist[6]) begin failures++; $display("FAIL q6 %h exp %h", q6, hist[6]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
