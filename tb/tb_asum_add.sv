// tb_asum_add: random signed additions through the registered and the
// combinational form of the partial-sum adder, with their latencies.
module tb_asum_add;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [5:0] a, b;
  logic signed [6:0] sr, sc;
  asum_add #(.WA(6), .WB(6), .WO(7), .REG(1'b1)) dut_r (.clk, .a, .b, .sum(sr));
  asum_add #(.WA(6), .WB(6), .WO(7), .REG(1'b0)) dut_c (.clk, .a, .b, .sum(sc));
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
    int e;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a = 6'($urandom); b = 6'($urandom);
      e = int'(a) + int'(b);
      #1;
      checks++;
      if (sc !== 7'(e)) begin failures++; $display("FAIL comb %0d exp %0d", sc, e); end
      @(posedge clk); #1;
      checks++;
      if (sr !== 7'(e)) begin failures++; $display("FAIL reg %0d exp %0d", sr, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
