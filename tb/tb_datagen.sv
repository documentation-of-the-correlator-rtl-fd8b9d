// tb_datagen: loads a seed as four bytes (least significant first), pulses
// init and compares 200 output words with a bit-serial model of the LFSR
// x^32+x^22+x^2+x+1 stepped 16 times per word.
module tb_datagen;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, seed_we, init;
  logic [7:0] seed_byte;
  logic [15:0] rnd;
  logic [31:0] seed;
  datagen dut (.clk, .rst, .seed_we, .seed_byte, .init, .rnd, .seed);
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
  logic [31:0] m;
  initial begin
    logic [31:0] sv;
    sv = 32'hDEAD_BEEF;
    rst = 1; seed_we = 0; init = 0; seed_byte = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); seed_we = 1; seed_byte = sv[8*b +: 8];
    end
    @(negedge clk); seed_we = 0;
    chk(seed === sv, $sformatf("seed %h", seed));
    init = 1;
    @(negedge clk); init = 0;
    m = sv;
    chk(rnd === m[15:0], "first word after init");
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 16; k++) m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]};
      @(negedge clk);
      chk(rnd === m[15:0], $sformatf("word %0d got %h exp %h", i, rnd, m[15:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
