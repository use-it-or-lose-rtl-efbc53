// tb_exercise_rom: reads all eight 180-bit words and compares them with the
// Walsh pattern computed here (bit j of word k = parity(k & (j mod 7 + 1))),
// one clock after the address; checks every column is 1 in exactly four
// words (duty cycle 1/2 when the vectors rotate).
module tb_exercise_rom;
  localparam int NV = 8, W = 180;
  logic clk = 0, rst_n = 0;
  logic [2:0] addr;
  logic [W-1:0] vec;
  logic [NV-1:0][W-1:0] seen;
  int checks = 0, failures = 0;

  exercise_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e;
    addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (vec !== '0) failures++;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk) addr = 3'(k);
      @(posedge clk); #1;
      for (int j = 0; j < W; j++) e[j] = ^(k & ((j % 7) + 1));
      checks++;
      seen[k] = vec;
      if (vec !== e) begin
        failures++;
        $display("word %0d wrong", k);
      end
    end
    for (int j = 0; j < W; j++) begin
      int ones;
      ones = 0;
      for (int k = 0; k < NV; k++) ones += int'(seen[k][j]);
      checks++;
      if (ones != NV / 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
