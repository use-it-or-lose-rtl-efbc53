// tb_exercise_logic: the exercise subsystem at the document's sizes (1,435
// inputs, 8 x 180 ROM, 487 ones, 38 zeros, 730 unmuxed, 16 quiet cycles,
// 2,048-cycle rotation). Checks pass-through and out_en while busy, entry
// into exercise mode exactly 16 cycles after the router goes quiet, the
// value of every input class for vectors 0, 1 and 2 (ROM columns against
// parity(k & (j mod 7 + 1)) computed here), rotation after 2,048 exercise
// cycles, and immediate return to pass-through when busy rises.
module tb_exercise_logic;
  localparam int IN_W = 1435, ROM_W = 180, N1 = 487, N0 = 38;
  logic clk = 0, rst_n = 0, busy;
  logic [IN_W-1:0] func_in, mux_out;
  logic out_en, exercise_mode, toggle;
  logic [2:0] vec_idx;
  int checks = 0, failures = 0;

  exercise_logic dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [IN_W-1:0] expected(int k, logic [IN_W-1:0] f);
    logic [IN_W-1:0] e;
    for (int c = 0; c < IN_W; c++)
      if (c < ROM_W)                e[c] = ^(k & ((c % 7) + 1));
      else if (c < ROM_W + N1)      e[c] = 1'b1;
      else if (c < ROM_W + N1 + N0) e[c] = 1'b0;
      else                          e[c] = f[c];
    return e;
  endfunction

  task automatic new_func();
    for (int c = 0; c < IN_W; c++) func_in[c] = 1'($urandom);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    busy = 1; new_func();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk); new_func(); #1;
      check(mux_out == func_in && out_en && !exercise_mode, "pass-through while busy");
    end
    @(negedge clk) busy = 0;
    n = 0;
    while (!exercise_mode && n < 100) begin @(posedge clk); #1 n++; end
    check(n == 16, $sformatf("exercise mode after %0d quiet cycles, expected 16", n));
    check(!out_en, "following flip-flops disabled");
    for (int k = 0; k < 3; k++) begin
      if (k > 0) @(posedge clk);   // the ROM word follows the index one cycle later
      @(negedge clk); new_func(); #1;
      check(mux_out == expected(k, func_in), $sformatf("vector %0d applied", k));
      check(int'(vec_idx) == k, "vector index");
      // stay until the rotation
      n = 0;
      while (!toggle && n < 5000) begin @(posedge clk); #1 n++; end
      check(n == ((k == 0) ? 2048 - 1 : 2048 - 2), $sformatf("rotation after %0d cycles", n));
      @(posedge clk); #1;
    end
    @(negedge clk) busy = 1;
    @(posedge clk); #1;
    check(!exercise_mode && out_en && mux_out == func_in, "pass-through at the edge after busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
