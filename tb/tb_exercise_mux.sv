// tb_exercise_mux: the exercise multiplexers at their default size (1,435
// inputs: 180 ROM columns, 487 constant-1, 38 constant-0, 730 unmuxed).
// Outside exercise mode the inputs pass; in exercise mode each class must
// take its ROM bit, its constant or its functional input. Also counts the
// inputs that change with the mode, which must equal the 705 multiplexers.
module tb_exercise_mux;
  localparam int IN_W = 1435, ROM_W = 180, N1 = 487, N0 = 38;
  logic exercise_mode;
  logic [IN_W-1:0]  func_in, mux_out, exp_o;
  logic [ROM_W-1:0] rom_in;
  int checks = 0, failures = 0;

  exercise_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int muxed;
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < IN_W; w++) func_in[w] = 1'($urandom);
      for (int w = 0; w < ROM_W; w++) rom_in[w] = 1'($urandom);
      exercise_mode = 1'b0;
      #1;
      checks++;
      if (mux_out !== func_in) failures++;
      exercise_mode = 1'b1;
      #1;
      for (int c = 0; c < IN_W; c++) begin
        if (c < ROM_W)                exp_o[c] = rom_in[c];
        else if (c < ROM_W + N1)      exp_o[c] = 1'b1;
        else if (c < ROM_W + N1 + N0) exp_o[c] = 1'b0;
        else                          exp_o[c] = func_in[c];
      end
      checks++;
      if (mux_out !== exp_o) begin
        failures++;
        if (failures < 5) $display("t=%0d exercise output wrong", t);
      end
    end
    // number of inputs that the mode can change: invert func_in and rom_in
    muxed = 0;
    exercise_mode = 1'b1;
    func_in = '0; rom_in = '1; #1;
    exp_o = mux_out;
    func_in = '1; rom_in = '0; #1;
    for (int c = 0; c < IN_W; c++) muxed += int'(exp_o[c] != 1'b0 || mux_out[c] != 1'b1);
    checks++;
    if (muxed != ROM_W + N1 + N0) begin
      failures++;
      $display("muxed inputs %0d, expected %0d", muxed, ROM_W + N1 + N0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
