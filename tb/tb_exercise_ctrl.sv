// tb_exercise_ctrl: the exercise-mode controller at its default settings
// (16 quiet cycles, 2,048-cycle rotation, 8 vectors). A random busy pattern
// with short and long idle gaps is applied; after every clock edge the mode
// must equal "the last 16 sampled cycles were all quiet" and the vector index
// must equal (exercise cycles so far / 2048) mod 8. Also checks that the
// rotation counter survives interruptions and that all 8 vectors are used.
module tb_exercise_ctrl;
  logic clk = 0, rst_n = 0, busy;
  logic exercise_mode, toggle;
  logic [2:0] vec_idx;
  int checks = 0, failures = 0;
  int quiet_run, ex_cycles, toggles, entries, interrupted;
  logic [7:0] vec_seen;

  exercise_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_mode;
    busy = 1'b1;
    quiet_run = 0; ex_cycles = 0; toggles = 0; entries = 0; interrupted = 0;
    vec_seen = '0; prev_mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60000; t++) begin
      @(negedge clk);
      // long quiet stretches broken by bursts of activity
      if ((t % 5000) < 40) busy = ($urandom % 3) == 0;
      else                 busy = (t % 5000) == 3000;
      @(posedge clk);
      if (exercise_mode) ex_cycles++;
      if (toggle) toggles++;
      quiet_run = busy ? 0 : quiet_run + 1;
      #1;
      checks++;
      if (exercise_mode !== (quiet_run >= 16)) begin
        failures++;
        if (failures < 10) $display("t=%0d mode=%b quiet_run=%0d", t, exercise_mode, quiet_run);
      end
      checks++;
      if (int'(vec_idx) != (ex_cycles / 2048) % 8) begin
        failures++;
        if (failures < 10) $display("t=%0d vec_idx=%0d ex_cycles=%0d", t, vec_idx, ex_cycles);
      end
      if (exercise_mode && !prev_mode) entries++;
      if (!exercise_mode && prev_mode && (ex_cycles % 2048) != 0) interrupted++;
      prev_mode = exercise_mode;
      vec_seen[vec_idx] = 1'b1;
    end
    checks++;
    if (toggles != ex_cycles / 2048) failures++;
    checks++;
    if (vec_seen != 8'hff || entries < 10 || interrupted < 5) begin
      failures++;
      $display("coverage: vec_seen=%b entries=%0d interrupted=%0d", vec_seen, entries, interrupted);
    end
    $display("exercise entries=%0d toggles=%0d interrupted rotations=%0d", entries, toggles, interrupted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
