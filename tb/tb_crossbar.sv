// tb_crossbar: random flits and random one-hot (or empty) selections per
// output; every output must carry exactly the selected input's flit.
module tb_crossbar;
  import noc_pkg::*;
  flit_t [NUM_PORTS-1:0] in_flit, out_flit;
  logic  [NUM_PORTS-1:0][NUM_PORTS-1:0] sel;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s [NUM_PORTS];
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++)
        in_flit[i] = flit_t'({$urandom, $urandom});
      for (int o = 0; o < NUM_PORTS; o++) begin
        s[o] = int'($urandom % (NUM_PORTS + 1)) - 1;   // -1 = no input
        sel[o] = '0;
        if (s[o] >= 0) sel[o][s[o]] = 1'b1;
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_flit[o] !== ((s[o] >= 0) ? in_flit[s[o]] : flit_t'('0))) begin
          failures++;
          if (failures < 10) $display("t=%0d output %0d wrong (sel input %0d)", t, o, s[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
