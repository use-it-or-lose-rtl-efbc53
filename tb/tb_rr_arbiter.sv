// tb_rr_arbiter: checks the round-robin arbiter against a reference pointer
// model under random requests and random pointer updates. Most cycles feed
// the pointer register back as the priority input, as the router does in
// normal operation; some cycles apply an unrelated priority with `update`
// low, as exercise mode does. Checks per cycle: the grant follows the
// applied priority, `prio_q` matches the model, and a forced priority
// leaves the register unchanged.
module tb_rr_arbiter;
  localparam int N = 4;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [IW-1:0] prio, prio_q;
  logic update, any;
  int checks = 0, failures = 0;
  int ref_ptr, use_ptr, forced = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_g;
    int w;
    bit force_prio;
    req = '0; update = 0; ref_ptr = 0; prio = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(prio_q) != ref_ptr) begin
        failures++;
        if (failures < 10) $display("pointer t=%0d prio_q=%0d exp=%0d", t, prio_q, ref_ptr);
      end
      force_prio = ($urandom % 5) == 0;
      req    = N'($urandom);
      if (force_prio) begin
        prio = IW'($urandom); update = 0; forced++;
      end else begin
        prio = prio_q; update = ($urandom % 4) != 0;
      end
      use_ptr = int'(prio);
      #1;
      exp_g = '0; w = -1;
      for (int k = 0; k < N; k++)
        if (w < 0 && req[(use_ptr + k) % N]) w = (use_ptr + k) % N;
      if (w >= 0) exp_g[w] = 1'b1;
      checks++;
      if (gnt !== exp_g || any !== (w >= 0)) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d req=%b prio=%0d gnt=%b exp=%b", t, req, prio, gnt, exp_g);
      end
      if (update && w >= 0) ref_ptr = (w + 1) % N;
    end
    checks++;
    if (forced < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
