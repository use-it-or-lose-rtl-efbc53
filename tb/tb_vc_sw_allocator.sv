// tb_vc_sw_allocator: random allocator inputs, checked against the rules an
// allocation must obey (worked out here, not by copying the design):
//   - at most one grant per input port and per output port;
//   - a grant goes to an eligible request and to the output port it routes
//     to; a head flit receives the lowest-numbered available output VC;
//   - if any eligible request exists, at least one grant is made;
//   - two inputs contending for one output are served alternately;
//   - with update_en low the arbitration order does not change;
//   - the arbiters follow the priority pointers applied in `ain.prio`
//     (normally the fed-back `prio_q`), and a forced pointer with
//     update_en low leaves `prio_q` unchanged.
module tb_vc_sw_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, update_en;
  alloc_in_t ain;
  alloc_out_t aout;
  alloc_prio_t prio_q;
  int checks = 0, failures = 0;

  vc_sw_allocator dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int route_port(logic [NUM_PORTS-1:0] r);
    for (int o = 0; o < NUM_PORTS; o++) if (r[o]) return o;
    return -1;
  endfunction

  function automatic bit eligible(int i, int v);
    int o;
    o = route_port(ain.route[i][v]);
    if (!ain.req[i][v] || o < 0) return 0;
    return !ain.need_vc[i][v] || (ain.ovc_avail[o] != '0);
  endfunction

  task automatic check_rules();
    logic [NUM_PORTS-1:0] outs_used;
    bit any_elig, any_grant;
    outs_used = '0; any_elig = 0; any_grant = 0;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) any_elig |= eligible(i, v);
    for (int i = 0; i < NUM_PORTS; i++) begin
      if (aout.in_grant[i]) begin
        int v, o;
        any_grant = 1;
        v = int'(aout.in_vc[i]);
        o = int'(aout.in_port[i]);
        check(eligible(i, v), "grant to an eligible request");
        check(route_port(ain.route[i][v]) == o, "grant to the routed output");
        if (route_port(ain.route[i][v]) != o && failures < 3) $display("i=%0d v=%0d route=%b o=%0d ingnt=%b", i, v, ain.route[i][v], o, dut.in_gnt[i]);
        check(!outs_used[o], "one grant per output");
        outs_used[o] = 1'b1;
        check(aout.new_vc[i] == ain.need_vc[i][v], "new_vc for head flits only");
        if (ain.need_vc[i][v]) begin
          int lo;
          lo = -1;
          for (int k = NUM_VCS - 1; k >= 0; k--) if (ain.ovc_avail[o][k]) lo = k;
          check(int'(aout.out_vc[i]) == lo, "lowest available output VC");
        end
      end
    end
    check(any_grant == any_elig, "work conserving");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, alternations, r;
    ain = '0; update_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random traffic, one-hot routes
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ain = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++) begin
          ain.req[i][v]     = ($urandom % 3) != 0;
          ain.need_vc[i][v] = ($urandom % 2) != 0;
          r = int'($urandom % NUM_PORTS);
          ain.route[i][v][r] = 1'b1;
        end
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VCS; v++) ain.ovc_avail[o][v] = ($urandom % 3) == 0;
      ain.prio = prio_q;
      update_en = ($urandom % 8) != 0;
      #1;
      check_rules();
    end
    // fairness: inputs 1 and 2 both want output 3 with owned VCs
    @(negedge clk);
    ain = '0; update_en = 1;
    ain.req[1][0] = 1; ain.route[1][0][3] = 1;
    ain.req[2][1] = 1; ain.route[2][1][3] = 1;
    last = -1; alternations = 0;
    for (int t = 0; t < 10; t++) begin
      ain.prio = prio_q;
      #1;
      check(aout.in_grant[1] ^ aout.in_grant[2], "exactly one contender wins");
      if (last >= 0 && aout.in_grant[1] != last[0]) alternations++;
      last = int'(aout.in_grant[1]);
      @(negedge clk);
    end
    check(alternations == 9, "round-robin alternation");
    // frozen arbiters: same winner every cycle
    update_en = 0;
    #1 last = int'(aout.in_grant[1]);
    for (int t = 0; t < 5; t++) begin
      @(negedge clk); #1;
      check(int'(aout.in_grant[1]) == last, "arbiters frozen with update_en low");
    end
    // forced priority: output 3's pointer at input 1 or 2 picks that input,
    // and with update_en low the register keeps its value
    for (int t = 0; t < 6; t++) begin
      alloc_prio_t held;
      @(negedge clk);
      held = prio_q;
      ain.prio = prio_q;
      ain.prio.out_prio[3] = PORT_W'(1 + t % 2);
      #1;
      check(aout.in_grant[1] == (t % 2 == 0) && aout.in_grant[2] == (t % 2 == 1),
            "output arbiter follows the applied pointer");
      @(posedge clk); #1;
      check(prio_q == held, "forced pointer leaves the registers unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
