// tb_router_rates: the router under the synthetic loads the design is meant
// for. Random traffic (1- and 5-flit packets, random destinations, spread
// over the five input ports) is offered at a total incoming rate of 0.0005,
// 0.001, 0.02, 0.05 and 0.085 flits/cycle, 100,000 cycles each (0.0005 and
// 0.085 are the lowest and highest per-router rates of the PARSEC
// benchmarks the technique targets), with the default
// 16-cycle quiescence threshold and 2,048-cycle vector rotation. Per rate it
// reports the share of cycles in exercise mode, the number of vector
// rotations and the duty cycle (share of cycles at 1) of the allocator
// inputs, and checks that
//   - every flit offered is delivered;
//   - at every rate, even 0.085 flits/cycle, all eight vectors are applied
//     within the 100,000 cycles;
//   - no exercised stage-2 input stays at one value for the whole run,
//     and the highest duty cycle of those inputs is at most 7/8 plus the
//     share of traffic cycles (each vector drives such an input to 0 or 1
//     and every input differs between vectors).
module tb_router_rates;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  flit_t   [NUM_PORTS-1:0] flit_in, flit_out;
  credit_t [NUM_PORTS-1:0] credit_in, credit_out;
  logic exercise_mode, exercise_toggle;
  logic [2:0] exercise_vec;

  noc_router dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int RUN = 100000;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int up_credit [NUM_PORTS][NUM_VCS];
  int pkt_left  [NUM_PORTS][NUM_VCS];
  int pend_cred [NUM_PORTS][NUM_VCS];
  int sent = 0, recv = 0;
  int rate_ppm;                      // offered flits per router per 10^6 cycles
  bit no_new;
  logic [COORD_W-1:0] dest_x_q [NUM_PORTS][NUM_VCS];
  logic [COORD_W-1:0] dest_y_q [NUM_PORTS][NUM_VCS];

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NUM_PORTS; i++) begin
      if (credit_out[i].valid) up_credit[i][credit_out[i].vc]++;
      if (flit_out[i].valid) begin recv++; pend_cred[i][flit_out[i].vc]++; end
    end

  task automatic drive();
    for (int i = 0; i < NUM_PORTS; i++) begin
      int v;
      flit_in[i] = '0;
      credit_in[i] = '0;
      // sinks: return one credit per port per cycle
      for (int k = 0; k < NUM_VCS; k++)
        if (!credit_in[i].valid && pend_cred[i][k] > 0) begin
          credit_in[i].valid = 1'b1; credit_in[i].vc = VC_W'(k); pend_cred[i][k]--;
        end
      // sources: packets start with probability rate/(5 ports * 3 flits)
      v = -1;
      for (int k = 0; k < NUM_VCS; k++) if (v < 0 && pkt_left[i][k] != 0) v = k;
      if (v < 0 && !no_new && int'($urandom % (NUM_PORTS * 3 * 1000000)) < rate_ppm)
        v = int'($urandom % NUM_VCS);
      if (v >= 0 && up_credit[i][v] > 0) begin
        bit h;
        h = (pkt_left[i][v] == 0);
        if (h) pkt_left[i][v] = (($urandom % 2) == 0) ? 1 : 5;
        flit_in[i].valid  = 1'b1;
        flit_in[i].head   = h;
        flit_in[i].tail   = (pkt_left[i][v] == 1);
        flit_in[i].vc     = VC_W'(v);
        flit_in[i].dest_x = h ? COORD_W'($urandom) : '0;
        flit_in[i].dest_y = h ? COORD_W'($urandom) : '0;
        if (!h) begin   // body flits repeat the head's destination
          flit_in[i].dest_x = dest_x_q[i][v];
          flit_in[i].dest_y = dest_y_q[i][v];
        end
        dest_x_q[i][v] = flit_in[i].dest_x;
        dest_y_q[i][v] = flit_in[i].dest_y;
        pkt_left[i][v]--;
        up_credit[i][v]--;
        sent++;
      end
    end
  endtask

  // duty cycle counters of the stage-2 inputs
  int ones [CRIT_IN_W];
  int ex_cycles, rotations;
  bit counting = 0;
  always @(posedge clk) if (counting) begin
    for (int c = 0; c < CRIT_IN_W; c++) ones[c] += int'(dut.crit[c]);
    if (exercise_mode) ex_cycles++;
    if (exercise_toggle) rotations++;
  end

  task automatic run_rate(int ppm, string name);
    int vec_mask, stuck, ncols;
    real max_duty, ex_share;
    rate_ppm = ppm; no_new = 0;
    for (int c = 0; c < CRIT_IN_W; c++) ones[c] = 0;
    ex_cycles = 0; rotations = 0; vec_mask = 0;
    counting = 1;
    for (int t = 0; t < RUN; t++) begin
      @(negedge clk); drive();
      vec_mask |= 1 << exercise_vec;
    end
    counting = 0;
    no_new = 1;
    for (int t = 0; t < 500; t++) begin @(negedge clk); drive(); end
    stuck = 0; ncols = 0; max_duty = 0.0;
    for (int c = 0; c < CRIT_IN_W; c++)
      if (dut.EX_ROM_MASK[c]) begin
        real d;
        ncols++;
        d = real'(ones[c]) / real'(RUN);
        if (ones[c] == 0 || ones[c] == RUN) stuck++;
        if (d > max_duty) max_duty = d;
      end
    ex_share = real'(ex_cycles) / real'(RUN);
    $display("%s: exercise share %0.3f, rotations %0d, vectors used %b, max duty of %0d exercised inputs %0.3f, stuck %0d",
             name, ex_share, rotations, vec_mask[7:0], ncols, max_duty, stuck);
    check(stuck == 0, {name, ": no exercised stage-2 input constant for the whole run"});
    check(max_duty <= 0.875 + (1.0 - ex_share) + 0.001, {name, ": duty cycle bound"});
    check(sent == recv, $sformatf("%s: all flits delivered (%0d/%0d)", name, recv, sent));
    check(rotations >= 8 && vec_mask[7:0] == 8'hff, {name, ": all eight vectors applied"});
  endtask

  initial begin
    flit_in = '0; credit_in = '0; no_new = 0; rate_ppm = 0;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) begin
        up_credit[i][v] = BUF_DEPTH; pkt_left[i][v] = 0; pend_cred[i][v] = 0;
        dest_x_q[i][v] = '0; dest_y_q[i][v] = '0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_rate(500,   "0.0005 flits/cycle");
    run_rate(1000,  "0.001 flits/cycle");
    run_rate(20000, "0.02 flits/cycle");
    run_rate(50000, "0.05 flits/cycle");
    run_rate(85000, "0.085 flits/cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
