// tb_router_periods: the vector rotation period swept from 16 to 2,048
// cycles, against a router that never exercises. Four routers that differ
// only in TOGGLE_PERIOD (16, 128, 512 and 2,048) and a fifth whose quiet
// threshold (2^20 cycles) is never reached receive the same random traffic,
// 1- and 5-flit packets at 0.02 flits/cycle for 131,072 cycles, and their
// outputs feed one shared set of sinks. Per router it measures, over the
// stage-2 inputs that the ROM drives, the duty cycle (share of cycles at
// 1) and the activity factor (share of cycles in which the input changes).
// It checks that
//   - all five routers put out the same flits and credits in every cycle,
//     so neither exercise mode nor its rotation period affects traffic;
//   - without exercise, some of these inputs sit at one value for more
//     than 99% of the run, and with exercise none do;
//   - every flit offered is delivered;
//   - every router applies all eight vectors;
//   - the activity factor falls as the period grows, and at 16 cycles is at
//     least four times that at 2,048;
//   - the duty cycles hardly depend on the period: averaged over the
//     exercised inputs, each router stays within 0.03 of the 2,048-cycle one.
module tb_router_periods;
  import noc_pkg::*;

  localparam int NR = 5;              // routers; the last one never exercises
  localparam int NE = NR - 1;         // routers with exercise mode
  localparam int PERIODS [NR] = '{16, 128, 512, 2048, 2048};
  localparam int QUIETS  [NR] = '{16, 16, 16, 16, 1 << 20};
  localparam int RUN = 131072;

  logic clk = 0, rst_n = 0;
  flit_t   [NUM_PORTS-1:0] flit_in;
  credit_t [NUM_PORTS-1:0] credit_in;
  flit_t   [NUM_PORTS-1:0] flit_out   [NR];
  credit_t [NUM_PORTS-1:0] credit_out [NR];
  logic       ex_mode   [NR];
  logic       ex_toggle [NR];
  logic [2:0] ex_vec    [NR];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (RUN + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-router measurement of the ROM-driven stage-2 inputs
  bit counting = 0;
  int ones    [NR][CRIT_IN_W];
  int changes [NR][CRIT_IN_W];
  int rotations [NR];
  int vec_seen  [NR];
  bit rom_col [CRIT_IN_W];

  for (genvar g = 0; g < NR; g++) begin : g_r
    noc_router #(.QUIET_CYCLES(QUIETS[g]), .TOGGLE_PERIOD(PERIODS[g])) dut (
      .clk, .rst_n, .flit_in, .credit_out(credit_out[g]),
      .flit_out(flit_out[g]), .credit_in,
      .exercise_mode(ex_mode[g]), .exercise_vec(ex_vec[g]),
      .exercise_toggle(ex_toggle[g]));

    crit_in_t ain_prev;
    always @(posedge clk) begin
      if (counting) begin
        for (int c = 0; c < CRIT_IN_W; c++) begin
          ones[g][c]    += int'(dut.crit[c]);
          changes[g][c] += int'(dut.crit[c] != ain_prev[c]);
        end
        if (ex_toggle[g]) rotations[g]++;
        vec_seen[g] |= 1 << ex_vec[g];
      end
      ain_prev <= dut.crit;
    end

    if (g == 0) begin : g_mask
      initial for (int c = 0; c < CRIT_IN_W; c++) rom_col[c] = dut.EX_ROM_MASK[c];
    end
  end

  // traffic: sources and credit-returning sinks, driven from router 0
  int up_credit [NUM_PORTS][NUM_VCS];
  int pkt_left  [NUM_PORTS][NUM_VCS];
  int pend_cred [NUM_PORTS][NUM_VCS];
  logic [COORD_W-1:0] dest_x_q [NUM_PORTS][NUM_VCS];
  logic [COORD_W-1:0] dest_y_q [NUM_PORTS][NUM_VCS];
  int sent = 0, recv = 0, mismatches = 0;
  bit no_new = 0;
  localparam int RATE_PPM = 20000;

  always @(posedge clk) if (rst_n) begin
    for (int r = 1; r < NR; r++)
      if (flit_out[r] != flit_out[0] || credit_out[r] != credit_out[0]) mismatches++;
    for (int i = 0; i < NUM_PORTS; i++) begin
      if (credit_out[0][i].valid) up_credit[i][credit_out[0][i].vc]++;
      if (flit_out[0][i].valid) begin recv++; pend_cred[i][flit_out[0][i].vc]++; end
    end
  end

  task automatic drive();
    for (int i = 0; i < NUM_PORTS; i++) begin
      int v;
      flit_in[i] = '0;
      credit_in[i] = '0;
      for (int k = 0; k < NUM_VCS; k++)
        if (!credit_in[i].valid && pend_cred[i][k] > 0) begin
          credit_in[i].valid = 1'b1; credit_in[i].vc = VC_W'(k); pend_cred[i][k]--;
        end
      // packets of 3 flits on average start with probability rate/(5*3)
      v = -1;
      for (int k = 0; k < NUM_VCS; k++) if (v < 0 && pkt_left[i][k] != 0) v = k;
      if (v < 0 && !no_new && int'($urandom % (NUM_PORTS * 3 * 1000000)) < RATE_PPM)
        v = int'($urandom % NUM_VCS);
      if (v >= 0 && up_credit[i][v] > 0) begin
        bit h;
        h = (pkt_left[i][v] == 0);
        if (h) begin
          pkt_left[i][v] = (($urandom % 2) == 0) ? 1 : 5;
          dest_x_q[i][v] = COORD_W'($urandom);
          dest_y_q[i][v] = COORD_W'($urandom);
        end
        flit_in[i].valid  = 1'b1;
        flit_in[i].head   = h;
        flit_in[i].tail   = (pkt_left[i][v] == 1);
        flit_in[i].vc     = VC_W'(v);
        flit_in[i].dest_x = dest_x_q[i][v];
        flit_in[i].dest_y = dest_y_q[i][v];
        flit_in[i].data   = $urandom;
        pkt_left[i][v]--;
        up_credit[i][v]--;
        sent++;
      end
    end
  endtask

  initial begin
    real act [NR];
    real duty_diff [NR];
    int biased [NR];
    int ncols;
    flit_in = '0; credit_in = '0;
    for (int r = 0; r < NR; r++) begin
      rotations[r] = 0; vec_seen[r] = 0;
      for (int c = 0; c < CRIT_IN_W; c++) begin ones[r][c] = 0; changes[r][c] = 0; end
    end
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) begin
        up_credit[i][v] = BUF_DEPTH; pkt_left[i][v] = 0; pend_cred[i][v] = 0;
        dest_x_q[i][v] = '0; dest_y_q[i][v] = '0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    counting = 1;
    for (int t = 0; t < RUN; t++) begin @(negedge clk); drive(); end
    counting = 0;
    no_new = 1;
    for (int t = 0; t < 500; t++) begin @(negedge clk); drive(); end

    check(mismatches == 0, $sformatf("outputs identical for all periods (%0d cycles differ)", mismatches));
    check(sent == recv && sent > 0, $sformatf("all flits delivered (%0d/%0d)", recv, sent));

    ncols = 0;
    for (int c = 0; c < CRIT_IN_W; c++) if (rom_col[c]) ncols++;
    for (int r = 0; r < NR; r++) begin
      real sum_act, sum_diff;
      sum_act = 0.0; sum_diff = 0.0; biased[r] = 0;
      for (int c = 0; c < CRIT_IN_W; c++) if (rom_col[c]) begin
        sum_act  += real'(changes[r][c]) / real'(RUN);
        sum_diff += (ones[r][c] > ones[NE-1][c] ? real'(ones[r][c] - ones[NE-1][c])
                                                : real'(ones[NE-1][c] - ones[r][c])) / real'(RUN);
        if (ones[r][c] * 100 < RUN || (RUN - ones[r][c]) * 100 < RUN) biased[r]++;
      end
      act[r] = sum_act / real'(ncols);
      duty_diff[r] = sum_diff / real'(ncols);
      if (r < NE) begin
        $display("period %4d: rotations %0d, vectors used %b, activity factor %0.5f, mean duty difference to period 2048 %0.4f, inputs >99%% at one value %0d",
                 PERIODS[r], rotations[r], vec_seen[r][7:0], act[r], duty_diff[r], biased[r]);
        check(vec_seen[r][7:0] == 8'hff, $sformatf("period %0d: all eight vectors applied", PERIODS[r]));
        check(duty_diff[r] <= 0.03, $sformatf("period %0d: duty cycles close to period 2048", PERIODS[r]));
        check(biased[r] == 0, $sformatf("period %0d: no input held at one value", PERIODS[r]));
      end else begin
        $display("no exercise: rotations %0d, activity factor %0.5f, inputs >99%% at one value %0d of %0d",
                 rotations[r], act[r], biased[r], ncols);
        check(rotations[r] == 0, "router without exercise never rotates");
        check(biased[r] > 0, "without exercise some inputs are held at one value");
      end
    end
    for (int r = 1; r < NE; r++)
      check(act[r] < act[r-1], $sformatf("activity falls from period %0d to %0d", PERIODS[r-1], PERIODS[r]));
    check(act[0] >= 4.0 * act[NE-1], "activity at period 16 at least 4x that at 2048");
    check(act[NE-1] > act[NR-1], "exercise adds activity");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
