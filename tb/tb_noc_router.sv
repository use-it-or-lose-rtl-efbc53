// tb_noc_router: end-to-end test of the router at its default parameters
// (router at (3,3) of the 8x8 mesh, 5 ports, 4 VCs, 16 quiet cycles,
// 2,048-cycle vector rotation).
//
// Sources on all five input ports send 1- and 5-flit packets with random
// destinations, obeying credits; sinks on all five outputs model a
// downstream buffer of 4 flits per VC, check it never overflows and return
// credits at a random rate. Every flit carries its source port, source VC,
// packet length, sequence number and index, so the scoreboard checks X-Y
// output port, in-order delivery per source VC, packets kept whole on one
// output VC, head/tail flags and that every flit sent arrives.
//
// Phases: (0) zero-load latency of a head flit arriving while the router
// is in exercise mode (4 clock edges); (1) heavy load for contention and
// stalls; (2) 0.02 flits/cycle, the low load at which exercise mode cuts in
// between packets; (3) a long idle stretch covering all 8 exercise vectors,
// during which nothing may leave the router and every exercised stage-2
// input must take both values; (4) traffic again afterwards.
// Each mechanism is counted and must occur at least once.
module tb_noc_router;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  flit_t   [NUM_PORTS-1:0] flit_in, flit_out;
  credit_t [NUM_PORTS-1:0] credit_in, credit_out;
  logic exercise_mode, exercise_toggle;
  logic [2:0] exercise_vec;

  noc_router dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent=%0d recv=%0d", flits_sent, flits_recv);
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++)
        $display("src %0d.%0d left=%0d credit=%0d occ=%0d", i, v, pkt_left[i][v], up_credit[i][v], occ[i][v]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ sources
  int  src_rate_pm;                         // offered flits per port per 1000 cycles
  bit  src_enable;
  bit  src_no_new;                          // only finish open packets
  int  up_credit [NUM_PORTS][NUM_VCS];
  int  pkt_left  [NUM_PORTS][NUM_VCS];      // flits still to send of the open packet
  int  pkt_len   [NUM_PORTS][NUM_VCS];
  int  pkt_seq   [NUM_PORTS][NUM_VCS];
  int  pkt_dx    [NUM_PORTS][NUM_VCS];
  int  pkt_dy    [NUM_PORTS][NUM_VCS];
  int  flits_sent = 0, flits_recv = 0, pkts_len1 = 0, pkts_len5 = 0;

  function automatic int xy_port(int x, int y);
    if (x != 3) return (x > 3) ? 1 : 2;
    if (y != 3) return (y > 3) ? 3 : 4;
    return 0;
  endfunction

  function automatic flit_t make_flit(int i, int v);
    flit_t f;
    int idx;
    idx = pkt_len[i][v] - pkt_left[i][v];
    f = '0;
    f.valid  = 1'b1;
    f.head   = (idx == 0);
    f.tail   = (pkt_left[i][v] == 1);
    f.vc     = VC_W'(v);
    f.dest_x = COORD_W'(pkt_dx[i][v]);
    f.dest_y = COORD_W'(pkt_dy[i][v]);
    f.data   = {3'(i), 2'(v), 3'(pkt_len[i][v]), 16'(pkt_seq[i][v]), 8'(idx)};
    return f;
  endfunction

  task automatic source_cycle();
    for (int i = 0; i < NUM_PORTS; i++) begin
      int v;
      flit_in[i] = '0;
      v = -1;
      for (int k = 0; k < NUM_VCS; k++)
        if (v < 0 && pkt_left[i][k] != 0) v = k;
      if (v < 0 && src_enable && !src_no_new && int'($urandom % 3000) < src_rate_pm)
        v = int'($urandom % NUM_VCS);
      if (v >= 0) begin
        if (up_credit[i][v] > 0 && !(src_no_new && pkt_left[i][v] == 0)) begin
          if (pkt_left[i][v] == 0) begin
            pkt_len[i][v]  = (($urandom % 2) == 0) ? 1 : 5;
            pkt_left[i][v] = pkt_len[i][v];
            pkt_dx[i][v]   = int'($urandom % MESH_X);
            pkt_dy[i][v]   = int'($urandom % MESH_Y);
            if (pkt_len[i][v] == 1) pkts_len1++; else pkts_len5++;
          end
          flit_in[i] = make_flit(i, v);
          up_credit[i][v]--;
          pkt_left[i][v]--;
          if (pkt_left[i][v] == 0) pkt_seq[i][v]++;
          flits_sent++;
        end
      end
    end
  endtask

  function automatic bit sources_idle();
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) if (pkt_left[i][v] != 0) return 0;
    return 1;
  endfunction

  // -------------------------------------------------------------------- sinks
  int  drain_pm;
  int  occ      [NUM_PORTS][NUM_VCS];
  bit  open_pkt [NUM_PORTS][NUM_VCS];
  int  cur_src  [NUM_PORTS][NUM_VCS];
  int  cur_idx  [NUM_PORTS][NUM_VCS];
  int  cur_len  [NUM_PORTS][NUM_VCS];
  int  exp_seq  [NUM_PORTS][NUM_VCS];       // per source port / VC

  task automatic sink_cycle();
    for (int o = 0; o < NUM_PORTS; o++) begin
      credit_in[o] = '0;
      if (int'($urandom % 1000) < drain_pm) begin
        int v0;
        v0 = int'($urandom % NUM_VCS);
        for (int k = 0; k < NUM_VCS; k++)
          if (!credit_in[o].valid && occ[o][(v0 + k) % NUM_VCS] > 0) begin
            credit_in[o].valid = 1'b1;
            credit_in[o].vc    = VC_W'((v0 + k) % NUM_VCS);
            occ[o][(v0 + k) % NUM_VCS]--;
          end
      end
    end
  endtask

  task automatic receive(int o, flit_t f);
    int ov, sp, sv, len, seq, idx;
    ov  = int'(f.vc);
    sp  = int'(f.data[31:29]);
    sv  = int'(f.data[28:27]);
    len = int'(f.data[26:24]);
    seq = int'(f.data[23:8]);
    idx = int'(f.data[7:0]);
    flits_recv++;
    occ[o][ov]++;
    check(occ[o][ov] <= BUF_DEPTH, "downstream buffer overflow (credit error)");
    check(xy_port(int'(f.dest_x), int'(f.dest_y)) == o, "flit left on the X-Y port");
    if (f.head) begin
      check(!open_pkt[o][ov], "head flit on an output VC that holds an open packet");
      check(idx == 0, "head flit index 0");
      check(seq == exp_seq[sp][sv] % 65536, "packets of one source VC in order");
      open_pkt[o][ov] = 1'b1;
      cur_src[o][ov]  = sp * NUM_VCS + sv;
      cur_idx[o][ov]  = 0;
      cur_len[o][ov]  = len;
    end else begin
      check(open_pkt[o][ov] && cur_src[o][ov] == sp * NUM_VCS + sv, "body flit follows its head on the same output VC");
      check(idx == cur_idx[o][ov] + 1, "flits of a packet in order");
      cur_idx[o][ov] = idx;
    end
    check(f.tail == (idx == len - 1), "tail flag on the last flit");
    if (f.tail) begin
      open_pkt[o][ov] = 1'b0;
      exp_seq[sp][sv]++;
    end
  endtask

  // upstream credits come back from the router
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NUM_PORTS; i++)
      if (credit_out[i].valid) up_credit[i][credit_out[i].vc]++;

  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NUM_PORTS; o++)
      if (flit_out[o].valid) receive(o, flit_out[o]);

  // ---------------------------------------------------------- mechanism counts
  int n_contention = 0, n_vc_stall = 0, n_credit_stall = 0, n_ex_entry = 0;
  int n_toggle = 0, n_ex_cut = 0, n_ex_out_activity = 0;
  logic prev_ex = 0;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] cstall;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_i
    for (genvar v = 0; v < NUM_VCS; v++) begin : g_v
      assign cstall[i][v] = dut.g_in[i].g_vc[v].u_vc.state == 2'd2 &&
                            dut.g_in[i].g_vc[v].u_vc.ucount != 0 &&
                            !dut.g_in[i].g_vc[v].u_vc.req;
    end
  end

  always @(posedge clk) if (rst_n) begin
    bit vstall;
    vstall = 0;
    for (int o = 0; o < NUM_PORTS; o++)
      if (!exercise_mode && $countones(dut.u_alloc.out_req[o]) > 1) n_contention++;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++)
        for (int o = 0; o < NUM_PORTS; o++)
          if (dut.ain_func.req[i][v] && dut.ain_func.need_vc[i][v] &&
              dut.ain_func.route[i][v][o] && dut.ovc_avail_all[o] == '0) vstall = 1;
    if (!exercise_mode && vstall) n_vc_stall++;
    if (cstall != '0) n_credit_stall++;
    if (exercise_mode && !prev_ex) n_ex_entry++;
    if (!exercise_mode && prev_ex) n_ex_cut++;
    if (exercise_toggle) n_toggle++;
    prev_ex <= exercise_mode;
  end

  // while in exercise mode nothing may leave the router
  always @(posedge clk) if (rst_n && exercise_mode)
    for (int o = 0; o < NUM_PORTS; o++)
      if (flit_out[o].valid || credit_out[o].valid) n_ex_out_activity++;

  // stage-2 inputs, requests and grants seen at 0 and at 1 in exercise mode
  crit_in_t ex_seen0, ex_seen1;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] r_seen0, r_seen1;
  logic [NUM_PORTS-1:0] g_seen0, g_seen1;
  bit track_ex = 0;
  always @(posedge clk) if (rst_n && exercise_mode && track_ex) begin
    ex_seen0 |= ~dut.crit;
    ex_seen1 |= dut.crit;
    g_seen0  |= ~dut.aout.in_grant;
    g_seen1  |= dut.aout.in_grant;
    r_seen0  |= ~dut.ain.req;
    r_seen1  |= dut.ain.req;
  end

  // ------------------------------------------------------------------ stimulus
  initial begin
    int lat, n_both, n_ex_cols, vec_mask;
    flit_in = '0; credit_in = '0; src_enable = 0; src_no_new = 0; src_rate_pm = 0; drain_pm = 1000;
    ex_seen0 = '0; ex_seen1 = '0; g_seen0 = '0; g_seen1 = '0; r_seen0 = '0; r_seen1 = '0;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) begin
        up_credit[i][v] = BUF_DEPTH; pkt_left[i][v] = 0; pkt_seq[i][v] = 0; pkt_len[i][v] = 0;
        occ[i][v] = 0; open_pkt[i][v] = 0; exp_seq[i][v] = 0; cur_src[i][v] = 0;
        cur_idx[i][v] = 0; cur_len[i][v] = 0; pkt_dx[i][v] = 0; pkt_dy[i][v] = 0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // phase 0: zero-load latency, the flit arrives in exercise mode
    repeat (40) @(posedge clk);
    check(exercise_mode, "exercise mode after 16 idle cycles");
    @(negedge clk);
    pkt_len[0][1] = 1; pkt_left[0][1] = 1; pkt_dx[0][1] = 6; pkt_dy[0][1] = 0; pkts_len1++;
    flit_in[0] = make_flit(0, 1);
    up_credit[0][1]--; pkt_left[0][1] = 0; pkt_seq[0][1]++; flits_sent++;
    lat = 0;
    @(posedge clk); #1 flit_in = '0; lat = 1;
    check(!exercise_mode, "exercise mode ends at the first edge after an arrival");
    while (!flit_out[PORT_EAST].valid && lat < 20) begin @(posedge clk); #1 lat++; end
    check(lat == 4, $sformatf("head flit latency %0d edges, expected 4", lat));
    $display("zero-load head latency: %0d clock edges", lat);
    repeat (10) @(posedge clk);

    $display("phase 1 @%0d", cycle);
    // phase 1: heavy load
    src_enable = 1; src_rate_pm = 600; drain_pm = 400;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk); source_cycle(); sink_cycle();
    end
    // phase 2: 0.02 flits/cycle into the router (0.004 per port)
    src_rate_pm = 4; drain_pm = 900;
    for (int t = 0; t < 30000; t++) begin
      @(negedge clk); source_cycle(); sink_cycle();
    end
    $display("drain @%0d sent=%0d recv=%0d", cycle, flits_sent, flits_recv);
    // finish open packets, then drain
    src_rate_pm = 300; src_no_new = 1;
    while (!sources_idle()) begin @(negedge clk); source_cycle(); sink_cycle(); end
    src_enable = 0;
    for (int t = 0; t < 300; t++) begin @(negedge clk); source_cycle(); sink_cycle(); end
    check(flits_recv == flits_sent, $sformatf("all flits delivered (%0d sent, %0d received)", flits_sent, flits_recv));

    // phase 3: long idle, all 8 exercise vectors
    n_ex_out_activity = 0;
    track_ex = 1;
    vec_mask = 0;
    for (int t = 0; t < 8 * 2048 + 100; t++) begin
      @(negedge clk); sink_cycle();
      vec_mask |= 1 << exercise_vec;
    end
    track_ex = 0;
    check(vec_mask == 255, "all eight exercise vectors applied");
    check(n_ex_out_activity == 0, "no flit or credit leaves in exercise mode");
    n_both = 0; n_ex_cols = 0;
    for (int c = 0; c < CRIT_IN_W; c++)
      if (dut.EX_ROM_MASK[c]) begin
        n_ex_cols++;
        if (ex_seen0[c] && ex_seen1[c]) n_both++;
      end
    check(n_both == n_ex_cols, $sformatf("ROM-driven stage-2 inputs toggled: %0d of %0d", n_both, n_ex_cols));
    check(r_seen0 == '1 && r_seen1 == '1, "every Request line exercised to 0 and 1");
    check(g_seen0 == '1 && g_seen1 == '1, $sformatf("every input-port grant line exercised to 0 and 1 (%b %b)", g_seen0, g_seen1));
    $display("exercise: %0d ROM columns, %0d constant columns, all toggled: %0d",
             n_ex_cols, $countones(dut.EX_CONST), n_both);

    // phase 4: traffic after exercise
    src_enable = 1; src_no_new = 0; src_rate_pm = 300; drain_pm = 600;
    for (int t = 0; t < 2000; t++) begin @(negedge clk); source_cycle(); sink_cycle(); end
    src_no_new = 1;
    while (!sources_idle()) begin @(negedge clk); source_cycle(); sink_cycle(); end
    src_enable = 0; drain_pm = 1000;
    for (int t = 0; t < 300; t++) begin @(negedge clk); source_cycle(); sink_cycle(); end
    check(flits_recv == flits_sent, $sformatf("all flits delivered after exercise (%0d/%0d)", flits_recv, flits_sent));

    $display("mechanisms: contention=%0d vc_stall=%0d credit_stall=%0d exercise_entries=%0d exercise_cut_by_traffic=%0d rotations=%0d pkts_1flit=%0d pkts_5flit=%0d",
             n_contention, n_vc_stall, n_credit_stall, n_ex_entry, n_ex_cut, n_toggle, pkts_len1, pkts_len5);
    check(n_contention > 0, "switch contention happened");
    check(n_vc_stall > 0, "VC allocation stall happened");
    check(n_credit_stall > 0, "credit stall happened");
    check(n_ex_entry > 1, "exercise mode entered");
    check(n_ex_cut > 1, "exercise mode cut short by traffic");
    check(n_toggle >= 8, "exercise vector rotated");
    check(pkts_len1 > 0 && pkts_len5 > 0, "1-flit and 5-flit packets");
    $display("flits sent=%0d received=%0d", flits_sent, flits_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
