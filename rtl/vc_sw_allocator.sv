// vc_sw_allocator: stage 2 of the router, combined VC and switch allocation.
//
// This is the logic that holds the router's critical paths and the logic the
// exercise mode drives. Per cycle it takes the Request, Route, need-VC and
// output-VC-available bits of all p x v input VCs and the arbiter priority
// pointers (`ain`) and produces at most one grant per input port and per
// output port (`aout`):
//   1. a request is eligible if its VC already owns an output VC (the input
//      VC has checked that VC's credit) or if some output VC at its output
//      port is available;
//   2. input arbitration: one round-robin arbiter per input port picks one
//      eligible VC;
//   3. output arbitration: one round-robin arbiter per output port picks one
//      input port among those whose winner routes there;
//   4. a winning head flit is given the lowest-numbered available output VC
//      of its output port in the same cycle (combined allocation).
// The arbiter pointer registers are the only state. They are brought out
// as `prio_q`, and the arbiters arbitrate from the pointers in `ain.prio`,
// which the router normally connects to `prio_q` and in exercise mode
// drives from the exercise vectors. The registers advance only when
// `update_en` is high, so inputs applied in exercise mode leave no trace.
// The outputs are combinational; the router registers them.
// The separable input-first structure, round-robin arbiters and the
// lowest-free-VC choice are this design's choices; the document gives the
// function (combined VC and switch allocation with arbiters) only.
module vc_sw_allocator
  import noc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       update_en,
  input  alloc_in_t  ain,
  output alloc_out_t aout,
  output alloc_prio_t prio_q    // arbiter pointer registers
);
  logic [NUM_PORTS-1:0]                avail_any;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0]   elig;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0]   in_gnt;
  logic [NUM_PORTS-1:0]                in_any;
  logic [NUM_PORTS-1:0][VC_W-1:0]      in_win;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] win_route;   // [input][output]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] out_req;     // [output][input]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] out_gnt;     // [output][input]
  logic [NUM_PORTS-1:0]                out_any;
  logic [NUM_PORTS-1:0]                in_won;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) avail_any[o] = |ain.ovc_avail[o];
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++)
        elig[i][v] = ain.req[i][v] &&
                     (!ain.need_vc[i][v] || |(ain.route[i][v] & avail_any));
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in_arb
    rr_arbiter #(.N(NUM_VCS)) u_arb (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (elig[i]),
      .prio  (ain.prio.in_prio[i]),
      .update(update_en && in_won[i]),
      .gnt   (in_gnt[i]),
      .any   (in_any[i]),
      .prio_q(prio_q.in_prio[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_win[i]    = '0;
      win_route[i] = '0;
      for (int v = 0; v < NUM_VCS; v++)
        if (in_gnt[i][v]) begin
          in_win[i]    = VC_W'(v);
          win_route[i] = ain.route[i][v];
        end
    end
    for (int o = 0; o < NUM_PORTS; o++)
      for (int i = 0; i < NUM_PORTS; i++)
        out_req[o][i] = in_any[i] && win_route[i][o];
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out_arb
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (out_req[o]),
      .prio  (ain.prio.out_prio[o]),
      .update(update_en),
      .gnt   (out_gnt[o]),
      .any   (out_any[o]),
      .prio_q(prio_q.out_prio[o])
    );
  end

  always_comb begin
    aout = '0;
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_won[i] = 1'b0;
      for (int o = NUM_PORTS - 1; o >= 0; o--)
        if (out_gnt[o][i]) begin
          in_won[i]       = 1'b1;
          aout.in_port[i] = PORT_W'(o);
        end
      aout.in_grant[i] = in_won[i];
      aout.in_vc[i]    = in_win[i];
      aout.new_vc[i]   = in_won[i] && ain.need_vc[i][in_win[i]];
      for (int ov = NUM_VCS - 1; ov >= 0; ov--)
        if (ain.ovc_avail[aout.in_port[i]][ov]) aout.out_vc[i] = VC_W'(ov);
    end
  end
endmodule
