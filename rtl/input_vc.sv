// input_vc: one virtual channel of a router input channel.
//
// Holds a FIFO of flits and the VC status registers. Three pointers walk the
// FIFO: the write pointer (flit arrival), the allocation pointer (the next
// flit that still has to win allocation) and the read pointer (the flit
// leaving through the crossbar). Allocation runs one cycle ahead of the
// crossbar, so a flit is first granted (stage 2) and popped the cycle after
// (stage 3).
//
// Status: VC_IDLE waits for a head flit; in stage 1 the head's destination
// goes through X-Y routing and the output port is stored (VC_WAIT); a
// switch+VC grant stores the output VC (VC_ACTIVE); the grant of the tail
// flit returns the VC to VC_IDLE. The registers that stage 2 reads are
// brought out as `st` (status, flit waiting, output port, output VC). The
// combinational cloud at the VC output (noc_pkg::vc_request) turns them and
// the downstream credit flags into the one-bit Request, the p-bit one-hot
// Route and the need-VC bit that feed the allocator, as in the document's
// stage-2 description. The router applies the same function to `st` after
// the exercise multiplexers.
//
// Timing: push at a clock edge; routing one cycle later; request from the
// following cycle. `grant` is sampled at the edge that ends stage 2 and
// `pop` at the edge that ends stage 3. The buffer depth and the three-state
// status encoding are this design's choices.
module input_vc
  import noc_pkg::*;
#(
  parameter int MY_X  = 0,
  parameter int MY_Y  = 0,
  parameter int DEPTH = BUF_DEPTH
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // arrival
  input  logic                                push,
  input  flit_t                               push_flit,
  // downstream VC credit status, indexed [output port][output VC]
  input  logic [NUM_PORTS-1:0][NUM_VCS-1:0]   credit_ok,
  // stage 2: allocation result (already gated by exercise mode)
  input  logic                                grant,
  input  logic                                grant_new_vc,
  input  logic [VC_W-1:0]                     grant_out_vc,
  // stage 3: crossbar traversal
  input  logic                                pop,
  output flit_t                               front_flit,
  // to the allocator
  output logic                                req,
  output logic [NUM_PORTS-1:0]                route,
  output logic                                need_vc,
  output vc_st_t                              st,
  // status
  output port_e                               out_port,
  output logic [VC_W-1:0]                     out_vc,
  output logic                                empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wr_ptr, al_ptr, rd_ptr;
  logic [CW-1:0]  count, ucount;      // flits held / flits not yet granted
  vc_state_e      state;
  port_e          route_port;
  flit_t          al_flit;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign al_flit    = mem[al_ptr];
  assign front_flit = mem[rd_ptr];
  assign empty      = (count == '0);

  route_xy #(.MY_X(MY_X), .MY_Y(MY_Y)) u_route (
    .dest_x  (al_flit.dest_x),
    .dest_y  (al_flit.dest_y),
    .out_port(route_port)
  );

  // registers read by stage 2, and the combinational cloud on them
  vc_req_t rq;
  always_comb begin
    st.state    = state;
    st.has_flit = (ucount != '0);
    st.port     = out_port;
    st.ovc      = out_vc;
    rq          = vc_request(st, credit_ok);
    req         = rq.req;
    route       = rq.route;
    need_vc     = rq.need_vc;
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      al_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      ucount   <= '0;
      state    <= VC_IDLE;
      out_port <= PORT_LOCAL;
      out_vc   <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count  <= count  + CW'(push) - CW'(pop);
      ucount <= ucount + CW'(push) - CW'(grant);
      // stage 1: routing of a waiting head flit
      if (state == VC_IDLE && ucount != '0) begin
        out_port <= route_port;
        state    <= VC_WAIT;
      end
      // stage 2 result: grant of the flit at the allocation pointer
      if (grant) begin
        al_ptr <= inc(al_ptr);
        if (grant_new_vc) out_vc <= grant_out_vc;
        state <= al_flit.tail ? VC_IDLE : VC_ACTIVE;
      end
    end
  end

  // a VC holds one packet at a time, upstream obeys credits
  assert property (@(posedge clk) disable iff (!rst_n) !(push && count == CW'(DEPTH) && !pop))
    else $error("input_vc: push into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req)
    else $error("input_vc: grant without request");
  assert property (@(posedge clk) disable iff (!rst_n) (state == VC_IDLE && ucount != '0) |-> al_flit.head)
    else $error("input_vc: packet does not start with a head flit");
endmodule
