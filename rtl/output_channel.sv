// output_channel: one router output port with the status of the downstream
// router's virtual channels.
//
// Per downstream VC it keeps a busy flag (the VC is owned by a packet from
// the grant of its head flit until its tail flit has left) and a credit
// counter (free buffer slots downstream, reset to the buffer depth). A
// grant captured at the end of stage 2 (`alloc_valid`) takes one credit and,
// for a head flit (`alloc_new_vc`), marks the VC busy. In stage 3 the flit
// from the crossbar is written into the output register with its VC field
// set to the output VC (the "write enable" of the document's stage-2
// figure); a tail flit frees the VC. A credit from downstream adds one.
// `ovc_avail` (free VC with a credit) feeds VC allocation, `credit_ok`
// feeds the Request logic of VCs that already own an output VC.
// Credit-based flow control and this bookkeeping are this design's choices.
module output_channel
  import noc_pkg::*;
#(
  parameter int DEPTH = BUF_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  // end of stage 2
  input  logic                alloc_valid,
  input  logic                alloc_new_vc,
  input  logic [VC_W-1:0]     alloc_vc,
  // stage 3
  input  flit_t               xb_flit,
  input  logic [VC_W-1:0]     xb_vc,
  // downstream link
  input  credit_t             credit_in,
  output flit_t               flit_out,
  // status
  output logic [NUM_VCS-1:0]  ovc_avail,
  output logic [NUM_VCS-1:0]  credit_ok
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [NUM_VCS-1:0]          busy;
  logic [NUM_VCS-1:0][CW-1:0]  credits;

  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) begin
      credit_ok[v] = (credits[v] != '0);
      ovc_avail[v] = !busy[v] && credit_ok[v];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= '0;
      credits  <= {NUM_VCS{CW'(DEPTH)}};
      flit_out <= '0;
    end else begin
      for (int v = 0; v < NUM_VCS; v++) begin
        credits[v] <= credits[v]
                      - CW'(alloc_valid && alloc_vc == VC_W'(v))
                      + CW'(credit_in.valid && credit_in.vc == VC_W'(v));
        if (alloc_valid && alloc_new_vc && alloc_vc == VC_W'(v))
          busy[v] <= 1'b1;
        else if (xb_flit.valid && xb_flit.tail && xb_vc == VC_W'(v))
          busy[v] <= 1'b0;
      end
      flit_out <= xb_flit;
      if (xb_flit.valid) flit_out.vc <= xb_vc;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   alloc_valid |-> credit_ok[alloc_vc])
    else $error("output_channel: flit sent without a credit");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (alloc_valid && alloc_new_vc) |-> !busy[alloc_vc])
    else $error("output_channel: busy VC allocated again");
endmodule
