// rr_arbiter: round-robin arbiter, one of the "ARB" blocks of the allocator.
//
// Grants one of N requests, searching upward from the priority pointer
// `prio`. The arbiter's own pointer register is brought out as `prio_q` and
// moves to one past the winner when `update` is high. Normally `prio` is
// `prio_q` fed back; bringing the register out lets the router's exercise
// multiplexers drive the priority input like any other input of the
// critical path logic, while keeping `update` low freezes the register so
// that exercise-mode arbitration leaves no trace. The grant is
// combinational from `req` and `prio`.
// The round-robin policy is this design's choice; the document only names
// the arbiters and their state update.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [(N > 1 ? $clog2(N) : 1)-1:0] prio,    // pointer used for this grant
  input  logic         update,   // advance the pointer past the current winner
  output logic [N-1:0] gnt,      // one-hot or zero
  output logic         any,
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] prio_q   // pointer register
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] win;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (!any && req[(int'(prio) + k) % N]) begin
        any                        = 1'b1;
        gnt[(int'(prio) + k) % N] = 1'b1;
        win                        = IW'((int'(prio) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      prio_q <= '0;
    else if (update && any)
      prio_q <= (int'(win) == N - 1) ? '0 : win + 1'b1;
  end
endmodule
