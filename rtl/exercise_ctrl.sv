// exercise_ctrl: decides when the router is in exercise mode and which
// exercise vector is applied.
//
// Exercise mode is raised once the router has been quiescent (`busy` low:
// no flit arriving and none buffered or in flight) for QUIET_CYCLES
// consecutive cycles, and dropped at the first clock edge after `busy`
// rises. A rotation counter counts the cycles spent in exercise mode; every
// TOGGLE_PERIOD such cycles it pulses `toggle` and advances `vec_idx`
// through the NUM_VEC stored vectors. The counter keeps its value outside
// exercise mode, so a vector is changed only after it has been applied for a
// whole period in total. QUIET_CYCLES = 16 and TOGGLE_PERIOD = 2048 are the
// document's chosen values; the exact counting (registered mode, saturating
// quiet counter, wrap-around vector index) is this design's choice.
module exercise_ctrl #(
  parameter int QUIET_CYCLES  = exercise_pkg::QUIET_CYC,
  parameter int TOGGLE_PERIOD = exercise_pkg::TOGGLE_P,
  parameter int NUM_VEC       = exercise_pkg::N_VEC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       busy,
  output logic                       exercise_mode,
  output logic                       toggle,
  output logic [$clog2(NUM_VEC)-1:0] vec_idx
);
  localparam int QW = $clog2(QUIET_CYCLES + 1);
  localparam int RW = $clog2(TOGGLE_PERIOD);
  localparam int VW = $clog2(NUM_VEC);

  logic [QW-1:0] quiet_cnt;
  logic [RW-1:0] rot_cnt;

  assign toggle = exercise_mode && (rot_cnt == RW'(TOGGLE_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quiet_cnt     <= '0;
      exercise_mode <= 1'b0;
      rot_cnt       <= '0;
      vec_idx       <= '0;
    end else begin
      if (busy)
        quiet_cnt <= '0;
      else if (quiet_cnt != QW'(QUIET_CYCLES))
        quiet_cnt <= quiet_cnt + 1'b1;
      exercise_mode <= !busy && (int'(quiet_cnt) >= QUIET_CYCLES - 1);
      if (exercise_mode) begin
        if (toggle) begin
          rot_cnt <= '0;
          vec_idx <= (int'(vec_idx) == NUM_VEC - 1) ? '0 : vec_idx + 1'b1;
        end else begin
          rot_cnt <= rot_cnt + 1'b1;
        end
      end
    end
  end

  if (TOGGLE_PERIOD < 2) begin : g_bad_period
    $error("exercise_ctrl: TOGGLE_PERIOD must be at least 2");
  end
  if (NUM_VEC < 2) begin : g_bad_nvec
    $error("exercise_ctrl: NUM_VEC must be at least 2");
  end
endmodule
