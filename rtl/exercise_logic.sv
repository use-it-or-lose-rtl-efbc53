// exercise_logic: the complete exercise-mode addition placed around a block
// of critical path logic.
//
// It sits between the input flip-flops and the critical path logic (the
// allocator in this router) and also drives the enable of the flip-flops
// that follow it:
//   exercise_ctrl  raises `exercise_mode` after QUIET_CYCLES quiescent
//                  cycles and picks a new vector every TOGGLE_PERIOD
//                  exercise cycles;
//   exercise_rom   holds the NUM_VEC compacted vectors and registers the
//                  selected word;
//   exercise_mux   feeds the critical path logic: ROM bits, constants or the
//                  functional inputs, according to each input's class.
// `out_en` is low in exercise mode, so the flip-flops after the critical path
// logic (and any state the logic updates) hold their value.
//
// Timing: `exercise_mode` rises QUIET_CYCLES edges after `busy` fell and
// falls at the first edge with `busy` high; `mux_out` equals `func_in`
// combinationally whenever exercise mode is off. After a rotation the new
// ROM word is applied one cycle later (registered ROM output).
// Defaults are the document's sizes: 1,435 inputs, an 8 x 180 ROM, 487
// constant-1 and 38 constant-0 inputs, 730 unmuxed, 16 quiet cycles and a
// 2,048-cycle rotation. Input layout and ROM contents default to this
// design's own choices (see exercise_pkg).
module exercise_logic #(
  parameter int IN_W          = exercise_pkg::CP_IN_W,
  parameter int NUM_VEC       = exercise_pkg::N_VEC,
  parameter int ROM_W         = exercise_pkg::N_ROM,
  parameter int QUIET_CYCLES  = exercise_pkg::QUIET_CYC,
  parameter int TOGGLE_PERIOD = exercise_pkg::TOGGLE_P,
  parameter logic [IN_W-1:0] MASK_ROM   = IN_W'(exercise_pkg::span(0, exercise_pkg::N_ROM)),
  parameter logic [IN_W-1:0] MASK_CONST = IN_W'(exercise_pkg::span(exercise_pkg::N_ROM,
                                              exercise_pkg::N_ROM + exercise_pkg::N_ONE + exercise_pkg::N_ZERO)),
  parameter logic [IN_W-1:0] CONST_VAL  = IN_W'(exercise_pkg::span(exercise_pkg::N_ROM,
                                              exercise_pkg::N_ROM + exercise_pkg::N_ONE)),
  parameter logic [NUM_VEC-1:0][ROM_W-1:0] CONTENT = default_content()
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       busy,          // router not quiescent
  input  logic [IN_W-1:0]            func_in,       // from the input flip-flops
  output logic [IN_W-1:0]            mux_out,       // to the critical path logic
  output logic                       out_en,        // enable of the following flip-flops
  output logic                       exercise_mode,
  output logic                       toggle,
  output logic [$clog2(NUM_VEC)-1:0] vec_idx
);
  function automatic logic [NUM_VEC-1:0][ROM_W-1:0] default_content();
    logic [NUM_VEC-1:0][ROM_W-1:0] c;
    for (int k = 0; k < NUM_VEC; k++)
      for (int j = 0; j < ROM_W; j++)
        c[k][j] = exercise_pkg::walsh_bit(k, j);
    return c;
  endfunction

  logic [ROM_W-1:0] rom_q;

  exercise_ctrl #(
    .QUIET_CYCLES (QUIET_CYCLES),
    .TOGGLE_PERIOD(TOGGLE_PERIOD),
    .NUM_VEC      (NUM_VEC)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .busy         (busy),
    .exercise_mode(exercise_mode),
    .toggle       (toggle),
    .vec_idx      (vec_idx)
  );

  exercise_rom #(
    .NUM_VEC(NUM_VEC),
    .ROM_W  (ROM_W),
    .CONTENT(CONTENT)
  ) u_rom (
    .clk  (clk),
    .rst_n(rst_n),
    .addr (vec_idx),
    .vec  (rom_q)
  );

  exercise_mux #(
    .IN_W      (IN_W),
    .ROM_W     (ROM_W),
    .MASK_ROM  (MASK_ROM),
    .MASK_CONST(MASK_CONST),
    .CONST_VAL (CONST_VAL)
  ) u_mux (
    .exercise_mode(exercise_mode),
    .func_in      (func_in),
    .rom_in       (rom_q),
    .mux_out      (mux_out)
  );

  assign out_en = !exercise_mode;
endmodule
