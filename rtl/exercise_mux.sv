// exercise_mux: the exercise multiplexers in front of the critical path logic.
//
// Every input of the critical path logic belongs to one of four classes,
// fixed when the exercise vectors are compacted:
//   MUX_ROM   (MASK_ROM set)   - in exercise mode takes the next ROM bit;
//   MUX_1/0   (MASK_CONST set) - in exercise mode takes CONST_VAL;
//   MUX_X     (neither)        - don't care in every vector: no mux, the
//                                functional input always passes.
// ROM bits are assigned to MUX_ROM inputs in ascending input order. Outside
// exercise mode every output equals `func_in`. Purely combinational.
// The classification is the document's; the defaults reproduce its counts
// (180 ROM, 487 one, 38 zero, 730 unmuxed of 1,435 inputs) with a layout of
// this design's own choosing (see exercise_pkg).
module exercise_mux #(
  parameter int              IN_W       = exercise_pkg::CP_IN_W,
  parameter int              ROM_W      = exercise_pkg::N_ROM,
  parameter logic [IN_W-1:0] MASK_ROM   = IN_W'(exercise_pkg::span(0, exercise_pkg::N_ROM)),
  parameter logic [IN_W-1:0] MASK_CONST = IN_W'(exercise_pkg::span(exercise_pkg::N_ROM,
                                              exercise_pkg::N_ROM + exercise_pkg::N_ONE + exercise_pkg::N_ZERO)),
  parameter logic [IN_W-1:0] CONST_VAL  = IN_W'(exercise_pkg::span(exercise_pkg::N_ROM,
                                              exercise_pkg::N_ROM + exercise_pkg::N_ONE))
) (
  input  logic             exercise_mode,
  input  logic [IN_W-1:0]  func_in,
  input  logic [ROM_W-1:0] rom_in,
  output logic [IN_W-1:0]  mux_out
);
  always_comb begin
    int k;
    k = 0;
    for (int c = 0; c < IN_W; c++) begin
      mux_out[c] = func_in[c];
      if (MASK_ROM[c]) begin
        if (exercise_mode) mux_out[c] = rom_in[k];
        k++;
      end else if (MASK_CONST[c]) begin
        if (exercise_mode) mux_out[c] = CONST_VAL[c];
      end
    end
  end

  if (exercise_pkg::popcount(exercise_pkg::MAX_W'(MASK_ROM)) != ROM_W) begin : g_bad_rom_w
    $error("exercise_mux: MASK_ROM must have ROM_W bits set");
  end
  if ((MASK_ROM & MASK_CONST) != '0) begin : g_bad_masks
    $error("exercise_mux: an input cannot be both a ROM and a constant column");
  end
endmodule
