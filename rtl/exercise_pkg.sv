// exercise_pkg: sizes and helper functions of the exercise-mode logic.
//
// The default sizes are those reported for the exercise logic of the
// reference router: a 1,435-input critical path logic block, eight
// compacted exercise vectors of 180 ROM bits, 487 inputs tied to constant 1
// and 38 to constant 0 in exercise mode, and 730 inputs left unmuxed
// (don't care in every vector). Which input falls in which class depends on
// that router's netlist and is not known here, so the default layout simply
// places the classes in that order (ROM, 1, 0, don't care), as drawn in the
// figure of the compacted exercise logic. The default ROM contents are also
// this design's own: bit j of vector k is parity(k & (j mod 7 + 1)), a
// Walsh-function pattern in which every ROM column is 1 in exactly half of
// the vectors.
package exercise_pkg;

  localparam int MAX_W     = 4096;  // widest vector the helpers handle
  localparam int CP_IN_W   = 1435;  // inputs of the critical path logic
  localparam int CP_OUT_W  = 357;   // outputs (flip-flops) of that logic
  localparam int N_VEC     = 8;     // exercise vectors
  localparam int N_ROM     = 180;   // MUX_ROM columns = ROM width
  localparam int N_ONE     = 487;   // MUX_1 columns
  localparam int N_ZERO    = 38;    // MUX_0 columns
  localparam int N_DC      = 730;   // MUX_X columns (no mux)
  localparam int QUIET_CYC = 16;    // quiescent cycles before exercise mode
  localparam int TOGGLE_P  = 2048;  // exercise cycles per vector

  // bits [lo, hi) set
  function automatic logic [MAX_W-1:0] span(input int lo, input int hi);
    logic [MAX_W-1:0] m;
    m = '0;
    for (int j = lo; j < hi; j++) m[j] = 1'b1;
    return m;
  endfunction

  function automatic int popcount(input logic [MAX_W-1:0] m);
    int n;
    n = 0;
    for (int j = 0; j < MAX_W; j++) n += int'(m[j]);
    return n;
  endfunction

  // default exercise ROM: bit j of vector k
  function automatic logic walsh_bit(input int k, input int j);
    return ^(k[7:0] & 8'((j % 7) + 1));
  endfunction

endpackage
