// exercise_rom: read-only store of the compacted exercise vectors.
//
// NUM_VEC words of ROM_W bits; only the columns whose exercise value changes
// from vector to vector are stored (the others become constant or absent
// multiplexer inputs, see exercise_mux). The word addressed by `addr` is
// registered, so the vector reaches the multiplexers from a flip-flop one
// cycle after `addr` changes, keeping the ROM off the critical path. The
// 8 x 180 default size is the document's; the default contents are this
// design's own (see exercise_pkg), since the document's vectors are
// specific to its netlist.
module exercise_rom #(
  parameter int NUM_VEC = exercise_pkg::N_VEC,
  parameter int ROM_W   = exercise_pkg::N_ROM,
  parameter logic [NUM_VEC-1:0][ROM_W-1:0] CONTENT = default_content()
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(NUM_VEC)-1:0] addr,
  output logic [ROM_W-1:0]           vec
);
  function automatic logic [NUM_VEC-1:0][ROM_W-1:0] default_content();
    logic [NUM_VEC-1:0][ROM_W-1:0] c;
    for (int k = 0; k < NUM_VEC; k++)
      for (int j = 0; j < ROM_W; j++)
        c[k][j] = exercise_pkg::walsh_bit(k, j);
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vec <= '0;
    else        vec <= CONTENT[addr];
  end
endmodule
