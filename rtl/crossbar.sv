// crossbar: stage 3 of the router, a p x p switch.
//
// Output port o forwards the flit of the input port selected by the one-hot
// `sel[o]`; with no selection its flit is all zero (valid low). Purely
// combinational; the select lines come from the flip-flops that capture the
// allocator result (the "crossbar control" of the document's stage-2
// figure). Mux structure is this design's choice.
module crossbar
  import noc_pkg::*;
(
  input  flit_t [NUM_PORTS-1:0]                in_flit,
  input  logic  [NUM_PORTS-1:0][NUM_PORTS-1:0] sel,      // [output][input], one-hot or zero
  output flit_t [NUM_PORTS-1:0]                out_flit
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (sel[o][i]) out_flit[o] = out_flit[o] | in_flit[i];
    end
  end

endmodule
