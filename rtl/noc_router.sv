// noc_router: wear-out resistant virtual-channel router for a 2D mesh.
//
// Main idea: the router's critical paths all lie in its allocation stage,
// and at the low loads of real workloads those paths sit at the same logic
// values for long stretches, which ages their PMOS transistors (NBTI). When
// the router has been idle for a while it enters exercise mode: the inputs
// of the allocator are replaced by stored exercise vectors that drive every
// critical node to both values, while the flip-flops after the allocator
// are disabled so that nothing the exercise produces reaches router state.
//
// Pipeline (three stages, as in the document's baseline router):
//   stage 1  flit written into its input VC buffer; a new head flit is
//            routed (X-Y) in the cycle after it arrives;
//   stage 2  combined VC and switch allocation (vc_sw_allocator); the
//            result updates VC status, credits and arbiter pointers and is
//            captured in the stage-2/3 flip-flops (`alloc_q`);
//   stage 3  the granted flits leave their buffers, cross the crossbar and
//            are written to the output registers; a credit goes upstream.
// A head flit that meets no contention appears at `flit_out` four clock
// edges after the edge at which it was presented on `flit_in` (write,
// route, allocate, traverse), body flits one edge sooner.
//
// Exercise logic (exercise_logic): exercise_ctrl watches for QUIET_CYCLES
// idle cycles (nothing arriving, all buffers empty) and raises
// `exercise_mode`; exercise_rom supplies the selected compacted vector from
// a register; exercise_mux drives from it the register outputs that start
// the stage-2 critical paths (`crit`: input VC status, output port and
// output VC, credit and VC-free flags, arbiter pointers). The input VC
// cloud (noc_pkg::vc_request) and the allocator follow the muxes. The
// stage-2/3 flip-flops and all state updates are enabled (ex_out_en) only
// outside exercise mode.
// Exercise mode drops at the first edge after a flit arrives, one cycle
// before that flit can request allocation, so it never delays traffic.
//
// The exercise vectors of this router are this design's own: eight vectors
// chosen so that every register bit that feeds stage 2 (but the always-free
// output VC 0), every Request line and both arbiter levels take different
// values across the set. They are compacted at
// elaboration by the document's rule (inputs constant over all vectors
// become constant muxes, inputs never specified get no mux, the rest become
// ROM columns). The document's own vectors
// belong to its netlist and are not reproduced.
//
// Interface: per port one flit link in and out (flit_t) and one credit link
// each way (credit_t); the upstream router must only send into a VC for
// which it holds a credit (BUF_DEPTH credits per VC after reset).
// Port order: local, east, west, north, south. MY_X/MY_Y place the router in
// the mesh; QUIET_CYCLES = 16 and TOGGLE_PERIOD = 2048 are the document's.
module noc_router
  import noc_pkg::*;
#(
  parameter int MY_X          = 3,
  parameter int MY_Y          = 3,
  parameter int QUIET_CYCLES  = exercise_pkg::QUIET_CYC,
  parameter int TOGGLE_PERIOD = exercise_pkg::TOGGLE_P
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  flit_t   [NUM_PORTS-1:0]   flit_in,
  output credit_t [NUM_PORTS-1:0]   credit_out,
  output flit_t   [NUM_PORTS-1:0]   flit_out,
  input  credit_t [NUM_PORTS-1:0]   credit_in,
  output logic                      exercise_mode,
  output logic [$clog2(exercise_pkg::N_VEC)-1:0] exercise_vec,
  output logic                      exercise_toggle   // vector rotation pulse
);
  localparam int NV = exercise_pkg::N_VEC;

  // ---------------------------------------------------------------------
  // Exercise vectors of this router and their compaction (elaboration time)
  // ---------------------------------------------------------------------
  typedef struct packed {
    crit_in_t val;
    crit_in_t care;   // 0 = don't care
  } ex_vec_t;

  function automatic ex_vec_t ex_vector(input int k);
    ex_vec_t e;
    int      s;
    e = '0;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) begin
        // status cycles idle / waiting / active / active; port k mod p has
        // no flit in vector k; output port and output VC rotate
        s = (i + v + k) % 4;
        e.val.vc[i][v].state    = (s == 0) ? VC_IDLE : (s == 1) ? VC_WAIT : VC_ACTIVE;
        e.val.vc[i][v].has_flit = (i != k % NUM_PORTS);
        e.val.vc[i][v].port     = PORT_W'((i + v + k) % NUM_PORTS);
        e.val.vc[i][v].ovc      = VC_W'((v + k) % NUM_VCS);
        e.care.vc[i][v]         = '1;
      end
    for (int o = 0; o < NUM_PORTS; o++)
      for (int ov = 0; ov < NUM_VCS; ov++) begin
        // VC 0 always available, the others in a rotating pattern
        e.val.ovc_avail[o][ov]  = (ov == 0) || (((o + ov + k) % 3) != 0);
        e.care.ovc_avail[o][ov] = 1'b1;
        e.val.credit_ok[o][ov]  = ((o + ov + k) % 3) != 1;
        e.care.credit_ok[o][ov] = 1'b1;
      end
    // arbiter pointers: every value of each pointer occurs in the set
    for (int i = 0; i < NUM_PORTS; i++) begin
      e.val.prio.in_prio[i]   = VC_W'((i + k) % NUM_VCS);
      e.care.prio.in_prio[i]  = '1;
      e.val.prio.out_prio[i]  = PORT_W'((i + 3 * k) % NUM_PORTS);
      e.care.prio.out_prio[i] = '1;
    end
    return e;
  endfunction

  // columns whose specified value differs between vectors
  function automatic logic [CRIT_IN_W-1:0] rom_mask();
    logic [CRIT_IN_W-1:0] m, seen, first;
    m = '0; seen = '0; first = '0;
    for (int k = 0; k < NV; k++) begin
      ex_vec_t e;
      e = ex_vector(k);
      for (int c = 0; c < CRIT_IN_W; c++)
        if (e.care[c]) begin
          if (seen[c] && first[c] != e.val[c]) m[c] = 1'b1;
          if (!seen[c]) begin seen[c] = 1'b1; first[c] = e.val[c]; end
        end
    end
    return m;
  endfunction

  // columns specified in some vector, with the same value in all of them
  function automatic logic [CRIT_IN_W-1:0] const_mask();
    logic [CRIT_IN_W-1:0] seen;
    seen = '0;
    for (int k = 0; k < NV; k++) seen |= ex_vector(k).care;
    return seen & ~rom_mask();
  endfunction

  function automatic logic [CRIT_IN_W-1:0] const_val();
    logic [CRIT_IN_W-1:0] v;
    v = '0;
    for (int k = 0; k < NV; k++) v |= ex_vector(k).val & ex_vector(k).care;
    return v & const_mask();
  endfunction

  function automatic int count_ones(input logic [CRIT_IN_W-1:0] m);
    int n;
    n = 0;
    for (int c = 0; c < CRIT_IN_W; c++) n += int'(m[c]);
    return n;
  endfunction

  localparam logic [CRIT_IN_W-1:0] EX_ROM_MASK = rom_mask();
  localparam logic [CRIT_IN_W-1:0] EX_CONST    = const_mask();
  localparam logic [CRIT_IN_W-1:0] EX_CVAL     = const_val();
  localparam int                    EX_ROM_W    = count_ones(EX_ROM_MASK);

  // ROM word k: the ROM columns of vector k in ascending input order,
  // don't-care entries stored as 0
  function automatic logic [NV-1:0][EX_ROM_W-1:0] rom_content();
    logic [NV-1:0][EX_ROM_W-1:0] r;
    r = '0;
    for (int k = 0; k < NV; k++) begin
      ex_vec_t e;
      int      j;
      e = ex_vector(k);
      j = 0;
      for (int c = 0; c < CRIT_IN_W; c++)
        if (EX_ROM_MASK[c]) begin
          r[k][j] = e.val[c] & e.care[c];
          j++;
        end
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Input channels
  // ---------------------------------------------------------------------
  flit_t      [NUM_PORTS-1:0][NUM_VCS-1:0] front;
  logic       [NUM_PORTS-1:0][NUM_VCS-1:0] vc_empty;
  port_e      [NUM_PORTS-1:0][NUM_VCS-1:0] vc_out_port;
  logic       [NUM_PORTS-1:0][NUM_VCS-1:0][VC_W-1:0] vc_out_vc;
  logic       [NUM_PORTS-1:0][NUM_VCS-1:0] credit_ok_all;
  alloc_in_t  ain_func, ain;          // allocator inputs: functional, applied
  crit_in_t   crit_func, crit;        // stage-2 inputs: functional, applied
  vc_st_t     [NUM_PORTS-1:0][NUM_VCS-1:0] vc_st;
  alloc_out_t aout, alloc_q;
  alloc_prio_t prio_q;
  logic       [NUM_PORTS-1:0][NUM_VCS-1:0] vc_grant, vc_pop;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
      input_vc #(.MY_X(MY_X), .MY_Y(MY_Y)) u_vc (
        .clk         (clk),
        .rst_n       (rst_n),
        .push        (flit_in[i].valid && flit_in[i].vc == VC_W'(v)),
        .push_flit   (flit_in[i]),
        .credit_ok   (credit_ok_all),
        .grant       (vc_grant[i][v]),
        .grant_new_vc(aout.new_vc[i]),
        .grant_out_vc(aout.out_vc[i]),
        .pop         (vc_pop[i][v]),
        .front_flit  (front[i][v]),
        .req         (ain_func.req[i][v]),
        .route       (ain_func.route[i][v]),
        .need_vc     (ain_func.need_vc[i][v]),
        .st          (vc_st[i][v]),
        .out_port    (vc_out_port[i][v]),
        .out_vc      (vc_out_vc[i][v]),
        .empty       (vc_empty[i][v])
      );
    end
  end

  // ---------------------------------------------------------------------
  // Stage 2: exercise muxes + allocator; state updates gated by exercise
  // ---------------------------------------------------------------------
  logic [$clog2(NV)-1:0] vec_idx;
  logic                  ex_toggle;
  logic                  router_busy;

  assign router_busy = (|{flit_in[0].valid, flit_in[1].valid, flit_in[2].valid,
                          flit_in[3].valid, flit_in[4].valid}) || !(&vc_empty);

  logic ex_out_en;

  exercise_logic #(
    .IN_W         (CRIT_IN_W),
    .NUM_VEC      (NV),
    .ROM_W        (EX_ROM_W),
    .QUIET_CYCLES (QUIET_CYCLES),
    .TOGGLE_PERIOD(TOGGLE_PERIOD),
    .MASK_ROM     (EX_ROM_MASK),
    .MASK_CONST   (EX_CONST),
    .CONST_VAL    (EX_CVAL),
    .CONTENT      (rom_content())
  ) u_ex (
    .clk          (clk),
    .rst_n        (rst_n),
    .busy         (router_busy),
    .func_in      (crit_func),
    .mux_out      (crit),
    .out_en       (ex_out_en),
    .exercise_mode(exercise_mode),
    .toggle       (ex_toggle),
    .vec_idx      (vec_idx)
  );
  assign exercise_vec    = vec_idx;
  assign exercise_toggle = ex_toggle;

  vc_sw_allocator u_alloc (
    .clk      (clk),
    .rst_n    (rst_n),
    .update_en(ex_out_en),
    .ain      (ain),
    .aout     (aout),
    .prio_q   (prio_q)
  );

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) begin
        vc_grant[i][v] = ex_out_en && aout.in_grant[i] && aout.in_vc[i] == VC_W'(v);
        vc_pop[i][v]   = alloc_q.in_grant[i] && alloc_q.in_vc[i] == VC_W'(v);
      end
  end

  // stage-2/3 flip-flops, disabled in exercise mode
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              alloc_q <= '0;
    else if (ex_out_en)      alloc_q <= aout;
  end

  // ---------------------------------------------------------------------
  // Stage 3: crossbar and output channels
  // ---------------------------------------------------------------------
  flit_t [NUM_PORTS-1:0]                xb_in, xb_out;
  logic  [NUM_PORTS-1:0][NUM_PORTS-1:0] xb_sel;
  logic  [NUM_PORTS-1:0][VC_W-1:0]      xb_vc;
  logic  [NUM_PORTS-1:0]                oc_alloc, oc_new;
  logic  [NUM_PORTS-1:0][VC_W-1:0]      oc_vc;
  logic  [NUM_PORTS-1:0][NUM_VCS-1:0]   ovc_avail_all;

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      xb_in[i]            = front[i][alloc_q.in_vc[i]];
      credit_out[i].valid = alloc_q.in_grant[i];
      credit_out[i].vc    = alloc_q.in_vc[i];
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      xb_vc[o]    = '0;
      oc_alloc[o] = 1'b0;
      oc_new[o]   = 1'b0;
      oc_vc[o]    = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        xb_sel[o][i] = alloc_q.in_grant[i] && alloc_q.in_port[i] == PORT_W'(o);
        if (xb_sel[o][i]) xb_vc[o] = vc_out_vc[i][alloc_q.in_vc[i]];
        if (ex_out_en && aout.in_grant[i] && aout.in_port[i] == PORT_W'(o)) begin
          oc_alloc[o] = 1'b1;
          oc_new[o]   = aout.new_vc[i];
          oc_vc[o]    = aout.new_vc[i] ? aout.out_vc[i] : vc_out_vc[i][aout.in_vc[i]];
        end
      end
    end
    ain_func.ovc_avail = ovc_avail_all;
    ain_func.prio      = prio_q;
    crit_func.vc        = vc_st;
    crit_func.credit_ok = credit_ok_all;
    crit_func.ovc_avail = ovc_avail_all;
    crit_func.prio      = prio_q;
  end

  // the input VC clouds after the exercise muxes
  assign ain = alloc_inputs(crit);

  crossbar u_xbar (
    .in_flit (xb_in),
    .sel     (xb_sel),
    .out_flit(xb_out)
  );

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    output_channel u_oc (
      .clk         (clk),
      .rst_n       (rst_n),
      .alloc_valid (oc_alloc[o]),
      .alloc_new_vc(oc_new[o]),
      .alloc_vc    (oc_vc[o]),
      .xb_flit     (xb_out[o]),
      .xb_vc       (xb_vc[o]),
      .credit_in   (credit_in[o]),
      .flit_out    (flit_out[o]),
      .ovc_avail   (ovc_avail_all[o]),
      .credit_ok   (credit_ok_all[o])
    );
  end

  // nothing captured after the allocator may change during exercise mode
  assert property (@(posedge clk) disable iff (!rst_n)
                   exercise_mode |-> (alloc_q.in_grant == '0))
    else $error("noc_router: a grant is pending in exercise mode");
  assert property (@(posedge clk) disable iff (!rst_n) !exercise_mode |-> (ain == ain_func))
    else $error("noc_router: allocator inputs altered outside exercise mode");
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(xb_sel[o]))
      else $error("noc_router: two inputs selected for one output");
  end
endmodule
