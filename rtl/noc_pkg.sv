// noc_pkg: shared constants and types of the wear-out resistant mesh router.
//
// The router is a 5-port, 4-VC virtual-channel router for an 8x8 2D mesh
// with X-Y dimension-order routing (port count, VC count, mesh size and
// routing from the document's system setup). Flit payload width, buffer
// depth and the flit format are this design's own choices.
//
// Port numbering (own choice): 0 = local PE, 1 = east (+x), 2 = west (-x),
// 3 = north (+y), 4 = south (-y).
package noc_pkg;

  localparam int NUM_PORTS = 5;    // p: four mesh neighbours + local PE
  localparam int NUM_VCS   = 4;    // v: virtual channels per port
  localparam int MESH_X    = 8;    // 8x8 mesh
  localparam int MESH_Y    = 8;
  localparam int BUF_DEPTH = 4;    // flits per VC buffer (own choice)
  localparam int DATA_W    = 32;   // payload bits per flit (own choice)

  localparam int PORT_W  = $clog2(NUM_PORTS);
  localparam int VC_W    = $clog2(NUM_VCS);
  localparam int COORD_W = $clog2(MESH_X);
  localparam int CRED_W  = $clog2(BUF_DEPTH + 1);

  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_EAST  = 3'd1,
    PORT_WEST  = 3'd2,
    PORT_NORTH = 3'd3,
    PORT_SOUTH = 3'd4
  } port_e;

  // One flit on a link. The destination is carried by every flit of a
  // packet, only the head flit's copy is used for routing.
  typedef struct packed {
    logic               valid;
    logic               head;
    logic               tail;
    logic [VC_W-1:0]    vc;
    logic [COORD_W-1:0] dest_x;
    logic [COORD_W-1:0] dest_y;
    logic [DATA_W-1:0]  data;
  } flit_t;

  // Credit returned upstream when a buffer slot of one VC is freed.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // Priority pointers of the allocator's arbiters: one per input port (picks
  // among v VCs) and one per output port (picks among p input ports).
  typedef struct packed {
    logic [NUM_PORTS-1:0][VC_W-1:0]   in_prio;
    logic [NUM_PORTS-1:0][PORT_W-1:0] out_prio;
  } alloc_prio_t;

  // The inputs of the allocator: Request, Route and need-VC of every input
  // VC (formed from the VC registers by vc_request below), the VC-free flags
  // of the output channels and the arbiter pointers.
  typedef struct packed {
    logic [NUM_PORTS-1:0][NUM_VCS-1:0]                req;       // Request, p x v
    logic [NUM_PORTS-1:0][NUM_VCS-1:0][NUM_PORTS-1:0] route;     // Route, p x v x p (one-hot)
    logic [NUM_PORTS-1:0][NUM_VCS-1:0]                need_vc;   // head flit still needs an output VC
    logic [NUM_PORTS-1:0][NUM_VCS-1:0]                ovc_avail; // output VC free with a credit (per output port)
    alloc_prio_t                                      prio;      // arbiter pointers
  } alloc_in_t;

  localparam int ALLOC_IN_W = $bits(alloc_in_t);

  // Status of an input VC (see input_vc).
  typedef enum logic [1:0] {VC_IDLE, VC_WAIT, VC_ACTIVE} vc_state_e;

  // The registers of one input VC that start the stage-2 critical paths.
  typedef struct packed {
    logic [1:0]        state;     // vc_state_e value
    logic              has_flit;  // a flit still waits for allocation
    logic [PORT_W-1:0] port;      // output port of the packet
    logic [VC_W-1:0]   ovc;       // output VC held by the packet
  } vc_st_t;

  // The inputs of the whole stage-2 critical path logic: the input VC
  // registers, the downstream credit and VC-free flags of the output
  // channels, and the arbiter pointers. This is the vector that the
  // exercise multiplexers can replace.
  typedef struct packed {
    vc_st_t [NUM_PORTS-1:0][NUM_VCS-1:0] vc;
    logic   [NUM_PORTS-1:0][NUM_VCS-1:0] credit_ok;  // [output port][output VC]
    logic   [NUM_PORTS-1:0][NUM_VCS-1:0] ovc_avail;  // [output port][output VC]
    alloc_prio_t                         prio;
  } crit_in_t;

  localparam int CRIT_IN_W = $bits(crit_in_t);

  // Request, Route and need-VC of one input VC.
  typedef struct packed {
    logic                 req;
    logic [NUM_PORTS-1:0] route;
    logic                 need_vc;
  } vc_req_t;

  // The combinational cloud of an input VC: a VC waiting for an output VC
  // requests whenever it holds a flit; an active VC requests while its
  // output VC has a credit; Route is the stored output port, one-hot.
  function automatic vc_req_t vc_request(input vc_st_t s,
                                         input logic [NUM_PORTS-1:0][NUM_VCS-1:0] credit_ok);
    vc_req_t r;
    r = '0;
    r.need_vc = (s.state == VC_WAIT);
    if (s.state == VC_WAIT || s.state == VC_ACTIVE)
      for (int o = 0; o < NUM_PORTS; o++) r.route[o] = (s.port == PORT_W'(o));
    if (s.has_flit) begin
      if (s.state == VC_WAIT)   r.req = 1'b1;
      if (s.state == VC_ACTIVE) r.req = credit_ok[s.port][s.ovc];
    end
    return r;
  endfunction

  // The allocator inputs that the critical path logic derives from c.
  function automatic alloc_in_t alloc_inputs(input crit_in_t c);
    alloc_in_t a;
    vc_req_t   r;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++) begin
        r = vc_request(c.vc[i][v], c.credit_ok);
        a.req[i][v]     = r.req;
        a.route[i][v]   = r.route;
        a.need_vc[i][v] = r.need_vc;
      end
    a.ovc_avail = c.ovc_avail;
    a.prio      = c.prio;
    return a;
  endfunction

  // The outputs of the allocator, captured by the stage-2/3 flip-flops.
  typedef struct packed {
    logic [NUM_PORTS-1:0]                  in_grant;  // input port i has a granted VC
    logic [NUM_PORTS-1:0][VC_W-1:0]        in_vc;     // which input VC of port i
    logic [NUM_PORTS-1:0][PORT_W-1:0]      in_port;   // output port it goes to
    logic [NUM_PORTS-1:0][VC_W-1:0]        out_vc;    // output VC for a head flit
    logic [NUM_PORTS-1:0]                  new_vc;    // the grant also allocates out_vc
  } alloc_out_t;

endpackage
