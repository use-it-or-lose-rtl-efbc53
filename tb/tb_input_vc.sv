// tb_input_vc: one input VC of a router at (3,3). Sends a 3-flit packet
// eastwards and a 1-flit packet to the local port, and checks routing one
// cycle after arrival, the Request / Route / need-VC outputs in each status,
// the credit stall, the output VC kept after the head grant, the return to
// idle after the tail grant and the flit order at the read side.
module tb_input_vc;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, grant, grant_new_vc, pop;
  flit_t push_flit, front_flit;
  logic [NUM_PORTS-1:0][NUM_VCS-1:0] credit_ok;
  logic [VC_W-1:0] grant_out_vc, out_vc;
  logic req, need_vc, empty;
  logic [NUM_PORTS-1:0] route;
  port_e out_port;
  vc_st_t st;
  int checks = 0, failures = 0;

  input_vc #(.MY_X(3), .MY_Y(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic flit_t mk(bit h, bit t, int x, int y, int d);
    flit_t f;
    f = '0; f.valid = 1; f.head = h; f.tail = t;
    f.dest_x = COORD_W'(x); f.dest_y = COORD_W'(y); f.data = 32'(d);
    return f;
  endfunction

  task automatic step();
    @(posedge clk); #1;
    push = 0; grant = 0; grant_new_vc = 0; pop = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; grant = 0; grant_new_vc = 0; pop = 0; grant_out_vc = '0;
    push_flit = '0; credit_ok = '1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(empty && !req, "empty after reset");
    push = 1; push_flit = mk(1, 0, 5, 3, 100); step();
    check(!req, "no request before routing");
    push = 1; push_flit = mk(0, 0, 5, 3, 101); step();
    check(req && need_vc && route == 5'b00010 && out_port == PORT_EAST, "head routed east, needs VC");
    check(st.state == VC_WAIT && st.has_flit && st.port == 3'(PORT_EAST), "stage-2 registers: waiting, east");
    push = 1; push_flit = mk(0, 1, 5, 3, 102);
    grant = 1; grant_new_vc = 1; grant_out_vc = 2'd2; step();
    check(!need_vc && out_vc == 2'd2 && req, "output VC 2 held, body requests");
    check(front_flit.data == 32'd100, "head at read side");
    pop = 1; step();
    credit_ok[PORT_EAST][2] = 1'b0; #1;
    check(!req, "credit stall blocks request");
    credit_ok[PORT_EAST][2] = 1'b1; #1;
    check(req, "request back with credit");
    grant = 1; step();
    grant = 1; pop = 1; step();
    check(!req && !need_vc, "idle after tail grant");
    check(front_flit.data == 32'd102, "tail at read side");
    pop = 1; step();
    check(empty, "buffer empty");
    // single-flit packet for the local port, granted with VC 1
    push = 1; push_flit = mk(1, 1, 3, 3, 200); step();
    step();
    check(req && need_vc && route == 5'b00001, "local packet routed to port 0");
    grant = 1; grant_new_vc = 1; grant_out_vc = 2'd1; step();
    check(!req && !need_vc, "1-flit packet done");
    // buffer fill: 4 flits, all readable in order
    for (int k = 0; k < BUF_DEPTH; k++) begin
      pop = (k == 0);
      push = 1; push_flit = mk(k == 0, k == BUF_DEPTH - 1, 1, 3, 300 + k); step();
    end
    check(dut.count == 3'(BUF_DEPTH), "buffer holds 4 flits");
    step();
    check(route == 5'b00100 && req, "packet west");
    for (int k = 0; k < BUF_DEPTH; k++) begin
      check(front_flit.data == 32'(300 + k), "flit order");
      grant = 1; grant_new_vc = (k == 0); grant_out_vc = 2'd0; pop = 1'b1;
      step();
    end
    check(empty && !req, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
