// tb_output_channel: credit and VC bookkeeping of one output port. Uses up
// all four credits of a VC, checks credit_ok / ovc_avail fall and rise with
// returned credits, checks that a head grant marks the VC busy until its
// tail flit passes, and that the output register rewrites the VC field.
module tb_output_channel;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc_valid, alloc_new_vc;
  logic [VC_W-1:0] alloc_vc, xb_vc;
  flit_t xb_flit, flit_out;
  credit_t credit_in;
  logic [NUM_VCS-1:0] ovc_avail, credit_ok;
  int checks = 0, failures = 0;

  output_channel dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input bit av, input bit nv, input int vc, input bit xv, input bit xt,
                     input int xvc, input bit cv, input int cvc);
    @(negedge clk);
    alloc_valid = av; alloc_new_vc = nv; alloc_vc = VC_W'(vc);
    xb_flit = '0; xb_flit.valid = xv; xb_flit.tail = xt; xb_flit.vc = 2'd3;
    xb_flit.data = 32'hABCD0000 + 32'(xvc); xb_vc = VC_W'(xvc);
    credit_in.valid = cv; credit_in.vc = VC_W'(cvc);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_valid = 0; alloc_new_vc = 0; alloc_vc = '0; xb_flit = '0; xb_vc = '0; credit_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(ovc_avail == 4'hf && credit_ok == 4'hf, "all VCs free after reset");
    // head on VC1, then three body flits: four credits used
    cyc(1, 1, 1, 0, 0, 0, 0, 0);
    check(ovc_avail == 4'b1101 && credit_ok == 4'hf, "VC1 busy after head grant");
    cyc(1, 0, 1, 1, 0, 1, 0, 0);
    check(flit_out.valid && flit_out.vc == 2'd1 && flit_out.data == 32'hABCD0001, "flit out on VC1");
    cyc(1, 0, 1, 1, 0, 1, 0, 0);
    cyc(1, 0, 1, 1, 0, 1, 0, 0);
    check(credit_ok == 4'b1101, "VC1 out of credits");
    // one credit back, simultaneously the last flit (tail) of VC1 leaves
    cyc(0, 0, 0, 1, 1, 1, 1, 1);
    check(credit_ok == 4'hf, "VC1 credit returned");
    check(ovc_avail == 4'b1111, "VC1 free after tail");
    check(flit_out.valid && flit_out.tail, "tail flit registered");
    cyc(0, 0, 0, 0, 0, 0, 0, 0);
    check(!flit_out.valid, "output idle");
    // credits of VC1: 1 now; return the other three
    cyc(0, 0, 0, 0, 0, 0, 1, 1);
    cyc(0, 0, 0, 0, 0, 0, 1, 1);
    cyc(1, 1, 1, 0, 0, 0, 1, 1);   // grant and credit in the same cycle
    check(dut.credits[1] == 3'd3, "credit count after simultaneous grant and return");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
