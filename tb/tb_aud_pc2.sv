// tb_aud_pc2: pulse-controlled unit delay with two shift circuits, in both
// forms: circuit 2 (monostable detector, the default) and circuit 3
// (delay-type detector), N = 2, driven by the same input.
//
// The input changes as fast as these circuits allow: in a random pattern,
// often in consecutive clock periods and often on both bits at once.  At
// every clock period both outputs are compared with the input as it was
// before its most recent change (after the one-period transmission delay),
// and the change pulse with the change itself.  A 3 x 3 instance of
// circuit 2 is checked the same way on a 3-bit input.
module tb_aud_pc2;
  import aud_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] x, z2, z3, z2n, z3n, exp2, x_before;
  logic [2:0] x3, z33, z33n, exp3;
  logic       c2, c3, c33;
  int         checks = 0, failures = 0;
  int         changes = 0, both = 0, back_to_back = 0;

  aud_pc2 dut2 (.clk(clk), .rst_n(rst_n), .x(x), .z(z2), .z_n(z2n), .c(c2));
  aud_pc2 #(.N(2), .KIND(DET_DELAY)) dut3 (
    .clk(clk), .rst_n(rst_n), .x(x), .z(z3), .z_n(z3n), .c(c3));
  aud_pc2 #(.N(3)) dut33 (.clk(clk), .rst_n(rst_n), .x(x3), .z(z33), .z_n(z33n), .c(c33));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b z2=%b z3=%b exp=%b x3=%b z33=%b exp3=%b at %0t",
               what, x, z2, z3, exp2, x3, z33, exp3, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] nx;
    logic [2:0] nx3;
    bit         prev_changed;
    rst_n = 1'b0;
    x = '0;
    x3 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp2 = '0;
    exp3 = '0;
    prev_changed = 0;
    for (int n = 0; n < 4000; n++) begin
      // outputs after the edge that followed the last input step
      check(z2 == exp2, "circuit 2 output");
      check(z3 == exp2, "circuit 3 output");
      check(z33 == exp3, "3x3 circuit 2 output");
      check(z2n == ~z2, "complement rail");
      nx  = ($urandom_range(1, 0) == 0) ? x  : 2'($urandom);
      nx3 = ($urandom_range(1, 0) == 0) ? x3 : 3'($urandom);
      if (nx != x) begin
        changes++;
        if ((nx ^ x) == 2'b11) both++;
        if (prev_changed) back_to_back++;
        exp2 = x;
      end
      prev_changed = (nx != x);
      if (nx3 != x3) exp3 = x3;
      x_before = x;
      x  = nx;
      x3 = nx3;
      #1;
      check(c2 == (x != x_before), "circuit 2 pulse");
      check(c3 == (x != x_before), "circuit 3 pulse");
      @(negedge clk);
    end
    check(both > 0 && back_to_back > 0, "fast and simultaneous changes exercised");
    $display("changes=%0d simultaneous=%0d back_to_back=%0d", changes, both, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
