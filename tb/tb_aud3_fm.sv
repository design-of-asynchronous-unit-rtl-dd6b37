// tb_aud3_fm: self-checking test of the 3 x 3 fundamental-mode unit delay.
//
// A random walk of single-bit input changes (the only changes the
// fundamental mode allows), each held for a few clock periods.  After each
// change the testbench checks that z equals the input triple from before the
// change one clock period later, that the circuit reports itself stable, and
// that in the period of the change z showed either its old or its final
// value and nothing else.  Every one of the 24 possible single-bit
// transitions is checked to have occurred.
module tb_aud3_fm;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] x, z, x_prev, z_before;
  logic       stable;
  int         checks = 0, failures = 0;
  bit [23:0]  seen;   // transition index {from[2:0], bit[1:0]}

  aud3_fm dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z), .stable(stable));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b z=%b x_prev=%b at %0t", what, x, z, x_prev, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    seen = '0;
    rst_n = 1'b0;
    x = 3'b000;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      b = $urandom_range(2, 0);
      x_prev = x;
      z_before = z;
      seen[x_prev * 3 + b] = 1'b1;
      x[b] = ~x[b];
      #1;
      // in the period of the change: old or final value only
      if (n > 0) check(z == z_before || z == x_prev, "transient output");
      @(negedge clk);
      if (n > 0) begin
        check(z == x_prev, "z after change");
        check(stable, "stable after one period");
      end
      repeat ($urandom_range(2, 0)) @(negedge clk);
      if (n > 0) check(z == x_prev, "z held");
    end
    for (int i = 0; i < 24; i++) check(seen[i], "every transition exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
