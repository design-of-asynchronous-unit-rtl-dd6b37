// tb_aud_pc1: pulse-controlled unit delay, circuit 1, at its defaults
// (N = 2, input delay 4 periods, pulse 1 period).
//
// Random input vectors, including changes of both bits at once, each held
// for at least DELAY periods (the resolution time of this circuit).  For
// every change the testbench checks: exactly one change pulse; z still the
// old output during the period of the change; z equal to the input from
// before the change one period later (the constant transmission delay);
// z unchanged until the next change.
module tb_aud_pc1;
  localparam int N = 2, DELAY = 4;
  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] x, z, z_n, x_prev, z_old;
  logic         c;
  int           checks = 0, failures = 0;
  int           pulses = 0, changes = 0, both = 0;

  aud_pc1 dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z), .z_n(z_n), .c(c));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && c) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b z=%b x_prev=%b at %0t", what, x, z, x_prev, $time);
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
    logic [N-1:0] nx;
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (DELAY) @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      do nx = N'($urandom); while (nx == x);
      if ((nx ^ x) == '1) both++;
      x_prev = x;
      z_old  = z;
      x = nx;
      changes++;
      #1;
      check(c, "change pulse present");
      check(z == z_old, "output waits for the pulse");
      @(negedge clk);
      check(z == x_prev, "z one period after change");
      check(z_n == ~z, "complement rail");
      check(!c, "pulse one period wide");
      repeat (DELAY - 1 + $urandom_range(2, 0)) @(negedge clk);
      check(z == x_prev, "z held until next change");
    end
    check(pulses == changes, "one pulse per change");
    check(both > 0, "simultaneous changes exercised");
    $display("changes=%0d pulses=%0d simultaneous=%0d", changes, pulses, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
