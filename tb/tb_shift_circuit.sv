// tb_shift_circuit: random data and random change pulses; at each clock
// edge the store must take d when c is high and hold otherwise, and q_n
// must always be the complement of q.
module tb_shift_circuit;
  logic       clk = 1'b0;
  logic       rst_n, c;
  logic [1:0] d, q, q_n, model;
  int         checks = 0, failures = 0;

  shift_circuit dut (.clk(clk), .rst_n(rst_n), .c(c), .d(d), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    c = 1'b0;
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = 2'b00;
    for (int n = 0; n < 1000; n++) begin
      c = ($urandom_range(3, 0) == 0);
      d = 2'($urandom);
      if (c) model = d;
      @(negedge clk);
      checks += 2;
      if (q != model)  begin failures++; $display("FAIL q=%b expected %b", q, model); end
      if (q_n != ~q)   begin failures++; $display("FAIL q_n=%b q=%b", q_n, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
