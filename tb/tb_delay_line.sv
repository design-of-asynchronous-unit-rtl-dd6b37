// tb_delay_line: checks that the delay line returns every input vector
// exactly DEPTH clock periods later, for random 2-bit inputs and the
// default depth of 4.  Outputs during the first DEPTH periods after reset
// must be 0.
module tb_delay_line;
  localparam int DEPTH = 4;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] d, q;
  logic [1:0] hist [$];
  int         checks = 0, failures = 0;

  delay_line dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_q;
    rst_n = 1'b0;
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) hist.push_back(2'b00);
    for (int n = 0; n < 1000; n++) begin
      d = 2'($urandom);
      hist.push_back(d);
      @(negedge clk);
      // after this edge q shows the input applied DEPTH edges ago
      expect_q = hist[hist.size() - DEPTH];
      checks++;
      if (q != expect_q) begin
        failures++;
        $display("FAIL n=%0d q=%b expected %b", n, q, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
