// tb_monostable: checks the one-shot with WIDTH = 3 against a reference
// that counts clock periods since the last rising edge of the trigger: q
// must be high exactly in the period of a rising edge and the WIDTH-1
// periods after it.  Trigger patterns include short pulses, long levels and
// edges that arrive during a running pulse (retrigger).
module tb_monostable;
  localparam int WIDTH = 3;
  logic clk = 1'b0;
  logic rst_n, trig, q;
  int   checks = 0, failures = 0;
  int   since_edge;
  int   pulses = 0, retriggers = 0;
  logic trig_prev;

  monostable #(.WIDTH(WIDTH)) dut (.clk(clk), .rst_n(rst_n), .trig(trig), .q(q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expect_q;
    rst_n = 1'b0;
    trig = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    trig_prev = 1'b0;
    since_edge = 1000;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(2, 0) == 0) trig = ~trig;
      if (trig && !trig_prev) begin
        if (since_edge < WIDTH) retriggers++;
        since_edge = 0;
        pulses++;
      end
      #1;
      expect_q = (since_edge < WIDTH);
      checks++;
      if (q != expect_q) begin
        failures++;
        $display("FAIL n=%0d trig=%b q=%b expected %b", n, trig, q, expect_q);
      end
      trig_prev = trig;
      @(negedge clk);
      if (since_edge < 1000) since_edge++;
    end
    checks++;
    if (pulses == 0 || retriggers == 0) failures++;
    $display("pulses=%0d retriggers=%0d", pulses, retriggers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
