// tb_asr_pc: 2 x 2 shift register of two pulse-controlled unit delays
// (circuit 2).  The input changes at random, often in consecutive clock
// periods and on both bits at once.  Reference: each stage is modelled by
// the unit-delay definition itself (its output is its input from before
// that input's last change, one period after the change), stage by stage.
// Also checks that every stage makes one pulse per change of its input and
// that the stage delay does not grow along the register.
module tb_asr_pc;
  localparam int N = 2, K = 2;
  logic               clk = 1'b0;
  logic               rst_n;
  logic [N-1:0]       x, z;
  logic [K-1:0][N-1:0] taps;
  logic [K-1:0]       c;
  logic [N-1:0]       in_now [K+1];
  logic [N-1:0]       in_last [K];   // each stage's input one period ago
  logic [N-1:0]       out_ref [K];
  int                 checks = 0, failures = 0;

  asr_pc dut (.clk(clk), .rst_n(rst_n), .x(x), .taps(taps), .z(z), .c(c));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < K; k++) begin
      in_last[k] = '0;
      out_ref[k] = '0;
    end
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(1, 0) == 0) x = N'($urandom);
      #1;
      // pulses: stage k fires when its present input differs from last period's
      in_now[0] = x;
      for (int k = 0; k < K; k++) begin
        in_now[k+1] = out_ref[k];
        checks++;
        if (c[k] != (in_now[k] != in_last[k])) begin
          failures++;
          $display("FAIL n=%0d stage %0d pulse", n, k + 1);
        end
      end
      // the reference stages take their new outputs at this edge
      for (int k = K - 1; k >= 0; k--)
        if (in_now[k] != in_last[k]) out_ref[k] = in_last[k];
      for (int k = 0; k < K; k++) in_last[k] = in_now[k];
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        checks++;
        if (taps[k] != out_ref[k]) begin
          failures++;
          $display("FAIL n=%0d stage %0d: %b expected %b", n, k + 1, taps[k], out_ref[k]);
        end
      end
      checks++;
      if (z != taps[K-1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
