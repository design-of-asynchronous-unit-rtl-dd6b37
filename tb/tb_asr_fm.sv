// tb_asr_fm: 2 x 2 shift register of two fundamental-mode unit delays.
// Single-bit input changes, each held K+1 = 3 clock periods so the last
// stage can settle.  Stage k must show the input as it was k changes ago.
// The first K changes after reset only fill the register and are not
// checked.
module tb_asr_fm;
  localparam int K = 2;
  logic             clk = 1'b0;
  logic             rst_n;
  logic [1:0]       x, z;
  logic [K-1:0][1:0] taps;
  logic             stable;
  logic [1:0]       hist [$];
  int               checks = 0, failures = 0;

  asr_fm dut (.clk(clk), .rst_n(rst_n), .x(x), .taps(taps), .z(z), .stable(stable));

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (K + 1) @(negedge clk);
    hist.push_back(x);
    for (int n = 0; n < 2000; n++) begin
      b = $urandom_range(1, 0);
      x[b] = ~x[b];
      hist.push_back(x);
      repeat (K + 1 + $urandom_range(1, 0)) @(negedge clk);
      if (n >= K) begin
        for (int k = 1; k <= K; k++) begin
          checks++;
          if (taps[k-1] != hist[hist.size() - 1 - k]) begin
            failures++;
            $display("FAIL n=%0d stage %0d: %b expected %b", n, k, taps[k-1],
                     hist[hist.size() - 1 - k]);
          end
        end
        checks += 2;
        if (z != taps[K-1]) failures++;
        if (!stable) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
