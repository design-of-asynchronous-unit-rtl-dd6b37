// tb_change_detector: drives both kinds of change detector (delay type and
// monostable type) with the same random 3-bit input and a pulse width of 2.
// Each bit changes at most once in any 2-period window; several bits may
// change in the same period.  Reference: c is high exactly while some bit
// changed in the current or previous PULSE_W-1 periods; rise/fall are the
// same per bit and direction.  Both detectors must agree with it.
module tb_change_detector;
  import aud_pkg::*;
  localparam int N  = 3;
  localparam int PW = 2;
  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] x, x_old;
  logic         c_d, c_m;
  logic [N-1:0] rise_d, fall_d, rise_m, fall_m;
  int           last_change [N];
  bit           last_dir [N];
  int           checks = 0, failures = 0;
  int           multi = 0;

  change_detector #(.N(N), .KIND(DET_DELAY), .PULSE_W(PW)) dut_d (
    .clk(clk), .rst_n(rst_n), .x(x), .c(c_d), .rise(rise_d), .fall(fall_d));
  change_detector #(.N(N), .KIND(DET_MONOSTABLE), .PULSE_W(PW)) dut_m (
    .clk(clk), .rst_n(rst_n), .x(x), .c(c_m), .rise(rise_m), .fall(fall_m));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic         c_ref;
    logic [N-1:0] rise_ref, fall_ref;
    int           nchg;
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) last_change[i] = -100;
    for (int n = 0; n < 3000; n++) begin
      x_old = x;
      nchg = 0;
      for (int i = 0; i < N; i++)
        if (n - last_change[i] >= PW && $urandom_range(3, 0) == 0) begin
          x[i] = ~x[i];
          last_change[i] = n;
          last_dir[i] = x[i];
          nchg++;
        end
      if (nchg > 1) multi++;
      #1;
      rise_ref = '0;
      fall_ref = '0;
      for (int i = 0; i < N; i++)
        if (n - last_change[i] < PW) begin
          if (last_dir[i]) rise_ref[i] = 1'b1;
          else             fall_ref[i] = 1'b1;
        end
      c_ref = |(rise_ref | fall_ref);
      checks += 6;
      if (c_d != c_ref)       begin failures++; $display("FAIL n=%0d delay c=%b ref %b", n, c_d, c_ref); end
      if (c_m != c_ref)       begin failures++; $display("FAIL n=%0d ms c=%b ref %b", n, c_m, c_ref); end
      if (rise_d != rise_ref) begin failures++; $display("FAIL n=%0d delay rise", n); end
      if (fall_d != fall_ref) begin failures++; $display("FAIL n=%0d delay fall", n); end
      if (rise_m != rise_ref) begin failures++; $display("FAIL n=%0d ms rise", n); end
      if (fall_m != fall_ref) begin failures++; $display("FAIL n=%0d ms fall", n); end
      @(negedge clk);
    end
    checks++;
    if (multi == 0) begin failures++; $display("FAIL no simultaneous changes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
