// tb_aud_top: end-to-end test of every unit delay in aud_top, at the top's
// default parameters (two-stage shift registers, circuit-1 input delay 4).
//
// Phase A (slow, single-bit changes every 5-6 periods, as the fundamental
// mode requires): every realization on x2 and x3 must show the input from
// one change ago, each shift-register stage k the input from k changes ago.
// The pulse-controlled circuits must answer with one change pulse and a
// transmission delay of exactly one period, the same for every path;
// stage k of the pulse-controlled register must take exactly k periods.
// Phase B (fast, any pattern, changes in consecutive periods and on several
// bits at once): only circuits 2 and 3 and the 3 x 3 circuit 2 are defined
// here and are checked every period.
// Phase C: slow again; after a few changes to flush phase B, all parts are
// checked as in phase A.
// The test counts how often each mechanism occurred (change pulses of every
// circuit, simultaneous changes taken as one pulse, back-to-back changes,
// propagation through both stages of both shift registers, fundamental-mode
// transitions of the 2 x 2 and 3 x 3 delays) and fails if one never did.
module tb_aud_top;
  localparam int K = 2;
  logic                clk = 1'b0;
  logic                rst_n;
  logic [1:0]          x2, z_fm2, z_pc1, z_pc2, z_pc3;
  logic                fm2_stable, fm3_stable, c_pc2_3;
  logic [K-1:0][1:0]   asr_fm_taps, asr_pc_taps;
  logic [2:0]          c_pc;
  logic [K-1:0]        asr_pc_c;
  logic [2:0]          x3, z_fm3, z_pc2_3;

  logic [1:0]          h2 [$];
  logic [2:0]          h3 [$];
  int                  checks = 0, failures = 0;
  int                  n_pulse [3], n_asr_pulse [K], n_pulse3 = 0;
  int                  n_simul = 0, n_b2b = 0, n_fm2 = 0, n_fm3 = 0;
  int                  n_asr_fm_last = 0, n_asr_pc_last = 0;

  aud_top dut (
    .clk(clk), .rst_n(rst_n),
    .x2(x2), .z_fm2(z_fm2), .fm2_stable(fm2_stable), .asr_fm_taps(asr_fm_taps),
    .z_pc1(z_pc1), .z_pc2(z_pc2), .z_pc3(z_pc3), .c_pc(c_pc),
    .asr_pc_taps(asr_pc_taps), .asr_pc_c(asr_pc_c),
    .x3(x3), .z_fm3(z_fm3), .fm3_stable(fm3_stable), .z_pc2_3(z_pc2_3), .c_pc2_3(c_pc2_3)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) if (c_pc[i]) n_pulse[i]++;
    for (int k = 0; k < K; k++) if (asr_pc_c[k]) n_asr_pulse[k]++;
    if (c_pc2_3) n_pulse3++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: x2=%b x3=%b", what, $time, x2, x3);
    end
  endtask

  // one slow step: a single-bit change on x2 and on x3, then full checks
  task automatic slow_step(input bit check_all);
    logic [1:0] asr_fm_last_before, asr_pc_last_before;
    int b;
    b = $urandom_range(1, 0);
    x2[b] = ~x2[b];
    h2.push_back(x2);
    b = $urandom_range(2, 0);
    x3[b] = ~x3[b];
    h3.push_back(x3);
    asr_fm_last_before = asr_fm_taps[K-1];
    asr_pc_last_before = asr_pc_taps[K-1];
    #1;
    if (check_all) begin
      check(c_pc == 3'b111 && c_pc2_3, "every pulse circuit fires on the change");
      check(z_pc1 == h2[h2.size()-3] && z_pc2 == h2[h2.size()-3] && z_pc3 == h2[h2.size()-3],
            "pulse circuits wait for the pulse");
    end
    @(negedge clk);
    if (check_all) begin
      // transmission delay of exactly one period
      check(z_pc1 == h2[h2.size()-2], "circuit 1 after one period");
      check(z_pc2 == h2[h2.size()-2], "circuit 2 after one period");
      check(z_pc3 == h2[h2.size()-2], "circuit 3 after one period");
      check(z_pc2_3 == h3[h3.size()-2], "3x3 circuit 2 after one period");
      check(z_fm2 == h2[h2.size()-2], "2x2 fundamental mode after one period");
      check(z_fm3 == h3[h3.size()-2], "3x3 fundamental mode after one period");
      check(asr_pc_taps[0] == h2[h2.size()-2], "pulse register stage 1 after one period");
      check(asr_pc_taps[1] == h2[h2.size()-4], "pulse register stage 2 not yet after one period");
    end
    @(negedge clk);
    if (check_all)
      check(asr_pc_taps[1] == h2[h2.size()-3], "pulse register stage 2 after two periods");
    repeat (3 + $urandom_range(1, 0)) @(negedge clk);
    if (check_all) begin
      check(fm2_stable && fm3_stable, "fundamental-mode delays stable");
      check(z_fm2 == h2[h2.size()-2] && z_fm3 == h3[h3.size()-2], "fundamental mode held");
      for (int k = 1; k <= K; k++) begin
        check(asr_fm_taps[k-1] == h2[h2.size()-1-k], "fundamental-mode register stage");
        check(asr_pc_taps[k-1] == h2[h2.size()-1-k], "pulse register stage");
      end
      check(z_pc1 == h2[h2.size()-2] && z_pc2 == h2[h2.size()-2] && z_pc3 == h2[h2.size()-2]
            && z_pc2_3 == h3[h3.size()-2], "pulse circuits held");
      n_fm2++;
      n_fm3++;
      if (asr_fm_taps[K-1] != asr_fm_last_before) n_asr_fm_last++;
      if (asr_pc_taps[K-1] != asr_pc_last_before) n_asr_pc_last++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp2, nx2;
    logic [2:0] exp3, nx3;
    bit         prev_changed;
    for (int i = 0; i < 3; i++) n_pulse[i] = 0;
    for (int k = 0; k < K; k++) n_asr_pulse[k] = 0;
    rst_n = 1'b0;
    x2 = '0;
    x3 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    h2.push_back(x2);
    h3.push_back(x3);

    // phase A: the first K+1 changes fill the shift registers
    for (int n = 0; n < 600; n++) slow_step(n > K);

    // phase B: fast changes, circuits 2 and 3 only
    exp2 = z_pc2;
    exp3 = z_pc2_3;
    prev_changed = 0;
    for (int n = 0; n < 2000; n++) begin
      nx2 = ($urandom_range(1, 0) == 0) ? x2 : 2'($urandom);
      nx3 = ($urandom_range(1, 0) == 0) ? x3 : 3'($urandom);
      if (nx2 != x2) begin
        exp2 = x2;
        if ((nx2 ^ x2) == 2'b11) n_simul++;
        if (prev_changed) n_b2b++;
      end
      prev_changed = (nx2 != x2);
      if (nx3 != x3) exp3 = x3;
      x2 = nx2;
      x3 = nx3;
      @(negedge clk);
      check(z_pc2 == exp2 && z_pc3 == exp2, "circuits 2 and 3 under fast changes");
      check(z_pc2_3 == exp3, "3x3 circuit 2 under fast changes");
    end

    // phase C: slow again
    repeat (6) @(negedge clk);
    h2.push_back(x2);
    h3.push_back(x3);
    for (int n = 0; n < 600; n++) slow_step(n > 6);

    // every mechanism must have occurred
    check(n_pulse[0] > 0, "circuit 1 change pulses");
    check(n_pulse[1] > 0, "circuit 2 change pulses");
    check(n_pulse[2] > 0, "circuit 3 change pulses");
    check(n_pulse3 > 0, "3x3 circuit 2 change pulses");
    for (int k = 0; k < K; k++) check(n_asr_pulse[k] > 0, "pulse register stage pulses");
    check(n_simul > 0, "simultaneous changes");
    check(n_b2b > 0, "back-to-back changes");
    check(n_fm2 > 0 && n_fm3 > 0, "fundamental-mode transitions");
    check(n_asr_fm_last > 0, "propagation through the fundamental-mode register");
    check(n_asr_pc_last > 0, "propagation through the pulse register");
    $display("pulses c1=%0d c2=%0d c3=%0d c3x3=%0d asr=%0d/%0d simultaneous=%0d back_to_back=%0d",
             n_pulse[0], n_pulse[1], n_pulse[2], n_pulse3, n_asr_pulse[0], n_asr_pulse[1],
             n_simul, n_b2b);
    $display("fm2=%0d fm3=%0d asr_fm_last=%0d asr_pc_last=%0d",
             n_fm2, n_fm3, n_asr_fm_last, n_asr_pc_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
