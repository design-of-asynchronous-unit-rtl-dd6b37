// asr_fm: 2 x 2 asynchronous shift register of length K built from
// fundamental-mode unit delays (aud2_fm) in cascade, without feedback: the
// outputs of stage i are the inputs of stage i+1.
//
// Stage k (counting from 1) shows the input pair as it was k changes ago,
// so the register remembers the last K+1 values of x.  A single-bit input
// change produces a single-bit change at every stage output, which keeps
// every stage within its single-input-change rule.  Each stage adds up to
// one sampling-clock period of delay, so in this model the delay grows with
// K; inputs must change no faster than once every K+1 clock periods (the
// last stage must have settled).  taps[k-1] is the output of stage k;
// z is the last stage.
module asr_fm #(
  parameter int unsigned K = 2   // stages; two were cascaded in the original measurements
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          x,
  output logic [K-1:0][1:0]   taps,
  output logic [1:0]          z,
  output logic                stable   // every stage stable
);

  logic [K:0][1:0] link;
  logic [K-1:0]    st;

  assign link[0] = x;

  for (genvar k = 0; k < int'(K); k++) begin : g_stage
    aud2_fm u_aud (
      .clk(clk), .rst_n(rst_n), .x(link[k]), .z(link[k+1]), .stable(st[k])
    );
    assign taps[k] = link[k+1];
  end

  assign z      = link[K];
  assign stable = &st;

endmodule
