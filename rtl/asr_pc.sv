// asr_pc: N x N asynchronous shift register of length K built from
// pulse-controlled unit delays (aud_pc2) in cascade: the outputs of stage i
// are the inputs of stage i+1.
//
// Stage k (counting from 1) shows the input vector as it was k changes ago.
// Each stage makes its own change pulse from its own inputs, so a change
// ripples down the register one stage per clock period; the delay of every
// stage is the same one period for every path, and the rate at which the
// inputs may change does not depend on K (a change every clock period is
// accepted).  taps[k-1] is the output of stage k; z is the last stage;
// c[k-1] is the change pulse of stage k.
module asr_pc
  import aud_pkg::*;
#(
  parameter int unsigned N    = 2,
  parameter int unsigned K    = 2,
  parameter det_kind_e   KIND = DET_MONOSTABLE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         x,
  output logic [K-1:0][N-1:0]  taps,
  output logic [N-1:0]         z,
  output logic [K-1:0]         c
);

  logic [K:0][N-1:0] link;

  assign link[0] = x;

  for (genvar k = 0; k < int'(K); k++) begin : g_stage
    logic [N-1:0] zn_unused;
    aud_pc2 #(.N(N), .KIND(KIND)) u_aud (
      .clk(clk), .rst_n(rst_n), .x(link[k]), .z(link[k+1]), .z_n(zn_unused),
      .c(c[k])
    );
    assign taps[k] = link[k+1];
  end

  assign z = link[K];

endmodule
