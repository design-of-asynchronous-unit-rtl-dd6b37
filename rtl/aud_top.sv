// aud_top: the asynchronous unit delays side by side, driven as in the
// original experiments, where the same input sequence was applied to
// every realization of the 2 x 2 delay.
//
// An asynchronous unit delay (AUD) shows at its outputs the value its
// inputs had before their last change.  This top holds:
//   * the 2 x 2 fundamental-mode AUD (u_fm2) and a cascade of ASR_K of them
//     (u_asr_fm);
//   * the 2 x 2 pulse-controlled AUDs: circuit 1 (u_pc1, delayed inputs),
//     circuit 2 (u_pc2, monostable detector, two shift circuits) and
//     circuit 3 (u_pc3, the same with the differentiating detector), and a
//     cascade of ASR_K circuit-2 stages (u_asr_pc);
//   all fed from x2;
//   * the 3 x 3 fundamental-mode AUD (u_fm3) and a 3 x 3 circuit-2 AUD
//     (u_pc2_3), both fed from x3.
// The fundamental-mode parts need single-bit input changes spaced at least
// ASR_K+1 clock periods apart; circuit 1 needs changes at least PC1_DELAY
// periods apart; circuit 2/3 accept any change pattern, one per period.
// All state sits in registers on clk, the sampling clock that stands for
// the circuits' internal delays; rst_n is a synchronous active-low reset.
module aud_top
  import aud_pkg::*;
#(
  parameter int unsigned ASR_K     = 2,  // stages in each shift register
  parameter int unsigned PC1_DELAY = 4,  // input delay of circuit 1
  parameter int unsigned PC1_PULSE = 1   // change pulse width of circuit 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // 2 x 2 group
  input  logic [1:0]                x2,
  output logic [1:0]                z_fm2,
  output logic                      fm2_stable,
  output logic [ASR_K-1:0][1:0]     asr_fm_taps,
  output logic [1:0]                z_pc1,
  output logic [1:0]                z_pc2,
  output logic [1:0]                z_pc3,
  output logic [2:0]                c_pc,         // change pulses of circuits 1..3
  output logic [ASR_K-1:0][1:0]     asr_pc_taps,
  output logic [ASR_K-1:0]          asr_pc_c,
  // 3 x 3 group
  input  logic [2:0]                x3,
  output logic [2:0]                z_fm3,
  output logic                      fm3_stable,
  output logic [2:0]                z_pc2_3,
  output logic                      c_pc2_3
);

  logic [1:0] pc1_n, pc2_n, pc3_n, asr_fm_z, asr_pc_z;
  logic [2:0] pc2_3_n;
  logic       asr_fm_stable;

  aud2_fm u_fm2 (.clk(clk), .rst_n(rst_n), .x(x2), .z(z_fm2), .stable(fm2_stable));

  asr_fm #(.K(ASR_K)) u_asr_fm (
    .clk(clk), .rst_n(rst_n), .x(x2), .taps(asr_fm_taps), .z(asr_fm_z),
    .stable(asr_fm_stable)
  );

  aud_pc1 #(.N(2), .DELAY(PC1_DELAY), .PULSE_W(PC1_PULSE)) u_pc1 (
    .clk(clk), .rst_n(rst_n), .x(x2), .z(z_pc1), .z_n(pc1_n), .c(c_pc[0])
  );

  aud_pc2 #(.N(2), .KIND(DET_MONOSTABLE)) u_pc2 (
    .clk(clk), .rst_n(rst_n), .x(x2), .z(z_pc2), .z_n(pc2_n), .c(c_pc[1])
  );

  aud_pc2 #(.N(2), .KIND(DET_DELAY)) u_pc3 (
    .clk(clk), .rst_n(rst_n), .x(x2), .z(z_pc3), .z_n(pc3_n), .c(c_pc[2])
  );

  asr_pc #(.N(2), .K(ASR_K), .KIND(DET_MONOSTABLE)) u_asr_pc (
    .clk(clk), .rst_n(rst_n), .x(x2), .taps(asr_pc_taps), .z(asr_pc_z),
    .c(asr_pc_c)
  );

  aud3_fm u_fm3 (.clk(clk), .rst_n(rst_n), .x(x3), .z(z_fm3), .stable(fm3_stable));

  aud_pc2 #(.N(3), .KIND(DET_MONOSTABLE)) u_pc2_3 (
    .clk(clk), .rst_n(rst_n), .x(x3), .z(z_pc2_3), .z_n(pc2_3_n), .c(c_pc2_3)
  );

endmodule
