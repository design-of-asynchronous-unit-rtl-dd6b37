// aud_pc2: N x N asynchronous unit delay under pulse control with two shift
// circuits per input (circuits 2 and 3).
//
// Function: z holds the input vector as it was before its last change; any
// number of inputs may change at once.
//
// How it works: no delay lines are needed.  Shift circuit 1 stores the
// present input, shift circuit 2 drives the output, and both are loaded by
// the same change pulse C.  Since the pulse is shorter than the delay
// through a shift circuit, shift circuit 2 takes the value shift circuit 1
// held before the pulse (the previous input) while shift circuit 1 takes
// the new input: a two-stage shift register clocked by a pulse derived from
// the inputs.  This is the original state assignment Y1 = x1, Y2 = x2,
// Y3 = y1, Y4 = y2, z1 = y3, z2 = y4 for the 2 x 2 case, extended to N.
// KIND picks the change detector: DET_MONOSTABLE is circuit 2 (two
// monostables per input), DET_DELAY stands for circuit 3 (RC
// differentiators).  The pulse is one clock period wide; the delay through
// a shift circuit is one period, so a wider pulse would let the new input
// run through both circuits.
//
// Timing: z takes the previous input at the clock edge that ends the
// period in which x changed; the delay is the same for every path.
// Successive changes may follow in the next clock period (change-detector
// delay plus pulse width).  Reset clears both shift circuits and treats the
// inputs as having been 0.
module aud_pc2
  import aud_pkg::*;
#(
  parameter int unsigned N    = 2,
  parameter det_kind_e   KIND = DET_MONOSTABLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [N-1:0] z,
  output logic [N-1:0] z_n,
  output logic         c       // change pulse, for observation
);

  localparam int unsigned PULSE_W = 1;

  logic [N-1:0] m, m_n_unused;
  logic [N-1:0] rise_unused, fall_unused;

  change_detector #(.N(N), .KIND(KIND), .PULSE_W(PULSE_W)) u_det (
    .clk(clk), .rst_n(rst_n), .x(x), .c(c),
    .rise(rise_unused), .fall(fall_unused)
  );

  shift_circuit #(.N(N)) u_shift1 (
    .clk(clk), .rst_n(rst_n), .c(c), .d(x), .q(m), .q_n(m_n_unused)
  );

  shift_circuit #(.N(N)) u_shift2 (
    .clk(clk), .rst_n(rst_n), .c(c), .d(m), .q(z), .q_n(z_n)
  );

  // the output changes only in the presence of the change pulse
  a_out_on_pulse: assert property (
    @(posedge clk) disable iff (!rst_n) (z != $past(z)) |-> $past(c)
  );

endmodule
