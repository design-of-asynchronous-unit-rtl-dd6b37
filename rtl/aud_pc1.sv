// aud_pc1: N x N asynchronous unit delay under pulse control, circuit 1
// (delayed input lines, differentiating change detector, one shift circuit
// per output).
//
// Function: z holds the input vector as it was before its last change.
// Unlike the fundamental-mode AUDs, any number of inputs may change at once.
//
// How it works (the original structure): every input x_i passes through a
// delay to give x_i^d.  The change detector watches the undelayed inputs
// and fires the change pulse C on any change.  While C is high the shift
// circuit loads x^d, which still carries the value from before the change,
// because the input delay is longer than the detector delay plus the pulse
// width.  When the delayed line later takes the new value, C is low again
// and the output holds.  In this clocked model the detector is the
// DET_DELAY kind (the stand-in for the RC differentiator), its delay is 0
// periods, the pulse is PULSE_W periods and the input delay DELAY periods,
// so the rule is DELAY >= PULSE_W.  DELAY = 4 follows the four-gate delay
// chain of the circuit; PULSE_W = 1 is this design's choice.
//
// Timing: z changes at the clock edge that ends the first period of the
// pulse, i.e. one clock after x changes, for every input and direction.
// Successive changes must be at least DELAY clock periods apart (the
// delayed line must have caught up), whichever inputs they are on.
module aud_pc1 #(
  parameter int unsigned N       = 2,
  parameter int unsigned DELAY   = 4,
  parameter int unsigned PULSE_W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [N-1:0] z,
  output logic [N-1:0] z_n,
  output logic         c       // change pulse, for observation
);

  import aud_pkg::*;

  logic [N-1:0] x_d;
  logic [N-1:0] rise_unused, fall_unused;

  delay_line #(.N(N), .DEPTH(DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .d(x), .q(x_d)
  );

  change_detector #(.N(N), .KIND(DET_DELAY), .PULSE_W(PULSE_W)) u_det (
    .clk(clk), .rst_n(rst_n), .x(x), .c(c),
    .rise(rise_unused), .fall(fall_unused)
  );

  shift_circuit #(.N(N)) u_shift (
    .clk(clk), .rst_n(rst_n), .c(c), .d(x_d), .q(z), .q_n(z_n)
  );

  initial begin
    if (DELAY < PULSE_W)
      $error("aud_pc1: the input delay must cover the change pulse (DELAY >= PULSE_W)");
  end

  // the output changes only in the presence of the change pulse
  a_out_on_pulse: assert property (
    @(posedge clk) disable iff (!rst_n) (z != $past(z)) |-> $past(c)
  );

endmodule
