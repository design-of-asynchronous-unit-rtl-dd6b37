// monostable: one-shot that answers a positive-going change of its trigger
// with a pulse of WIDTH sampling-clock periods.
//
// Digital model of the monostable multivibrator used for change detection
// (MS1/MS2 of the original detector, "triggered by a positive going change", with a
// fixed but adjustable pulse length).  A rising trigger is seen by
// comparing it with its value one clock earlier; the pulse starts in the
// same clock period as the trigger edge (q is combinational from trig) and
// lasts WIDTH periods.  A new edge during the pulse restarts it.
// PREV_RESET is the trigger level assumed before reset, so that no pulse is
// produced merely because reset is released.
module monostable #(
  parameter int unsigned WIDTH      = 1,     // pulse length in clock periods, >= 1
  parameter bit          PREV_RESET = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic q
);

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic          trig_q;
  logic [CW-1:0] remaining;   // pulse periods still to come after this one
  logic          fire;

  assign fire = trig & ~trig_q;
  assign q    = fire | (remaining != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_q    <= PREV_RESET;
      remaining <= '0;
    end else begin
      trig_q <= trig;
      if (fire)                 remaining <= CW'(WIDTH - 1);
      else if (remaining != '0) remaining <= remaining - 1'b1;
    end
  end

  initial begin
    if (WIDTH < 1) $error("monostable: WIDTH must be at least 1");
  end

endmodule
