// aud2_fm: 2 x 2 asynchronous unit delay, fundamental-mode realization.
//
// Function: z holds the input pair x as it was before its last change
// (z(t) = x(t - dt), dt = time since the last input change).  Inputs must
// change one bit at a time and only once the circuit is stable.
//
// How it works: the reduced flow table has four internal states and two
// substitution-property partitions, so the machine splits into two parallel
// one-bit submachines with state variables y1 and y2:
//   Y1 = x1 x2  + y1 (x1 + x2)        (y1 set by 11, cleared by 00)
//   Y2 = x1 x2' + y2 (x1 + x2')       (y2 set by 10, cleared by 01)
//   z1 = y1 y2  + x1' (y1 + y2)
//   z2 = y1 y2' + x2' (y1 + y2')
// These are the equations of the original 17-gate NAND circuit.  In the
// original circuit the state variables are fed back through wire/gate
// delay; here that feedback delay is one register per state variable,
// clocked by a sampling clock that is much faster than the input rate.
//
// Timing: after a single-bit change of x, z either keeps its old value or
// already shows the final one, and is final one clock later; it never
// passes through a third value, so stages can be cascaded.  Reset clears
// y1 and y2; the output before the first input change is then a function of
// that state (the original definition leaves the initial output open).
module aud2_fm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] x,      // x[0] = x1, x[1] = x2
  output logic [1:0] z,      // z[0] = z1, z[1] = z2
  output logic       stable  // high when the next state equals the present one
);

  logic y1, y2;
  logic y1_next, y2_next;

  always_comb begin
    y1_next = (x[0] & x[1])  | (y1 & (x[0] | x[1]));
    y2_next = (x[0] & ~x[1]) | (y2 & (x[0] | ~x[1]));
    z[0]    = (y1 & y2)  | (~x[0] & (y1 | y2));
    z[1]    = (y1 & ~y2) | (~x[1] & (y1 | ~y2));
    stable  = (y1_next == y1) && (y2_next == y2);
  end

  // feedback delay of the two state branches
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1 <= 1'b0;
      y2 <= 1'b0;
    end else begin
      y1 <= y1_next;
      y2 <= y2_next;
    end
  end

endmodule
