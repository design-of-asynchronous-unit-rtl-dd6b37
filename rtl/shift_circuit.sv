// shift_circuit: N-bit store that takes its input only while the change
// pulse is present.
//
// Per bit this is the original shift circuit: an S-R flip-flop with
// S = x^d C and R = x^d' C, equivalently the feedback loop
// Y = x^d C + y C'.  Here the flip-flop is a register on the sampling
// clock: at every clock edge with c high it loads d, otherwise it holds.
// Both rails are brought out (q and q_n), as the flip-flop has them.
// The delay through the circuit is one clock period; a change pulse that
// is one period wide therefore loads exactly once, and a second shift
// circuit fed from this one on the same pulse still sees the old value.
// Reset clears the store.
module shift_circuit #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic [N-1:0] q_n
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (c)  q <= d;
  end

  assign q_n = ~q;

endmodule
