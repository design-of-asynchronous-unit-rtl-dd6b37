// delay_line: N-bit signal delay of DEPTH sampling-clock periods.
//
// Stands for the "delay" elements of the pulse-controlled AUD: the delayed
// input lines of circuit 1 (a chain of four inverting gates with a
// capacitor in the original circuit, hence the default DEPTH of 4) and the delayed,
// complemented copy of an input that an inverter-type change detector
// compares with the input itself.  Each stage is one register, so
// q(t) = d(t - DEPTH).  Reset clears every stage (inputs are taken to have
// been 0 before reset).
module delay_line #(
  parameter int unsigned N     = 2,
  parameter int unsigned DEPTH = 4   // >= 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  logic [N-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

  initial begin
    if (DEPTH < 1) $error("delay_line: DEPTH must be at least 1");
  end

endmodule
