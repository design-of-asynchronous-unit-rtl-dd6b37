// aud3_fm: 3 x 3 asynchronous unit delay, fundamental-mode realization.
//
// Function: z holds the input triple x as it was before its last change.
// Inputs change one bit at a time (single input changes), each change only
// after the circuit has settled.
//
// How it works: the reduced flow table of the 3 x 3 AUD has twelve internal
// states.  It has four two-block partitions with the substitution property
// whose product is the zero partition; each partition gives one state
// variable (yk = 1 when the state lies in the second block of partition k):
//   pi1 = {1,3,4,5,10,12 | 2,6,7,8,9,11}
//   pi2 = {1,2,4,5,6,8   | 3,7,9,10,11,12}
//   pi3 = {1,2,3,5,11,12 | 4,6,7,8,9,10}
//   pi4 = {1,2,3,4,6,7   | 5,8,9,10,11,12}
// The flow table and this assignment are those of the original design.  The next-state
// and output logic below is written directly as that flow table over
// (y, x) rather than as minimized sum-of-products equations; every entry
// carries the flow-table state number in its comment.  The output is the
// output of the stable state the transition leads to, so z shows the new
// value as soon as x changes.
//
// Some transitions change two state variables at once.  In the original
// asynchronous circuit these are the races of the parallel decomposition;
// here the state register updates all variables together, so they do not
// arise.  The feedback delay is one register per state variable, clocked
// by a sampling clock much faster than the input rate; the state is final
// one clock after an input change.  Don't-care entries (reachable only by
// changing two inputs at once) hold the state and give z = 000.
// Reset puts the machine in state 1.
module aud3_fm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] x,      // x[0] = x1, x[1] = x2, x[2] = x3
  output logic [2:0] z,      // z[0] = z1, z[1] = z2, z[2] = z3
  output logic       stable  // high when the next state equals the present one
);

  logic [3:0] y;       // {y4, y3, y2, y1}
  logic [3:0] y_next;

  always_comb begin
    y_next = y;
    z      = 3'b000;
    case ({y, x})
      {4'b0000, 3'b000}: begin y_next = 4'b0000; z = 3'b100; end  // state 1, x1x2x3=000 -> 1
      {4'b0000, 3'b100}: begin y_next = 4'b0000; z = 3'b000; end  // state 1, x1x2x3=001 -> 1
      {4'b0000, 3'b110}: begin y_next = 4'b0100; z = 3'b100; end  // state 1, x1x2x3=011 -> 4
      {4'b0000, 3'b010}: begin y_next = 4'b0001; z = 3'b000; end  // state 1, x1x2x3=010 -> 2
      {4'b0000, 3'b101}: begin y_next = 4'b1000; z = 3'b100; end  // state 1, x1x2x3=101 -> 5
      {4'b0000, 3'b001}: begin y_next = 4'b0010; z = 3'b000; end  // state 1, x1x2x3=100 -> 3
      {4'b0001, 3'b000}: begin y_next = 4'b0001; z = 3'b010; end  // state 2, x1x2x3=000 -> 2
      {4'b0001, 3'b100}: begin y_next = 4'b0000; z = 3'b000; end  // state 2, x1x2x3=001 -> 1
      {4'b0001, 3'b110}: begin y_next = 4'b0101; z = 3'b010; end  // state 2, x1x2x3=011 -> 6
      {4'b0001, 3'b010}: begin y_next = 4'b0001; z = 3'b000; end  // state 2, x1x2x3=010 -> 2
      {4'b0001, 3'b011}: begin y_next = 4'b1101; z = 3'b010; end  // state 2, x1x2x3=110 -> 8
      {4'b0001, 3'b001}: begin y_next = 4'b0010; z = 3'b000; end  // state 2, x1x2x3=100 -> 3
      {4'b0010, 3'b000}: begin y_next = 4'b0010; z = 3'b001; end  // state 3, x1x2x3=000 -> 3
      {4'b0010, 3'b100}: begin y_next = 4'b0000; z = 3'b000; end  // state 3, x1x2x3=001 -> 1
      {4'b0010, 3'b010}: begin y_next = 4'b0001; z = 3'b000; end  // state 3, x1x2x3=010 -> 2
      {4'b0010, 3'b011}: begin y_next = 4'b1110; z = 3'b001; end  // state 3, x1x2x3=110 -> 10
      {4'b0010, 3'b101}: begin y_next = 4'b1010; z = 3'b001; end  // state 3, x1x2x3=101 -> 12
      {4'b0010, 3'b001}: begin y_next = 4'b0010; z = 3'b000; end  // state 3, x1x2x3=100 -> 3
      {4'b0100, 3'b000}: begin y_next = 4'b0000; z = 3'b100; end  // state 4, x1x2x3=000 -> 1
      {4'b0100, 3'b100}: begin y_next = 4'b0100; z = 3'b110; end  // state 4, x1x2x3=001 -> 4
      {4'b0100, 3'b110}: begin y_next = 4'b0100; z = 3'b100; end  // state 4, x1x2x3=011 -> 4
      {4'b0100, 3'b010}: begin y_next = 4'b0101; z = 3'b110; end  // state 4, x1x2x3=010 -> 6
      {4'b0100, 3'b111}: begin y_next = 4'b0111; z = 3'b110; end  // state 4, x1x2x3=111 -> 7
      {4'b0100, 3'b101}: begin y_next = 4'b1000; z = 3'b100; end  // state 4, x1x2x3=101 -> 5
      {4'b1000, 3'b000}: begin y_next = 4'b0000; z = 3'b100; end  // state 5, x1x2x3=000 -> 1
      {4'b1000, 3'b100}: begin y_next = 4'b1000; z = 3'b101; end  // state 5, x1x2x3=001 -> 5
      {4'b1000, 3'b110}: begin y_next = 4'b0100; z = 3'b100; end  // state 5, x1x2x3=011 -> 4
      {4'b1000, 3'b111}: begin y_next = 4'b1011; z = 3'b101; end  // state 5, x1x2x3=111 -> 11
      {4'b1000, 3'b101}: begin y_next = 4'b1000; z = 3'b100; end  // state 5, x1x2x3=101 -> 5
      {4'b1000, 3'b001}: begin y_next = 4'b1010; z = 3'b101; end  // state 5, x1x2x3=100 -> 12
      {4'b0101, 3'b000}: begin y_next = 4'b0001; z = 3'b010; end  // state 6, x1x2x3=000 -> 2
      {4'b0101, 3'b100}: begin y_next = 4'b0100; z = 3'b110; end  // state 6, x1x2x3=001 -> 4
      {4'b0101, 3'b110}: begin y_next = 4'b0101; z = 3'b010; end  // state 6, x1x2x3=011 -> 6
      {4'b0101, 3'b010}: begin y_next = 4'b0101; z = 3'b110; end  // state 6, x1x2x3=010 -> 6
      {4'b0101, 3'b011}: begin y_next = 4'b1101; z = 3'b010; end  // state 6, x1x2x3=110 -> 8
      {4'b0101, 3'b111}: begin y_next = 4'b0111; z = 3'b110; end  // state 6, x1x2x3=111 -> 7
      {4'b0111, 3'b100}: begin y_next = 4'b0100; z = 3'b110; end  // state 7, x1x2x3=001 -> 4
      {4'b0111, 3'b110}: begin y_next = 4'b0111; z = 3'b111; end  // state 7, x1x2x3=011 -> 7
      {4'b0111, 3'b010}: begin y_next = 4'b0101; z = 3'b110; end  // state 7, x1x2x3=010 -> 6
      {4'b0111, 3'b011}: begin y_next = 4'b1111; z = 3'b111; end  // state 7, x1x2x3=110 -> 9
      {4'b0111, 3'b111}: begin y_next = 4'b0111; z = 3'b110; end  // state 7, x1x2x3=111 -> 7
      {4'b0111, 3'b101}: begin y_next = 4'b1011; z = 3'b111; end  // state 7, x1x2x3=101 -> 11
      {4'b1101, 3'b000}: begin y_next = 4'b0001; z = 3'b010; end  // state 8, x1x2x3=000 -> 2
      {4'b1101, 3'b110}: begin y_next = 4'b0101; z = 3'b010; end  // state 8, x1x2x3=011 -> 6
      {4'b1101, 3'b010}: begin y_next = 4'b1101; z = 3'b011; end  // state 8, x1x2x3=010 -> 8
      {4'b1101, 3'b011}: begin y_next = 4'b1101; z = 3'b010; end  // state 8, x1x2x3=110 -> 8
      {4'b1101, 3'b111}: begin y_next = 4'b1111; z = 3'b011; end  // state 8, x1x2x3=111 -> 9
      {4'b1101, 3'b001}: begin y_next = 4'b1110; z = 3'b011; end  // state 8, x1x2x3=100 -> 10
      {4'b1111, 3'b110}: begin y_next = 4'b0111; z = 3'b111; end  // state 9, x1x2x3=011 -> 7
      {4'b1111, 3'b010}: begin y_next = 4'b1101; z = 3'b011; end  // state 9, x1x2x3=010 -> 8
      {4'b1111, 3'b011}: begin y_next = 4'b1111; z = 3'b111; end  // state 9, x1x2x3=110 -> 9
      {4'b1111, 3'b111}: begin y_next = 4'b1111; z = 3'b011; end  // state 9, x1x2x3=111 -> 9
      {4'b1111, 3'b101}: begin y_next = 4'b1011; z = 3'b111; end  // state 9, x1x2x3=101 -> 11
      {4'b1111, 3'b001}: begin y_next = 4'b1110; z = 3'b011; end  // state 9, x1x2x3=100 -> 10
      {4'b1110, 3'b000}: begin y_next = 4'b0010; z = 3'b001; end  // state 10, x1x2x3=000 -> 3
      {4'b1110, 3'b010}: begin y_next = 4'b1101; z = 3'b011; end  // state 10, x1x2x3=010 -> 8
      {4'b1110, 3'b011}: begin y_next = 4'b1110; z = 3'b001; end  // state 10, x1x2x3=110 -> 10
      {4'b1110, 3'b111}: begin y_next = 4'b1111; z = 3'b011; end  // state 10, x1x2x3=111 -> 9
      {4'b1110, 3'b101}: begin y_next = 4'b1010; z = 3'b001; end  // state 10, x1x2x3=101 -> 12
      {4'b1110, 3'b001}: begin y_next = 4'b1110; z = 3'b011; end  // state 10, x1x2x3=100 -> 10
      {4'b1011, 3'b100}: begin y_next = 4'b1000; z = 3'b101; end  // state 11, x1x2x3=001 -> 5
      {4'b1011, 3'b110}: begin y_next = 4'b0111; z = 3'b111; end  // state 11, x1x2x3=011 -> 7
      {4'b1011, 3'b011}: begin y_next = 4'b1111; z = 3'b111; end  // state 11, x1x2x3=110 -> 9
      {4'b1011, 3'b111}: begin y_next = 4'b1011; z = 3'b101; end  // state 11, x1x2x3=111 -> 11
      {4'b1011, 3'b101}: begin y_next = 4'b1011; z = 3'b111; end  // state 11, x1x2x3=101 -> 11
      {4'b1011, 3'b001}: begin y_next = 4'b1010; z = 3'b101; end  // state 11, x1x2x3=100 -> 12
      {4'b1010, 3'b000}: begin y_next = 4'b0010; z = 3'b001; end  // state 12, x1x2x3=000 -> 3
      {4'b1010, 3'b100}: begin y_next = 4'b1000; z = 3'b101; end  // state 12, x1x2x3=001 -> 5
      {4'b1010, 3'b011}: begin y_next = 4'b1110; z = 3'b001; end  // state 12, x1x2x3=110 -> 10
      {4'b1010, 3'b111}: begin y_next = 4'b1011; z = 3'b101; end  // state 12, x1x2x3=111 -> 11
      {4'b1010, 3'b101}: begin y_next = 4'b1010; z = 3'b001; end  // state 12, x1x2x3=101 -> 12
      {4'b1010, 3'b001}: begin y_next = 4'b1010; z = 3'b101; end  // state 12, x1x2x3=100 -> 12
      default: begin y_next = y; z = 3'b000; end
    endcase
    stable = (y_next == y);
  end

  // feedback delay of the four state branches
  always_ff @(posedge clk) begin
    if (!rst_n) y <= 4'b0000;
    else        y <= y_next;
  end

endmodule
