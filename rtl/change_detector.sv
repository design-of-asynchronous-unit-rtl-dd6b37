// change_detector: produces the change pulse C of a pulse-controlled
// asynchronous unit delay.  C is high for PULSE_W sampling-clock periods
// whenever any of the N inputs changes, and is low otherwise.
//
// Two realizations, chosen by KIND (see aud_pkg):
//  * DET_DELAY: for each input, a rising edge is x AND (x delayed and
//    complemented), a falling edge is x' AND (x' delayed and complemented);
//    the two are ORed.  The delay is PULSE_W clock periods and sets the
//    pulse width, as the number of inverters does in the gate circuit.
//    The RC differentiators of circuits 1 and 3 behave the same way in this
//    clocked model (a short pulse at every edge), so they use this kind.
//  * DET_MONOSTABLE: two one-shots per input, one triggered by x and one by
//    x', each giving a PULSE_W-period pulse on its positive-going change.
// The pulses of all inputs are ORed into C ("from other inputs"), so
// changes of several inputs in the same clock period give one pulse.
// C is combinational from x: it rises in the clock period in which x
// changes.  Inputs are taken to have been 0 before reset.
module change_detector
  import aud_pkg::*;
#(
  parameter int unsigned N       = 2,
  parameter det_kind_e   KIND    = DET_MONOSTABLE,
  parameter int unsigned PULSE_W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic         c,
  output logic [N-1:0] rise,   // per-input pulse on a 0->1 change
  output logic [N-1:0] fall    // per-input pulse on a 1->0 change
);

  if (KIND == DET_DELAY) begin : g_delay
    logic [N-1:0] x_d;
    delay_line #(.N(N), .DEPTH(PULSE_W)) u_dly (
      .clk(clk), .rst_n(rst_n), .d(x), .q(x_d)
    );
    assign rise = x & ~x_d;
    assign fall = ~x & x_d;
  end else begin : g_ms
    for (genvar i = 0; i < int'(N); i++) begin : g_in
      monostable #(.WIDTH(PULSE_W), .PREV_RESET(1'b0)) u_ms1 (
        .clk(clk), .rst_n(rst_n), .trig(x[i]), .q(rise[i])
      );
      monostable #(.WIDTH(PULSE_W), .PREV_RESET(1'b1)) u_ms2 (
        .clk(clk), .rst_n(rst_n), .trig(~x[i]), .q(fall[i])
      );
    end
  end

  assign c = |(rise | fall);

endmodule
