// aud_pkg: types shared by the pulse-controlled asynchronous unit delays.
//
// The pulse-controlled AUD derives an internal "change pulse" C from its own
// inputs.  Two ways of making that pulse are built here:
//   DET_DELAY      - an input is compared with a delayed copy of itself
//                    (an inverter chain, or the RC differentiator, which in a
//                    clocked model is a pulse of fixed width at every edge);
//   DET_MONOSTABLE - each rail of an input (x and x') triggers a one-shot on
//                    its positive-going edge; the one-shots are ORed.
// Both give one pulse of PULSE_W sampling-clock periods per input change.
package aud_pkg;

  typedef enum logic [0:0] {
    DET_DELAY      = 1'b0,
    DET_MONOSTABLE = 1'b1
  } det_kind_e;

endpackage
