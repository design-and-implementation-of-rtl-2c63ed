// rev_pkg: types shared by the reversible register library.
//
// trig_e selects how a shift register is triggered:
//   TRIG_EDGE  - every stage is a master-slave D flip-flop (MF-gate master,
//                Fredkin-gate slave); the register shifts once per pulse of E,
//                its outputs changing when E falls.
//   TRIG_PULSE - every stage is a single clock-enabled D latch; the register
//                shifts once per pulse of E provided the pulse is exactly one
//                sampling-clock cycle wide (a wider pulse lets data run
//                through several transparent latches, as in any
//                pulse-triggered latch register).
package rev_pkg;

  typedef enum logic {
    TRIG_EDGE  = 1'b0,
    TRIG_PULSE = 1'b1
  } trig_e;

endpackage
