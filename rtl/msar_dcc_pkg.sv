`timescale 1ps/1ps
// Shared constants of the MSAR duty-cycle corrector.
//
// CTRL_BITS is the width of the control word Ctrl that sets the programmable
// delay line of the duty-cycle adjuster; the design uses a 6-bit word, which
// also fixes the number of MSAR units in the controller. The delay values are
// only used by the behavioural models of the two analog blocks and are in the
// time unit of the simulation (1 ps); they are example values of this model,
// not figures of a particular process.
package msar_dcc_pkg;
  parameter int unsigned CTRL_BITS = 6;
  // Delay of the fixed (dummy) rising-edge path and of the falling-edge path
  // with Ctrl = 0, in ps.
  parameter int unsigned ADJ_FIXED_DELAY_PS = 60;
  // Delay added to the falling edge per LSB of Ctrl, in ps.
  parameter int unsigned ADJ_STEP_PS = 10;
endpackage
