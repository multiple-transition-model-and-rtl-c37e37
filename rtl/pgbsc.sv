// pgbsc: pattern generation boundary scan cell, placed where a core output drives
// an interconnect under test.
//
// It is a standard output cell (FF1 capture/shift, FF2 update, Mode mux) with
// three additions: a multiplexer in front of FF2 that feeds back /Q2 when SI=1,
// a T flip-flop FF3 toggled by every UpdateDR, and a clock selector for FF2.
// With SI=1 the cell is a pattern generator and FF1 no longer holds test data but
// the victim-select bit:
//   victim    (Q1=1, SI=1): FF2 is clocked by the rising edge of Q3, i.e. by
//                           UpdateDR divided by two, so the line toggles on every
//                           second UpdateDR;
//   aggressor (Q1=0, SI=1): FF2 is clocked by UpdateDR and the line toggles on
//                           every UpdateDR;
//   normal    (SI=0)      : FF2 is loaded from FF1 by UpdateDR, as in a standard cell.
// The interconnect is driven from Q2 when Mode=1.
//
// Timing: one clock, TCK. ctrl.update_dr marks an UpdateDR; FF3's rising edge is
// the UpdateDR at which Q3 is 0, so FF2 in victim mode is enabled by
// update_dr & ~q3. Own choice: FF3 is preset to 1 while SI=0, so that the first
// UpdateDR after a seed does not toggle the victim, the second does, and so on;
// this yields the vector order 000,101,010,111,000 for seed 000 with the middle
// line as victim. After four UpdateDRs FF2 and FF3 are back where they started.
module pgbsc
  import si_pkg::*;
(
  input  logic     tck,
  input  bs_ctrl_t ctrl,
  input  logic     core_out,  // parallel input from the core
  input  logic     scan_in,
  output logic     scan_out,
  output logic     pin        // drives the interconnect
);
  timeunit 1ns; timeprecision 1ps;

  logic q1, q2, q3;
  logic victim;
  logic ff2_en;

  always_ff @(posedge tck)
    if (ctrl.clock_dr) q1 <= ctrl.shift_dr ? scan_in : core_out;

  // FF3: T flip-flop on UpdateDR, preset while not in signal-integrity mode.
  always_ff @(posedge tck)
    if (!ctrl.si)            q3 <= 1'b1;
    else if (ctrl.update_dr) q3 <= ~q3;

  assign victim = ctrl.si & q1;
  assign ff2_en = ctrl.update_dr & (victim ? ~q3 : 1'b1);

  always_ff @(posedge tck)
    if (ff2_en) q2 <= ctrl.si ? ~q2 : q1;

  assign scan_out = q1;
  assign pin      = ctrl.mode ? q2 : core_out;
endmodule
