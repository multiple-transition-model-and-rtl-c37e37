// obsc: observation boundary scan cell, placed where an interconnect under test
// enters the receiving core.
//
// A standard input cell (FF1 capture/shift, FF2 update, Mode mux to the core)
// with an integrity loss sensor (ILS) and a flag flip-flop in front of the capture
// path. When the ILS reports a violation its pulse sets the flag, F, to 1. The
// capture multiplexer is controlled by sel = ShiftDR | SI: with SI=1, FF1 captures
// F instead of the pin, so a DR scan reads out the integrity information; with
// SI=0 the ILS is ignored and the cell is a standard BSC.
//
// Timing: FF1 and FF2 run on TCK with the clock enables of bs_ctrl_t. The flag is
// set asynchronously by the ILS pulse and cleared asynchronously while
// ctrl.flag_clr is high. When the flag is cleared is this design's own choice:
// in Test-Logic-Reset and during the Shift-DR that follows an integrity read-out
// capture, so each read-out reports the violations since the previous one.
module obsc
  import si_pkg::*;
#(
  parameter realtime ILS_WINDOW = 2.0ns
) (
  input  logic     tck,
  input  bs_ctrl_t ctrl,
  input  logic     pin,       // received end of the interconnect
  input  logic     scan_in,
  output logic     scan_out,
  output logic     core_in    // to the core
);
  timeunit 1ns; timeprecision 1ps;

  logic viol;
  logic flag;   // F
  logic q1, q2;
  logic cap_d;

  ils #(.WINDOW(ILS_WINDOW)) u_ils (
    .clk    (tck),
    .en     (ctrl.si),
    .sig_in (pin),
    .viol   (viol)
  );

  // Flag flip-flop: set by the sensor's pulse, cleared by flag_clr.
  logic flag_clr;
  assign flag_clr = ctrl.flag_clr;

  always_ff @(posedge viol or posedge flag_clr)
    if (flag_clr) flag <= 1'b0;
    else          flag <= 1'b1;

  // Capture path: input mux (ShiftDR) then the F mux selected by ShiftDR | SI.
  always_comb begin
    if (ctrl.shift_dr)  cap_d = scan_in;
    else if (ctrl.si)   cap_d = flag;
    else                cap_d = pin;
  end

  always_ff @(posedge tck)
    if (ctrl.clock_dr) q1 <= cap_d;

  always_ff @(posedge tck)
    if (ctrl.update_dr) q2 <= q1;

  assign scan_out = q1;
  assign core_in  = ctrl.mode ? q2 : pin;
endmodule
