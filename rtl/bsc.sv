// bsc: standard IEEE 1149.1 boundary scan cell.
//
// FF1 is the capture/shift stage: with ShiftDR=0 it captures the parallel input,
// with ShiftDR=1 it takes the previous cell's scan output. FF2 is the update stage
// and holds the value applied in test mode; the Mode mux picks FF2 (Mode=1) or the
// parallel input (Mode=0) for the parallel output. This is the cell of the classic
// standard, drawn as two flip-flops and two multiplexers.
//
// Timing: both stages are clocked by TCK; ctrl.clock_dr and ctrl.update_dr are
// clock enables asserted by the TAP decoder for one TCK cycle (the standard's
// gated ClockDR/UpdateDR clocks are expressed as enables here, a choice of this
// design). scan_out is FF1 and feeds the next cell.
module bsc
  import si_pkg::*;
(
  input  logic     tck,
  input  bs_ctrl_t ctrl,
  input  logic     pi,        // parallel input: pin or core output
  input  logic     scan_in,   // TDI or previous cell
  output logic     scan_out,  // to next cell or TDO
  output logic     po         // parallel output: core input or pin
);
  timeunit 1ns; timeprecision 1ps;

  logic q1, q2;

  always_ff @(posedge tck)
    if (ctrl.clock_dr) q1 <= ctrl.shift_dr ? scan_in : pi;

  always_ff @(posedge tck)
    if (ctrl.update_dr) q2 <= q1;

  assign scan_out = q1;
  assign po       = ctrl.mode ? q2 : pi;
endmodule
