// bidir_si_cell: enhanced boundary cell group for a bidirectional interconnect.
//
// A bidirectional pin carries three boundary cells: a standard control cell (bsc)
// for the output enable, a pattern generation cell (pgbsc) for the driven value
// and an observation cell (obsc) for the received value. When the pin drives, its
// PGBSC takes part in pattern generation; when it receives, its OBSC senses the
// line. The method places PGBSC and OBSC at both ends of a bidirectional line;
// grouping them with a standard control cell is this design's reading of a
// bidirectional boundary cell.
//
// Scan order inside the group: scan_in -> control -> drive (PGBSC) -> receive
// (OBSC) -> scan_out. The pad is modelled as separate drive, enable and receive
// signals (pin_out, pin_oe, pin_in). Timing as in bsc, pgbsc and obsc.
module bidir_si_cell
  import si_pkg::*;
#(
  parameter realtime ILS_WINDOW = 2.0ns
) (
  input  logic     tck,
  input  bs_ctrl_t ctrl,
  input  logic     core_out,   // value the core drives
  input  logic     core_oe,    // core's output enable
  output logic     core_in,    // value delivered to the core
  output logic     pin_out,    // driven value on the pad
  output logic     pin_oe,     // pad output enable
  input  logic     pin_in,     // value received from the pad
  input  logic     scan_in,
  output logic     scan_out
);
  timeunit 1ns; timeprecision 1ps;

  logic so_ctl, so_drv;

  bsc u_ctl (
    .tck(tck), .ctrl(ctrl), .pi(core_oe), .scan_in(scan_in), .scan_out(so_ctl), .po(pin_oe)
  );

  pgbsc u_drv (
    .tck(tck), .ctrl(ctrl), .core_out(core_out), .scan_in(so_ctl), .scan_out(so_drv),
    .pin(pin_out)
  );

  obsc #(.ILS_WINDOW(ILS_WINDOW)) u_rcv (
    .tck(tck), .ctrl(ctrl), .pin(pin_in), .scan_in(so_drv), .scan_out(scan_out),
    .core_in(core_in)
  );
endmodule
