// mt_pattern_gen: multiple-transition test pattern generator for N interconnects,
// built as a row of N pattern generation boundary scan cells (pgbsc) in one scan
// segment.
//
// A seed is first loaded into the FF2 stages with SI=0 (shift it in, then
// UpdateDR). With SI=1, victim-select data is shifted into the FF1 stages: a 1
// makes that line a victim, a 0 an aggressor. Each UpdateDR then toggles every
// aggressor line, and every second UpdateDR toggles the victims, so four
// UpdateDRs apply the four vector pairs of one seed (victim quiescent at its seed
// value, rising or falling, quiescent at the other value) and return the lines
// to the seed. Shifting one more 0 into the segment moves every victim one line
// further, which is how victims rotate. Line 0 is the cell nearest scan_in, so a
// bit shifted in lands on line 0 first.
//
// Interface: scan_in/scan_out chain the FF1 stages; core_out[i] is core i's
// output for line i, pin[i] drives interconnect i. All timing as in pgbsc.
module mt_pattern_gen
  import si_pkg::*;
#(
  parameter int unsigned N = N_IUT_DEFAULT
) (
  input  logic         tck,
  input  bs_ctrl_t     ctrl,
  input  logic [N-1:0] core_out,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [N-1:0] pin
);
  timeunit 1ns; timeprecision 1ps;

  logic [N:0] chain;
  assign chain[0] = scan_in;

  for (genvar i = 0; i < N; i++) begin : g_cell
    pgbsc u_cell (
      .tck      (tck),
      .ctrl     (ctrl),
      .core_out (core_out[i]),
      .scan_in  (chain[i]),
      .scan_out (chain[i+1]),
      .pin      (pin[i])
    );
  end

  assign scan_out = chain[N];
endmodule
