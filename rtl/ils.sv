// ils: behavioural model of an integrity loss sensor (an analog/mixed-signal
// cell in silicon), placed at the receiving end of an interconnect.
//
// This file is a behavioural model, not synthesizable logic. The real sensor is a
// tunable circuit that defines an acceptable delay region after the triggering
// clock edge, during which every transition of the received signal must occur.
// The model opens a window of length WINDOW at each rising edge of clk and
// watches sig_in while en=1:
//   - a transition later than WINDOW after the last clk edge is a delay violation;
//   - a second transition after the same clk edge is a glitch (noise/ringing).
// Either one produces a 0->1->0 pulse of width PULSE on viol. The glitch rule and
// both time constants are this model's own choices; the sensor's circuit is not
// designed here.
//
// Interface: clk is the launch clock (TCK, whose edge applies the patterns),
// en enables sensing (SI), sig_in is the received line, viol the pulse output.
module ils #(
  parameter realtime WINDOW = 2.0ns,  // acceptable delay region after clk
  parameter realtime PULSE  = 0.5ns   // width of the violation pulse
) (
  input  logic clk,
  input  logic en,
  input  logic sig_in,
  output logic viol
);
  timeunit 1ns; timeprecision 1ps;

  logic        in_window;  // within WINDOW of the last clk edge
  int unsigned n_trans;    // transitions seen since the last clk edge

  initial begin
    viol      = 1'b0;
    in_window = 1'b0;
    n_trans   = 0;
  end

  always @(posedge clk) begin
    n_trans   = 0;
    in_window = 1'b1;
    #(WINDOW) in_window = 1'b0;
  end

  always @(sig_in) begin
    if (en) begin
      n_trans = n_trans + 1;
      if (!in_window || (n_trans > 1)) begin
        viol = 1'b1;
        #(PULSE) viol = 1'b0;
      end
    end
  end
endmodule
