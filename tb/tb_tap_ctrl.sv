// tb_tap_ctrl: self-checking testbench of the TAP controller.
// A random TMS stream is applied; the expected state follows the IEEE 1149.1
// state diagram written here as a successor table (state, TMS=0, TMS=1). The
// testbench also checks that five TMS=1 cycles reach Test-Logic-Reset from every
// state, that trst_n resets asynchronously, and the one-hot strobes.
module tb_tap_ctrl;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1;
  tap_state_e state;
  logic tlr, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  int checks = 0, failures = 0;
  int visited [16];

  tap_ctrl u_dut (.tck, .trst_n, .tms, .state, .tlr, .capture_dr, .shift_dr, .update_dr,
                  .capture_ir, .shift_ir, .update_ir);

  always #5 tck = ~tck;

  // Successors {on TMS=0, on TMS=1}, indexed by state code 0..15 as listed in the
  // standard's diagram: TLR RTI SelDR CapDR ShDR Ex1DR PauDR Ex2DR UpdDR
  // SelIR CapIR ShIR Ex1IR PauIR Ex2IR UpdIR.
  int succ [16][2] = '{
    '{1, 0},   '{1, 2},   '{3, 9},   '{4, 5},   '{4, 5},   '{6, 8},   '{6, 7},   '{4, 8},
    '{1, 2},   '{10, 0},  '{11, 12}, '{11, 12}, '{13, 15}, '{13, 14}, '{11, 15}, '{1, 2}
  };

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(input int exp, input string what);
    checks++;
    if (int'(state) != exp) begin
      failures++; $display("FAIL %s: state %0d expected %0d", what, state, exp);
    end
    checks++;
    if (tlr != (exp == 0) || capture_dr != (exp == 3) || shift_dr != (exp == 4) ||
        update_dr != (exp == 8) || capture_ir != (exp == 10) || shift_ir != (exp == 11) ||
        update_ir != (exp == 15)) begin
      failures++; $display("FAIL strobes in state %0d", exp);
    end
  endtask

  initial begin
    int exp;
    foreach (visited[i]) visited[i] = 0;
    #1 trst_n = 0;
    #1;
    check_state(0, "reset");
    @(negedge tck); trst_n = 1;
    exp = 0;
    for (int c = 0; c < 3000; c++) begin
      tms = ($urandom % 3) == 0;     // bias towards 0 so deep states are reached
      @(posedge tck); #1;
      exp = succ[exp][tms];
      visited[exp]++;
      check_state(exp, "walk");
      if (c % 500 == 250) begin
        for (int k = 0; k < 5; k++) begin tms = 1; @(posedge tck); #1; end
        exp = 0;
        check_state(0, "five TMS=1 reach Test-Logic-Reset");
      end
      @(negedge tck);
    end
    // Asynchronous reset from the middle of a scan.
    tms = 0; @(posedge tck); #1; exp = succ[exp][0];
    #1 trst_n = 0; #1;
    check_state(0, "trst_n");
    trst_n = 1;
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (visited[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
