// tb_bsc: self-checking testbench of the standard boundary scan cell.
// Drives random control and data for many TCK cycles and compares scan_out and po
// with a reference model of the two-stage cell kept in the testbench.
module tb_bsc;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0;
  bs_ctrl_t ctrl;
  logic pi, scan_in, scan_out, po;
  int checks = 0, failures = 0;
  logic m_q1, m_q2;

  bsc u_dut (.tck, .ctrl, .pi, .scan_in, .scan_out, .po);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; pi = 0; scan_in = 0;
    // Initialise both stages through the cell itself: capture then update.
    ctrl.clock_dr = 1; ctrl.update_dr = 0;
    @(negedge tck); ctrl.update_dr = 1; ctrl.clock_dr = 0;
    @(negedge tck);
    m_q1 = 0; m_q2 = 0;
    for (int c = 0; c < 2000; c++) begin
      ctrl.shift_dr  = 1'($urandom);
      ctrl.clock_dr  = 1'($urandom);
      ctrl.update_dr = 1'($urandom);
      ctrl.mode      = 1'($urandom);
      ctrl.si        = 1'($urandom);
      pi             = 1'($urandom);
      scan_in        = 1'($urandom);
      #1;
      checks++;
      if (po !== (ctrl.mode ? m_q2 : pi)) begin
        failures++; $display("po mismatch at cycle %0d", c);
      end
      @(posedge tck);
      if (ctrl.update_dr) m_q2 = m_q1;
      if (ctrl.clock_dr)  m_q1 = ctrl.shift_dr ? scan_in : pi;
      @(negedge tck);
      checks++;
      if (scan_out !== m_q1) begin
        failures++; $display("scan_out mismatch at cycle %0d", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
