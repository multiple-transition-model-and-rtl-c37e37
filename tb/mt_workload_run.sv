// mt_workload_run: testbench helper that applies the complete multiple-transition
// pattern set to an si_soc_top with n = N interconnects, for one locality factor
// KL, through the JTAG port, and measures the TCK cycles it takes.
//
// Procedure per seed (N_seed = (2k+1) * 2^(2k) seeds): EXTEST, scan the seed and
// update; G_SITEST; scan victim-select data 100100... (k zeros between victims),
// whose Update-DR is the first of four; three more UpdateDRs; then k times shift
// one 0 into the chain (its Update-DR again the first of four) followed by three
// UpdateDRs. Seeds are the m = 2k+1 bit group patterns with the group's victim bit
// at each of the m positions held 0 and the other 2k bits counting through all
// values, repeated along the n lines.
// After every UpdateDR the lines are compared with the MT rule computed here:
// after u UpdateDRs an aggressor has toggled u times and a victim u/2 times.
// For every line with k neighbours on both sides, the testbench also records
// each (window before, victim after) pair seen while the line was a victim and
// requires all 2^(2k+2) MT pairs of that victim to appear.
// The checks and the cycle count are returned to the caller.
module mt_workload_run
  import si_pkg::*;
#(
  parameter int N  = 8,
  parameter int KL = 2
) (
  input  logic   start,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint tcks,
  output longint updates
);
  timeunit 1ns; timeprecision 1ps;

  localparam int M  = 1;
  localparam int K  = 1;
  localparam int B  = 1;
  localparam int L  = M + 3*B + 2*N + 3*B + K;
  localparam int PG0 = M + 3*B;                  // chain position of line 0's PGBSC
  localparam int GM = 2*KL + 1;                  // lines in a locality group
  localparam int NSEED = GM * (1 << (2*KL));

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo;
  logic [M-1:0] core_i_in_pin = '0, core_i_in;
  logic [N-1:0] core_i_out = '0, iut_drive, core_j_in;
  logic [N-1:0] iut_recv;
  logic [K-1:0] core_j_out = '0, core_j_out_pin;
  logic [B-1:0] bi_i_core_out = '0, bi_i_core_oe = '0, bi_i_core_in, bi_i_pad_out, bi_i_pad_oe;
  logic [B-1:0] bi_j_core_out = '0, bi_j_core_oe = '0, bi_j_core_in, bi_j_pad_out, bi_j_pad_oe;
  logic [B-1:0] bi_i_pad_in, bi_j_pad_in;

  assign iut_recv    = iut_drive;                // ideal wires
  assign bi_i_pad_in = bi_i_pad_out;
  assign bi_j_pad_in = bi_i_pad_out;

  si_soc_top #(.N_IUT(N), .M_IN(M), .K_OUT(K), .N_BIDIR(B)) u_dut (.*);

  logic running = 1'b0;
  always #5 tck = running ? ~tck : 1'b0;
  always @(posedge tck) tcks++;

  task automatic jclk(input logic t_ms, input logic t_di);
    @(negedge tck);
    tms = t_ms; tdi = t_di;
    @(posedge tck);
  endtask

  task automatic ir_scan(input instr_e op);
    jclk(1, 0); jclk(1, 0); jclk(0, 0); jclk(0, 0);
    for (int i = 0; i < IR_W; i++) jclk(i == IR_W - 1, op[i]);
    jclk(1, 0); jclk(0, 0);
  endtask

  // Shift nbits (bit nbits-1 first) and update; ends in Run-Test/Idle.
  task automatic dr_scan(input logic [L-1:0] v, input int nbits);
    jclk(1, 0); jclk(0, 0); jclk(0, 0);
    for (int t = 0; t < nbits; t++) jclk(t == nbits - 1, v[nbits - 1 - t]);
    jclk(1, 0); jclk(0, 0);
    updates++;
  endtask

  task automatic pulse_update();
    jclk(1, 0); jclk(0, 0); jclk(1, 0); jclk(1, 0); jclk(0, 0);
    updates++;
  endtask

  // MT pair coverage: for every line v that has KL neighbours on both sides,
  // cov[v][{window before, victim after}] marks a pair seen while v was a victim.
  // The aggressors of that window all toggle (checked by expect_lines), so the
  // 2^(GM+1) entries are exactly the MT pairs of that victim.
  localparam int NCOV = 1 << (GM + 1);
  bit           cov [N][NCOV];
  logic [N-1:0] prev_lines;

  task automatic expect_lines(input logic [N-1:0] seed, input logic [N-1:0] sel, input int u);
    logic [N-1:0] exp;
    #2;
    exp = seed ^ ({N{1'(u % 2)}} & ~sel) ^ ({N{1'((u / 2) % 2)}} & sel);
    checks++;
    if (iut_drive !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d k=%0d: lines %b expected %b (u=%0d)", N, KL, iut_drive, exp, u);
    end
    for (int v = KL; v < N - KL; v++)
      if (sel[v]) begin
        logic [GM:0] idx;
        for (int j = 0; j < GM; j++) idx[j + 1] = prev_lines[v - KL + j];
        idx[0] = iut_drive[v];
        cov[v][idx] = 1'b1;
      end
    prev_lines = iut_drive;
  endtask

  function automatic logic [L-1:0] image(input logic [N-1:0] pg);
    logic [L-1:0] v;
    v = '0;
    for (int i = 0; i < N; i++) v[PG0 + i] = pg[i];
    return v;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; tcks = 0; updates = 0;
    wait (start);
    running = 1;
    trst_n = 0; #3 trst_n = 1;
    jclk(1, 0); jclk(0, 0);
    tcks = 0; updates = 0;
    for (int s = 0; s < NSEED; s++) begin
      logic [N-1:0] seed, sel;
      logic [GM-1:0] grp;
      int vpos, agg, b;
      int victim_count [N];
      vpos = s / (1 << (2*KL));
      agg  = s % (1 << (2*KL));
      b = 0;
      for (int i = 0; i < GM; i++)
        if (i == vpos) grp[i] = 1'b0;
        else begin grp[i] = 1'(agg >> b); b++; end
      for (int i = 0; i < N; i++) seed[i] = grp[i % GM];
      for (int i = 0; i < N; i++) begin sel[i] = (i % (KL + 1) == 0); victim_count[i] = 0; end

      ir_scan(I_EXTEST);
      dr_scan(image(seed), L);
      #2;
      checks++;
      if (iut_drive !== seed) begin failures++; $display("FAIL seed not applied"); end
      prev_lines = iut_drive;
      ir_scan(I_G_SITEST);
      dr_scan(image(sel), L);
      for (int r = 0; r <= KL; r++) begin
        for (int i = 0; i < N; i++) if (sel[i]) victim_count[i]++;
        expect_lines(seed, sel, 1);
        for (int u = 2; u <= 4; u++) begin
          pulse_update();
          expect_lines(seed, sel, u);
        end
        if (r < KL) begin
          dr_scan('0, 1);                          // shift one 0: victims move one line on
          sel = {sel[N-2:0], 1'b0};
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (victim_count[i] != 1) begin failures++; $display("FAIL line %0d victim %0d times", i, victim_count[i]); end
      end
    end
    for (int v = KL; v < N - KL; v++) begin
      int n_cov;
      n_cov = 0;
      foreach (cov[v][e]) n_cov += int'(cov[v][e]);
      checks++;
      if (n_cov != NCOV) begin
        failures++;
        $display("FAIL n=%0d k=%0d: line %0d saw %0d of %0d MT pairs as victim", N, KL, v, n_cov, NCOV);
      end
    end
    running = 0;
    done = 1;
  end
endmodule
