// tb_mt_workload: applies the complete multiple-transition pattern set for the six
// configurations of the pattern-application-time study (n = 8, 16, 32 lines and
// locality factor k = 2, 3) and reports the TCK cycles used next to the
// closed-form count N_seed * (2n + 8k) of the enhanced architecture and the
// count m * N_pattern * (n + 4) of scanning every vector in through a plain
// boundary-scan chain (m = 2k+1, N_pattern = m * 2^(m+1)).
// Each run is checked line by line after every UpdateDR (see mt_workload_run).
// The measured count is larger than the closed form because every UpdateDR
// here walks the TAP through Select-DR, Capture-DR and Exit1-DR, and every scan
// also carries the other cells of the chain, and each seed needs two instruction
// scans. The testbench requires the count to lie between the closed form and the
// plain-chain count, and prints the reduction against the plain chain.
module tb_mt_workload;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic go [6];
  logic dn [6];
  int   c [6], f [6];
  longint t [6], u [6];
  int nv [6] = '{8, 8, 16, 16, 32, 32};
  int kv [6] = '{2, 3, 2, 3, 2, 3};

  mt_workload_run #(.N(8),  .KL(2)) r0 (.start(go[0]), .done(dn[0]), .checks(c[0]), .failures(f[0]), .tcks(t[0]), .updates(u[0]));
  mt_workload_run #(.N(8),  .KL(3)) r1 (.start(go[1]), .done(dn[1]), .checks(c[1]), .failures(f[1]), .tcks(t[1]), .updates(u[1]));
  mt_workload_run #(.N(16), .KL(2)) r2 (.start(go[2]), .done(dn[2]), .checks(c[2]), .failures(f[2]), .tcks(t[2]), .updates(u[2]));
  mt_workload_run #(.N(16), .KL(3)) r3 (.start(go[3]), .done(dn[3]), .checks(c[3]), .failures(f[3]), .tcks(t[3]), .updates(u[3]));
  mt_workload_run #(.N(32), .KL(2)) r4 (.start(go[4]), .done(dn[4]), .checks(c[4]), .failures(f[4]), .tcks(t[4]), .updates(u[4]));
  mt_workload_run #(.N(32), .KL(3)) r5 (.start(go[5]), .done(dn[5]), .checks(c[5]), .failures(f[5]), .tcks(t[5]), .updates(u[5]));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (go[i]) go[i] = 0;
    for (int i = 0; i < 6; i++) begin
      longint nseed, enh, conv, mm, npat;
      go[i] = 1;
      wait (dn[i]);
      mm    = 2 * kv[i] + 1;
      nseed = mm * (64'd1 << (2 * kv[i]));
      npat  = mm * (64'd1 << (mm + 1));
      enh   = nseed * (2 * nv[i] + 8 * kv[i]);
      conv  = mm * npat * (nv[i] + 4);
      checks += c[i]; failures += f[i];
      checks++;
      if (u[i] != nseed * 4 * (kv[i] + 1) + nseed) begin
        failures++; $display("FAIL n=%0d k=%0d: %0d UpdateDRs", nv[i], kv[i], u[i]);
      end
      checks++;
      if (t[i] < enh || t[i] >= conv) begin
        failures++; $display("FAIL n=%0d k=%0d: TCK count out of range", nv[i], kv[i]);
      end
      $display("n=%0d k=%0d: seeds=%0d UpdateDRs=%0d TCK measured=%0d closed-form enhanced=%0d plain chain=%0d reduction=%0.1f%%",
               nv[i], kv[i], nseed, u[i], t[i], enh, conv, 100.0 * real'(conv - t[i]) / real'(conv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
