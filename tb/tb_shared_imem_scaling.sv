// Scaling experiment: one master with one, two and three encoding slaves
// sharing one instruction SRAM, as in the measured configurations.
//
// Each configuration runs the same synthetic load (slaves miss in the cache
// often enough to read the SRAM in roughly 5 % of cycles, the master rarely)
// for the same number of cycles and reports the hardware monitor's
// statistics. Checks: no fetch returned a wrong word; the slaves' SRAM read
// probability A_r/T_fet lies between 2 % and 10 %; SRAM utilisation A_t/T_fet
// equals the sum of the processors' reads; the worst slave wait T_w grows
// with the number of slaves; no read waits longer than one round of the
// bridge (L <= number of processors); with one slave no three-way
// simultaneous reads can occur, with three slaves four-way ones do.
module tb_shared_imem_scaling;
  int checks = 0, failures = 0;

  bit d1, d2, d3;
  int e1, e2, e3, f1, f2, f3, t1, t2, t3, s1, s2, s3;
  int w1 [2], w2 [3], w3 [4], r1 [2], r2 [3], r3 [4], l1 [2], l2 [3], l3 [4], b1 [2], b2 [3], b3 [4];
  int k1 [3], k2 [4], k3 [5];

  scaling_run #(.NS(1)) u_ns1 (.done(d1), .fetch_errors(e1), .t_fet(f1), .t_w(w1), .a_r(r1), .lat(l1), .blk(b1), .a_k(k1), .a_t(t1), .sp_long(s1));
  scaling_run #(.NS(2)) u_ns2 (.done(d2), .fetch_errors(e2), .t_fet(f2), .t_w(w2), .a_r(r2), .lat(l2), .blk(b2), .a_k(k2), .a_t(t2), .sp_long(s2));
  scaling_run #(.NS(3)) u_ns3 (.done(d3), .fetch_errors(e3), .t_fet(f3), .t_w(w3), .a_r(r3), .lat(l3), .blk(b3), .a_k(k3), .a_t(t3), .sp_long(s3));

  logic clk = 0;
  always #10 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s", s);
  endtask

  task automatic report(input int ns, input int errs, input int fet, input int tw[], input int ar[],
                        input int lt[], input int bk[], input int ak[], input int at, input int sp, output int twmax);
    int sum_ar;
    twmax = 0; sum_ar = 0;
    $display("---- %0d slave(s): T_fet %0d cycles, A_t %0d (%0.1f %% utilisation), A_sp %0d", ns, fet, at, 100.0 * at / fet, sp);
    for (int i = 0; i <= ns; i++) begin
      $display("  cpu%0d %s: T_w %0d  A_r %0d (%0.2f %% of cycles)  L %0d  S %0d", i, i == 0 ? "master" : "slave ",
               tw[i], ar[i], 100.0 * ar[i] / fet, lt[i], bk[i]);
      sum_ar += ar[i];
      if (i > 0 && tw[i] > twmax) twmax = tw[i];
      checks++;
      if (lt[i] > ns + 1) fail($sformatf("%0d slaves: latency %0d", ns, lt[i]));
      if (i > 0) begin
        checks++;
        if (100 * ar[i] < 2 * fet || 100 * ar[i] > 10 * fet) fail($sformatf("%0d slaves: slave fetch probability off", ns));
      end
    end
    for (int k = 2; k <= ns + 1; k++) $display("  A_%0d %0d", k, ak[k]);
    checks++;
    if (errs != 0) fail($sformatf("%0d slaves: %0d wrong fetches", ns, errs));
    checks++;
    if (sum_ar != at) fail($sformatf("%0d slaves: sum A_r %0d != A_t %0d", ns, sum_ar, at));
    $display("  worst slave T_w %0d", twmax);
  endtask

  initial begin
    int m1, m2, m3;
    wait (d1 && d2 && d3);
    report(1, e1, f1, w1, r1, l1, b1, k1, t1, s1, m1);
    report(2, e2, f2, w2, r2, l2, b2, k2, t2, s2, m2);
    report(3, e3, f3, w3, r3, l3, b3, k3, t3, s3, m3);
    checks++;
    if (!(m1 < m2 && m2 < m3)) fail("worst slave wait does not grow with the number of slaves");
    checks++;
    if (k3[4] == 0) fail("three slaves: no four-way simultaneous read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
