// Self-checking testbench of hw_monitor.
//
// Drives N_CPU random Avalon read streams (a read that sees waitrequest is
// held until accepted), a random SRAM read strobe and Ethernet strobes for a
// fixed number of cycles between cmd_start and cmd_stop. The trace is stored,
// and the expected counters are computed afterwards by scanning the stored
// trace for runs, then compared with every monitor register. Activity after
// cmd_stop must not change any counter, and a second cmd_start must clear
// them.
module tb_hw_monitor;
  import mpsoc_pkg::*;

  localparam int unsigned N   = 4;
  localparam int unsigned LEN = 3000;

  logic clk = 0, rst_n = 0;
  logic cmd_start = 0, cmd_stop = 0, running;
  logic [N-1:0] rd = '0, wr = '0;
  logic sram_rd = 0, eth_rd = 0, eth_wr = 0;
  logic [6:0] addr = '0;
  logic [31:0] rdata;

  int checks = 0, failures = 0;

  hw_monitor #(.N_CPU(N), .CNT_W(32)) dut (
    .clk, .rst_n, .cmd_start, .cmd_stop, .running,
    .cpu_read(rd), .cpu_waitrequest(wr), .sram_read(sram_rd),
    .eth_read(eth_rd), .eth_write(eth_wr), .reg_addr(addr), .reg_rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] t_rd [LEN];
  logic [N-1:0] t_wr [LEN];
  logic         t_s  [LEN];
  logic         t_er [LEN];
  logic         t_ew [LEN];

  task automatic check(input int a, input int unsigned exp, input string what);
    addr = 7'(a);
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s (reg %0d): got %0d expected %0d", what, a, rdata, exp);
    end
  endtask

  int unsigned e_wait[N], e_reads[N], e_lat[N], e_blk[N], e_blocks[N];
  int unsigned e_simul[N+1], e_total, e_splong, e_spcount, e_erd, e_ewr;

  task automatic compute_expected();
    for (int i = 0; i < N; i++) begin
      int unsigned lat, blk;
      e_wait[i] = 0; e_reads[i] = 0; e_lat[i] = 0; e_blk[i] = 0; e_blocks[i] = 0;
      lat = 0; blk = 0;
      for (int t = 0; t < LEN; t++) begin
        if (t_rd[t][i]) begin
          if (t == 0 || !t_rd[t-1][i]) begin e_blocks[i]++; blk = 0; end
          if (t_wr[t][i]) begin e_wait[i]++; lat++; end
          else begin
            e_reads[i]++; blk++;
            if (lat + 1 > e_lat[i]) e_lat[i] = lat + 1;
            if (blk > e_blk[i]) e_blk[i] = blk;
            lat = 0;
          end
        end
      end
    end
    for (int k = 0; k <= N; k++) e_simul[k] = 0;
    e_total = 0; e_splong = 0; e_spcount = 0; e_erd = 0; e_ewr = 0;
    begin
      int unsigned run;
      run = 0;
      for (int t = 0; t < LEN; t++) begin
        e_simul[$countones(t_rd[t])]++;
        if (t_s[t]) begin
          e_total++;
          run++;
          if (run == 1) e_spcount++;
          if (run > e_splong) e_splong = run;
        end else run = 0;
        e_erd += t_er[t];
        e_ewr += t_ew[t];
      end
    end
  endtask

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      check(8*i + MON_WAIT,   e_wait[i],   $sformatf("cpu%0d T_w", i));
      check(8*i + MON_READS,  e_reads[i],  $sformatf("cpu%0d A_r", i));
      check(8*i + MON_MAXLAT, e_lat[i],    $sformatf("cpu%0d L", i));
      check(8*i + MON_MAXBLK, e_blk[i],    $sformatf("cpu%0d S", i));
      check(8*i + MON_BLOCKS, e_blocks[i], $sformatf("cpu%0d A_b", i));
    end
    check(MON_SYS_BASE + MON_ELAPSED, LEN, "T_fet");
    check(MON_SYS_BASE + MON_TOTAL, e_total, "A_t");
    check(MON_SYS_BASE + MON_SPLONG, e_splong, "A_sp");
    check(MON_SYS_BASE + MON_SPCOUNT, e_spcount, "A_sb");
    check(MON_SYS_BASE + MON_ETH_RD, e_erd, "eth rd");
    check(MON_SYS_BASE + MON_ETH_WR, e_ewr, "eth wr");
    for (int k = 2; k <= N; k++)
      check(MON_SYS_BASE + MON_SIMUL + k, e_simul[k], $sformatf("A_%0d", k));
  endtask

  initial begin
    logic [N-1:0] pend;
    // build a trace that obeys the Avalon hold rule
    pend = '0;
    for (int t = 0; t < LEN; t++) begin
      for (int i = 0; i < N; i++) begin
        // bursty: phases of heavy and light traffic per processor
        int unsigned p;
        p = (((t / 97) + i) % 3 == 0) ? 85 : 15;
        t_rd[t][i] = pend[i] ? 1'b1 : (($urandom % 100) < p);
        t_wr[t][i] = t_rd[t][i] && (($urandom % 100) < 40);
        pend[i]    = t_rd[t][i] && t_wr[t][i];
      end
      t_s[t]  = (($urandom % 100) < ((t / 211) % 2 == 0 ? 70 : 20));
      t_er[t] = ($urandom % 10) == 0;
      t_ew[t] = ($urandom % 13) == 0;
    end
    compute_expected();

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) cmd_start = 1;
    @(negedge clk) cmd_start = 0;
    checks++;
    if (!running) begin failures++; $display("FAIL not running after start"); end
    for (int t = 0; t < LEN; t++) begin
      rd = t_rd[t]; wr = t_wr[t]; sram_rd = t_s[t]; eth_rd = t_er[t]; eth_wr = t_ew[t];
      @(negedge clk);
    end
    cmd_stop = 1; rd = '0; wr = '0; sram_rd = 0; eth_rd = 0; eth_wr = 0;
    @(negedge clk) cmd_stop = 0;
    checks++;
    if (running) begin failures++; $display("FAIL still running after stop"); end
    // activity while stopped is not counted
    for (int t = 0; t < 50; t++) begin
      rd = 4'($urandom); wr = '0; sram_rd = 1; eth_rd = 1; eth_wr = 1;
      @(negedge clk);
    end
    rd = '0; sram_rd = 0; eth_rd = 0; eth_wr = 0;
    check_all();
    // restart clears
    @(negedge clk) cmd_start = 1;
    @(negedge clk) cmd_start = 0;
    check(MON_SYS_BASE + MON_ELAPSED, 0, "T_fet after restart");
    check(MON_READS, 0, "A_r after restart");
    check(MON_SYS_BASE + MON_TOTAL, 0, "A_t after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
