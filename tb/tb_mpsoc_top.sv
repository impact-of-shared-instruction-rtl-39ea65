// End-to-end testbench of mpsoc_top at its default size (one master, three
// slaves, 8 KB caches, 64 KB data RAMs, eight RX channels).
//
// Models stand in for what lies outside the chip logic: four CPU cores (each
// an instruction-fetch process running a loop-heavy program from its SRAM
// half, plus a data-master process), the 1 MB external SRAM, and the picture
// memory controller on HIBI. The scenario follows one encoding round of the
// measured system:
//   1. the master starts the hardware monitor with a command sent over HIBI
//      and arms three RX channels;
//   2. the picture-memory agent sends each slave a slice of picture data;
//      slave 3 arms its channel late, so its slice waits on the bus;
//   3. each slave reads its slice from data RAM, reads constants from the
//      SRAM code segment, and sends a 40-word result to the master (longer
//      than the 16-word HIBI limit, so transfers are split);
//   4. the master checks the results, sends 8 words to the picture memory,
//      stops the monitor and has it dump its counters over HIBI into the
//      master's data RAM, where it reads them.
// All the while every fetch is checked against the SRAM contents. The
// monitor counters are compared with counts the testbench takes itself from
// the tile SRAM ports. Each mechanism (cache hit and miss, SRAM contention,
// two-, three- and four-way simultaneous reads, DMA receive and send, split
// HIBI transfer, DMA stall on an unarmed channel) must occur at least once.
module tb_mpsoc_top;
  import mpsoc_pkg::*;
  localparam int NS = 3, N = NS + 1, CAW = SRAM_AW - 1;
  localparam int CODE_WORDS = 140 * 1024 / 4;   // 140 KB encoder code

  logic clk = 0, rst_n = 0;
  logic [N-1:0] ir = '0, iw, dr = '0, dw = '0, dwt, irq;
  logic [N-1:0][CAW-1:0] ia = '0;
  logic [N-1:0][31:0] ird, da = '0, dwd = '0, drd;
  logic [N-1:0][3:0] dbe = '1;
  logic [SRAM_AW-1:0] sa; logic sr, sw; logic [31:0] swd, srd; logic [3:0] sbe;
  logic mrun;
  logic pmtv = 0, pmtr, pmrv, pmrr = 0; hibi_word_t pmtw, pmrw;
  logic [N-1:0] miss, rxstall;

  logic [31:0] sram [1 << SRAM_AW];
  int checks = 0, failures = 0;

  mpsoc_top dut (
    .clk, .rst_n,
    .i_read(ir), .i_address(ia), .i_waitrequest(iw), .i_readdata(ird),
    .d_read(dr), .d_write(dw), .d_address(da), .d_writedata(dwd), .d_byteenable(dbe),
    .d_waitrequest(dwt), .d_readdata(drd), .irq,
    .sram_addr(sa), .sram_read(sr), .sram_write(sw), .sram_wdata(swd), .sram_be(sbe),
    .sram_rdata(srd), .eth_read(1'b0), .eth_write(1'b0),
    .mon_running(mrun),
    .pm_tx_valid(pmtv), .pm_tx_word(pmtw), .pm_tx_ready(pmtr),
    .pm_rx_valid(pmrv), .pm_rx_word(pmrw), .pm_rx_ready(pmrr),
    .icache_miss(miss), .dma_rx_stall(rxstall)
  );

  // external SRAM model (asynchronous read)
  assign srd = sram[sa];
  always @(posedge clk) if (sw) sram[sa] <= swd;

  always #10 clk = ~clk;   // 50 MHz
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s", s);
  endtask

  // ---------------- independent counts from the tile SRAM ports ----------------
  int c_elapsed = 0, c_total = 0, c_sim [N+1], c_wait [N], c_reads [N], c_miss [N], c_hits [N];
  int c_stall = 0, c_split = 0, c_dma_rx = 0, c_dma_tx = 0;
  always @(posedge clk) begin
    if (rst_n && mrun && !dut.mon_stop) begin
      int n;
      n = 0;
      c_elapsed++;
      if (sr) c_total++;
      for (int i = 0; i < N; i++) begin
        n += dut.s_read[i];
        if (dut.s_read[i] && dut.s_wait[i]) c_wait[i]++;
        if (dut.s_read[i] && !dut.s_wait[i]) c_reads[i]++;
        if (miss[i]) c_miss[i]++;
      end
      c_sim[n]++;
    end
    if (rst_n) begin
      if (|rxstall) c_stall++;
      // an address word re-sent in a new grant after data words of the same transfer
      if (dut.h_valid && !dut.h_full && dut.h_word.av && dut.h_word.data[15:8] == 8'h01) c_split++;
    end
  end

  // ---------------- CPU models: instruction fetch ----------------
  bit go = 0, stop_fetch = 0;
  int fetches [N], const_reads [N];
  for (genvar k = 0; k < N; k++) begin : g_fetch
    initial begin
      int pc, loop_start;
      fetches[k] = 0; c_hits[k] = 0;
      pc = 0; loop_start = 0;
      wait (go);
      while (!stop_fetch) begin
        int r;
        @(negedge clk);
        ir[k] = 1; ia[k] = CAW'(pc);
        #1;
        if (!iw[k]) c_hits[k]++;
        while (iw[k]) begin @(negedge clk); #1; end
        checks++;
        if (ird[k] !== sram[{k != 0, CAW'(pc)}]) fail($sformatf("cpu%0d fetch %0d", k, pc));
        fetches[k]++;
        r = $urandom % 1000;
        if (r < 60)      pc = loop_start;                               // loop back
        else if (r < 64) begin pc = $urandom % CODE_WORDS; loop_start = pc; end  // call
        else             pc = (pc + 1) % CODE_WORDS;
        if ($urandom % 4 == 0) begin @(negedge clk); ir[k] = 0; end
      end
      @(negedge clk); ir[k] = 0;
    end
  end

  // ---------------- CPU models: data master tasks ----------------
  localparam logic [31:0] DRAM = 32'h0010_0000, N2H2 = 32'h0020_0000;

  task automatic dread(input int k, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); dr[k] = 1; da[k] = a; #1;
    while (dwt[k]) begin @(negedge clk); #1; end
    d = drd[k];
    @(negedge clk); dr[k] = 0;
  endtask

  task automatic dwrite(input int k, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); dw[k] = 1; da[k] = a; dwd[k] = d; #1;
    while (dwt[k]) begin @(negedge clk); #1; end
    @(negedge clk); dw[k] = 0;
  endtask

  task automatic nreg(input int k, input int r, input logic [31:0] d);
    dwrite(k, N2H2 + 32'(4 * r), d);
  endtask

  task automatic const_read(input int k);
    logic [31:0] d; int a;
    a = $urandom % CODE_WORDS;
    dread(k, 32'(a) << 2, d);
    checks++;
    const_reads[k]++;
    if (d !== sram[{k != 0, CAW'(a)}]) fail($sformatf("cpu%0d constant read", k));
  endtask

  localparam int SLICE = 24, RES = 40;
  localparam int NREG = 5 * N + 6 + (N - 1);

  // master: send one command word to the monitor (HIBI address 0x2000)
  task automatic mon_cmd(input logic [31:0] w);
    logic [31:0] d;
    dwrite(0, DRAM + 32'(4 * 6000), w);
    nreg(0, N2H2_TX_MEM, 6000);
    nreg(0, N2H2_TX_LEN, 1);
    nreg(0, N2H2_TX_HADDR, 32'h2000);
    nreg(0, N2H2_TX_CTRL, 1);
    do dread(0, N2H2 + 4 * N2H2_TX_CTRL, d); while (d[0]);
  endtask
  bit slaves_done [N];

  // slaves
  for (genvar k = 1; k < N; k++) begin : g_slave
    initial begin
      logic [31:0] d;
      slaves_done[k] = 0; const_reads[k] = 0;
      wait (go);
      if (k == 3) repeat (400) @(negedge clk);   // late: the slice waits on the bus
      nreg(k, N2H2_RX_BASE + N2H2_RX_MEM, 0);
      nreg(k, N2H2_RX_BASE + N2H2_RX_AMT, SLICE);
      nreg(k, N2H2_RX_BASE + N2H2_RX_HADDR, 32'h100 * (k + 1));
      nreg(k, N2H2_RX_BASE + N2H2_RX_CTRL, 1);
      while (!irq[k]) begin
        const_read(k);
        repeat ($urandom % 20) @(negedge clk);
      end
      c_dma_rx++;
      nreg(k, N2H2_RX_IRQ, 1);
      // "encode": result word j = f(slice word j % SLICE)
      for (int j = 0; j < RES; j++) begin
        dread(k, DRAM + 32'(4 * (j % SLICE)), d);
        checks++;
        if (d !== {8'hF0, 8'(k), 16'(j % SLICE)}) fail($sformatf("slave %0d slice word %0d = %h", k, j, d));
        if (j % 8 == 0) const_read(k);
        dwrite(k, DRAM + 32'(4 * (2000 + j)), d ^ 32'h5A5A_0000);
      end
      nreg(k, N2H2_TX_MEM, 2000);
      nreg(k, N2H2_TX_LEN, RES);
      nreg(k, N2H2_TX_HADDR, 32'h100 + k);
      nreg(k, N2H2_TX_CTRL, 1);
      do dread(k, N2H2 + 4 * N2H2_TX_CTRL, d); while (d[0]);
      c_dma_tx++;
      slaves_done[k] = 1;
    end
  end

  // picture-memory agent: sends a slice to every slave, then receives from the master
  initial begin
    pmtv = 0; pmtw = '{av: 1'b0, data: 32'h0};
    wait (go);
    for (int k = 1; k < N; k++) begin
      @(negedge clk); pmtv = 1; pmtw = '{av: 1'b1, data: 32'h100 * (k + 1)};
      #1 while (!pmtr) begin @(negedge clk); #1; end
      for (int j = 0; j < SLICE; j++) begin
        @(negedge clk); pmtv = 1; pmtw = '{av: 1'b0, data: {8'hF0, 8'(k), 16'(j)}};
        #1 while (!pmtr) begin @(negedge clk); #1; end
      end
    end
    @(negedge clk); pmtv = 0;
  end

  int pm_words = 0;
  always @(negedge clk) pmrr <= $urandom % 2;
  always @(posedge clk) begin
    if (rst_n && pmrv && pmrr) begin
      if (!pmrw.av) begin
        checks++;
        if (pmrw.data !== 32'hC0DE_0000 + pm_words) fail("picture memory received wrong word");
        pm_words++;
      end
    end
  end

  // master
  initial begin
    logic [31:0] d;
    for (int i = 0; i <= N; i++) c_sim[i] = 0;
    for (int i = 0; i < N; i++) begin c_wait[i] = 0; c_reads[i] = 0; c_miss[i] = 0; end
    const_reads[0] = 0;
    for (int i = 0; i < (1 << SRAM_AW); i++) sram[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mon_cmd(32'h4000_0000);                 // start
    wait (mrun);
    go = 1;
    for (int c = 1; c <= NS; c++) begin
      nreg(0, N2H2_RX_BASE + 4*c + N2H2_RX_MEM, 1000 * c);
      nreg(0, N2H2_RX_BASE + 4*c + N2H2_RX_AMT, RES);
      nreg(0, N2H2_RX_BASE + 4*c + N2H2_RX_HADDR, 32'h100 + c);
      nreg(0, N2H2_RX_BASE + 4*c + N2H2_RX_CTRL, 1);
    end
    do begin
      dread(0, N2H2 + 4 * N2H2_RX_IRQ, d);
      if ($urandom % 8 == 0) const_read(0);
    end while (d[NS:1] != '1);
    c_dma_rx++;
    for (int c = 1; c <= NS; c++)
      for (int j = 0; j < RES; j++) begin
        dread(0, DRAM + 32'(4 * (1000 * c + j)), d);
        checks++;
        if (d !== ({8'hF0, 8'(c), 16'(j % SLICE)} ^ 32'h5A5A_0000)) fail($sformatf("master result %0d/%0d = %h", c, j, d));
      end
    nreg(0, N2H2_RX_IRQ, 32'hFF);
    for (int j = 0; j < 8; j++) dwrite(0, DRAM + 32'(4 * (5000 + j)), 32'hC0DE_0000 + j);
    nreg(0, N2H2_TX_MEM, 5000);
    nreg(0, N2H2_TX_LEN, 8);
    nreg(0, N2H2_TX_HADDR, 32'h1000);
    nreg(0, N2H2_TX_CTRL, 1);
    wait (pm_words == 8);
    c_dma_tx++;
    for (int k = 1; k < N; k++) wait (slaves_done[k]);
    // let the fetch processes finish their last fetch, then stop the monitor
    stop_fetch = 1;
    repeat (40) @(negedge clk);
    mon_cmd(32'h8000_0000);                 // stop
    // the command still crosses HIBI after the DMA has handed it over
    for (int w = 0; w < 50 && mrun; w++) @(negedge clk);
    checks++;
    if (mrun) fail("monitor still running after stop command");
    // dump: counters to HIBI address 0x1F0, taken by master RX channel 7
    nreg(0, N2H2_RX_BASE + 4*7 + N2H2_RX_MEM, 7000);
    nreg(0, N2H2_RX_BASE + 4*7 + N2H2_RX_AMT, NREG);
    nreg(0, N2H2_RX_BASE + 4*7 + N2H2_RX_HADDR, 32'h1F0);
    nreg(0, N2H2_RX_BASE + 4*7 + N2H2_RX_CTRL, 1);
    mon_cmd(32'hC000_01F0);
    do dread(0, N2H2 + 4 * N2H2_RX_IRQ, d); while (!d[7]);
    // ---------------- monitor read-out ----------------
    begin
      int mr_total, s_reads, maxlat;
      logic [31:0] v [NREG];
      for (int j = 0; j < NREG; j++) dread(0, DRAM + 32'(4 * (7000 + j)), v[j]);
      s_reads = 0; maxlat = 0;
      checks++; if (v[5*N] != c_elapsed) fail($sformatf("T_fet %0d vs %0d", v[5*N], c_elapsed));
      mr_total = int'(v[5*N + 1]);
      checks++; if (v[5*N + 1] != c_total) fail($sformatf("A_t %0d vs %0d", v[5*N + 1], c_total));
      for (int k = 2; k <= N; k++) begin
        checks++; if (v[5*N + 6 + k - 2] != c_sim[k]) fail($sformatf("A_%0d %0d vs %0d", k, v[5*N + 6 + k - 2], c_sim[k]));
        $display("A_%0d (cycles with %0d readers) = %0d", k, k, v[5*N + 6 + k - 2]);
      end
      for (int i = 0; i < N; i++) begin
        checks++; if (v[5*i] != c_wait[i]) fail($sformatf("cpu%0d T_w %0d vs %0d", i, v[5*i], c_wait[i]));
        $display("cpu%0d T_w = %0d", i, v[5*i]);
        checks++; if (v[5*i + 1] != c_reads[i]) fail($sformatf("cpu%0d A_r %0d vs %0d", i, v[5*i + 1], c_reads[i]));
        checks++; if (v[5*i + 1] != 8 * c_miss[i] + const_reads[i])
          fail($sformatf("cpu%0d A_r %0d vs 8*misses + constants %0d", i, v[5*i + 1], 8 * c_miss[i] + const_reads[i]));
        s_reads += int'(v[5*i + 1]);
        $display("cpu%0d A_r = %0d (fetches %0d, misses %0d, constant reads %0d)", i, v[5*i + 1], fetches[i], c_miss[i], const_reads[i]);
        if (int'(v[5*i + 2]) > maxlat) maxlat = int'(v[5*i + 2]);
        checks++; if (v[5*i + 3] < 8) fail($sformatf("cpu%0d S = %0d, below one cache line", i, v[5*i + 3]));
      end
      checks++; if (s_reads != mr_total) fail("sum of A_r differs from A_t");
      checks++; if (maxlat > N || maxlat < 2) fail($sformatf("max latency %0d", maxlat));
      $display("max latency %0d cycles, T_fet %0d, A_t %0d", maxlat, c_elapsed, mr_total);
    end
    // ---------------- mechanisms ----------------
    begin
      int hits, misses, waits;
      hits = 0; misses = 0; waits = 0;
      for (int i = 0; i < N; i++) begin hits += c_hits[i]; misses += c_miss[i]; waits += c_wait[i]; end
      $display("mechanisms: cache hits %0d, cache misses %0d, SRAM wait cycles %0d, 2/3/4 readers %0d/%0d/%0d,",
               hits, misses, waits, c_sim[2], c_sim[3], c_sim[4]);
      $display("            DMA receives %0d, DMA sends %0d, re-sent HIBI addresses %0d, DMA stall cycles %0d",
               c_dma_rx, c_dma_tx, c_split, c_stall);
      checks++; if (hits == 0)     fail("no cache hit");
      checks++; if (misses == 0)   fail("no cache miss");
      checks++; if (waits == 0)    fail("no SRAM contention");
      checks++; if (c_sim[2] == 0) fail("never two readers");
      checks++; if (c_sim[3] == 0) fail("never three readers");
      checks++; if (c_sim[4] == 0) fail("never four readers");
      checks++; if (c_dma_rx != NS + 1) fail("DMA receives missing");
      checks++; if (c_dma_tx != NS + 1) fail("DMA sends missing");
      checks++; if (c_split == 0)  fail("no split HIBI transfer");
      checks++; if (c_stall == 0)  fail("no DMA stall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
