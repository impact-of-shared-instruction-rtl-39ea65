// One configuration of the shared-instruction-memory scaling experiment
// (helper of tb_shared_imem_scaling).
//
// Instantiates mpsoc_top with NS slaves and runs a synthetic encoding load
// for CYCLES cycles with the hardware monitor counting. Each CPU model
// fetches one instruction per cycle when not stalled. Its program is a chain
// of loops placed at random in a 140 KB code area: a loop body of 16 to 256
// words is run ITER_SLAVE (slaves) or ITER_MASTER (master) times, then the
// program moves to another loop. The first pass over a body misses in the
// 8 KB cache once per eight-word line and reads the whole body from the
// SRAM, so the share of cycles with an SRAM read is about 1 / iterations
// (5.6 % for the slaves, 0.25 % for the master). Every fetched word
// is compared with the SRAM model. The master's data master starts the
// monitor before the run and, afterwards, stops it and has it dump its
// counters into the master's data RAM over HIBI; they are then copied to the
// result ports.
module scaling_run
  import mpsoc_pkg::*;
#(
  parameter int NS             = 3,
  parameter int CYCLES         = 400000,
  parameter int ITER_SLAVE     = 18,
  parameter int ITER_MASTER    = 400
) (
  output bit done,
  output int fetch_errors,
  output int t_fet,
  output int t_w      [NS+1],
  output int a_r      [NS+1],
  output int lat      [NS+1],
  output int blk      [NS+1],
  output int a_k      [NS+2],
  output int a_t,
  output int sp_long
);
  localparam int N = NS + 1, CAW = SRAM_AW - 1;
  localparam int CODE_WORDS = 140 * 1024 / 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] ir = '0, iw, dwt, irq, dr = '0, dw = '0;
  logic [N-1:0][CAW-1:0] ia = '0;
  logic [N-1:0][31:0] ird, drd, da = '0, dwd = '0;
  logic [SRAM_AW-1:0] sa; logic sr, sw; logic [31:0] swd, srd; logic [3:0] sbe;
  logic mrun;
  logic pmtr, pmrv; hibi_word_t pmrw;
  logic [N-1:0] miss, rxstall;
  logic [31:0] sram [1 << SRAM_AW];

  mpsoc_top #(.N_SLAVES(NS)) dut (
    .clk, .rst_n,
    .i_read(ir), .i_address(ia), .i_waitrequest(iw), .i_readdata(ird),
    .d_read(dr), .d_write(dw), .d_address(da), .d_writedata(dwd), .d_byteenable('1),
    .d_waitrequest(dwt), .d_readdata(drd), .irq,
    .sram_addr(sa), .sram_read(sr), .sram_write(sw), .sram_wdata(swd), .sram_be(sbe),
    .sram_rdata(srd), .eth_read(1'b0), .eth_write(1'b0),
    .mon_running(mrun),
    .pm_tx_valid(1'b0), .pm_tx_word('0), .pm_tx_ready(pmtr),
    .pm_rx_valid(pmrv), .pm_rx_word(pmrw), .pm_rx_ready(1'b1),
    .icache_miss(miss), .dma_rx_stall(rxstall)
  );

  assign srd = sram[sa];
  always #10 clk = ~clk;

  bit go = 0, stop = 0;

  localparam logic [31:0] DRAM = 32'h0010_0000, N2H2 = 32'h0020_0000;
  localparam int NREG = 5 * N + 6 + (N - 1);

  // master data master accesses
  task automatic dread(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); dr[0] = 1; da[0] = a; #1;
    while (dwt[0]) begin @(negedge clk); #1; end
    d = drd[0];
    @(negedge clk); dr[0] = 0;
  endtask

  task automatic dwrite(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); dw[0] = 1; da[0] = a; dwd[0] = d; #1;
    while (dwt[0]) begin @(negedge clk); #1; end
    @(negedge clk); dw[0] = 0;
  endtask

  task automatic mon_cmd(input logic [31:0] w);
    logic [31:0] d;
    dwrite(DRAM + 32'(4 * 6000), w);
    dwrite(N2H2 + 4 * N2H2_TX_MEM, 6000);
    dwrite(N2H2 + 4 * N2H2_TX_LEN, 1);
    dwrite(N2H2 + 4 * N2H2_TX_HADDR, 32'h2000);
    dwrite(N2H2 + 4 * N2H2_TX_CTRL, 1);
    do dread(N2H2 + 4 * N2H2_TX_CTRL, d); while (d[0]);
  endtask
  initial fetch_errors = 0;

  for (genvar k = 0; k < N; k++) begin : g_cpu
    initial begin
      int pc, start, len, iter;
      start = $urandom % (CODE_WORDS - 256); len = 16 + $urandom % 241; iter = 0;
      pc = start;
      wait (go);
      while (!stop) begin
        @(negedge clk);
        ir[k] = 1; ia[k] = CAW'(pc);
        #1;
        while (iw[k]) begin @(negedge clk); #1; end
        if (ird[k] !== sram[{k != 0, CAW'(pc)}]) fetch_errors++;
        pc++;
        if (pc == start + len) begin
          pc = start;
          iter++;
          if (iter == (k == 0 ? ITER_MASTER : ITER_SLAVE)) begin
            start = $urandom % (CODE_WORDS - 256); len = 16 + $urandom % 241; iter = 0;
            pc = start;
          end
        end
      end
      @(negedge clk); ir[k] = 0;
    end
  end

  initial begin
    done = 0;
    for (int i = 0; i < (1 << SRAM_AW); i++) sram[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mon_cmd(32'h4000_0000);
    wait (mrun);
    go = 1;
    repeat (CYCLES) @(negedge clk);
    stop = 1;
    repeat (40) @(negedge clk);
    mon_cmd(32'h8000_0000);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + N2H2_RX_MEM), 7000);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + N2H2_RX_AMT), NREG);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + N2H2_RX_HADDR), 32'h1F0);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + N2H2_RX_CTRL), 1);
    mon_cmd(32'hC000_01F0);
    begin
      logic [31:0] d;
      logic [31:0] v [NREG];
      do dread(N2H2 + 4 * N2H2_RX_IRQ, d); while (!d[0]);
      for (int j = 0; j < NREG; j++) dread(DRAM + 32'(4 * (7000 + j)), v[j]);
      t_fet   = int'(v[5*N]);
      a_t     = int'(v[5*N + 1]);
      sp_long = int'(v[5*N + 2]);
      for (int k = 0; k <= N; k++) a_k[k] = (k >= 2) ? int'(v[5*N + 6 + k - 2]) : 0;
      for (int i = 0; i < N; i++) begin
        t_w[i] = int'(v[5*i]);
        a_r[i] = int'(v[5*i + 1]);
        lat[i] = int'(v[5*i + 2]);
        blk[i] = int'(v[5*i + 3]);
      end
    end
    done = 1;
  end
endmodule
