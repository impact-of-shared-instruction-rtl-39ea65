// Self-checking testbench of avalon_ext_bridge.
//
// Four ports issue random reads and writes to a small SRAM model, holding
// each request until accepted. Every cycle the testbench checks that exactly
// the port its own round-robin reference picks is accepted, that read data
// equal its shadow copy of the memory, that writes land with their byte
// enables, and that no read waits more than N_PORTS cycles.
module tb_avalon_ext_bridge;
  localparam int N = 4, AW = 10;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] rd = '0, wr = '0, wt;
  logic [N-1:0][AW-1:0] ad;
  logic [N-1:0][31:0] wd;
  logic [N-1:0][3:0] be;
  logic [31:0] prd;
  logic [AW-1:0] sa; logic sr, sw; logic [31:0] swd, srd; logic [3:0] sbe;

  logic [31:0] sram [1 << AW];
  logic [31:0] shadow [1 << AW];
  int checks = 0, failures = 0;

  avalon_ext_bridge #(.N_PORTS(N), .AW(AW)) dut (
    .clk, .rst_n, .p_read(rd), .p_write(wr), .p_address(ad), .p_writedata(wd),
    .p_byteenable(be), .p_waitrequest(wt), .p_readdata(prd),
    .sram_addr(sa), .sram_read(sr), .sram_write(sw), .sram_wdata(swd),
    .sram_be(sbe), .sram_rdata(srd)
  );

  // asynchronous SRAM model
  assign srd = sram[sa];
  always @(posedge clk)
    if (sw) for (int b = 0; b < 4; b++) if (sbe[b]) sram[sa][8*b +: 8] <= swd[8*b +: 8];

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, exp_win, waitc[N], maxwait;
    for (int a = 0; a < (1 << AW); a++) begin sram[a] = $urandom; shadow[a] = sram[a]; end
    ad = '0; wd = '0; be = '0;
    last = N - 1; maxwait = 0;
    for (int i = 0; i < N; i++) waitc[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // new requests for idle ports
      for (int i = 0; i < N; i++) begin
        if (!(rd[i] || wr[i])) begin
          if (($urandom % 100) < 60) begin
            ad[i] = AW'($urandom);
            if (($urandom % 4) == 0) begin
              wr[i] = 1; rd[i] = 0; wd[i] = $urandom; be[i] = 4'($urandom) | 4'b0001;
            end else begin
              rd[i] = 1; wr[i] = 0;
            end
          end
        end
      end
      #1;
      // reference round-robin
      exp_win = -1;
      for (int k = 1; k <= N; k++)
        if (exp_win < 0 && (rd[(last + k) % N] || wr[(last + k) % N])) exp_win = (last + k) % N;
      for (int i = 0; i < N; i++) begin
        if (rd[i] || wr[i]) begin
          checks++;
          if (wt[i] != (i != exp_win)) begin
            failures++;
            $display("FAIL t=%0d port %0d waitrequest=%0b expected winner %0d", t, i, wt[i], exp_win);
          end
        end
      end
      if (exp_win >= 0) begin
        last = exp_win;
        if (rd[exp_win]) begin
          checks++;
          if (prd !== shadow[ad[exp_win]]) begin
            failures++;
            $display("FAIL read port %0d addr %0d got %h exp %h", exp_win, ad[exp_win], prd, shadow[ad[exp_win]]);
          end
        end else begin
          for (int b = 0; b < 4; b++)
            if (be[exp_win][b]) shadow[ad[exp_win]][8*b +: 8] = wd[exp_win][8*b +: 8];
        end
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (i == exp_win) begin
          if (waitc[i] + 1 > maxwait) maxwait = waitc[i] + 1;
          waitc[i] = 0; rd[i] = 0; wr[i] = 0;
        end else if (rd[i] || wr[i]) waitc[i]++;
      end
    end
    checks++;
    if (maxwait > N || maxwait < 2) begin
      failures++;
      $display("FAIL latency bound: max latency %0d", maxwait);
    end
    // final memory comparison
    for (int a = 0; a < (1 << AW); a++) begin
      checks++;
      if (sram[a] !== shadow[a]) begin failures++; $display("FAIL mem %0d", a); end
    end
    $display("max latency %0d cycles", maxwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
