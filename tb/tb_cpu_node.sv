// Self-checking testbench of cpu_node (a slave tile, upper SRAM half).
//
// The testbench plays the CPU core's instruction and data masters, the
// Avalon external bridge with the SRAM behind it (random waitrequest), and
// the HIBI bus. It checks: instruction fetches return the words of the
// tile's SRAM half, through the cache (a second pass over the same code
// causes no SRAM reads); data-master reads of SRAM constants; data RAM
// writes and read-back with one wait cycle; a DMA receive programmed through
// the data master that lands in the data RAM and raises irq; and a DMA send
// that leaves on the HIBI bus with the data RAM contents.
module tb_cpu_node;
  import mpsoc_pkg::*;
  localparam int CAW = SRAM_AW - 1;
  logic clk = 0, rst_n = 0;
  logic ir = 0; logic [CAW-1:0] ia = '0; logic iw; logic [31:0] ird;
  logic dr = 0, dw = 0; logic [31:0] da = '0, dwd = '0; logic [3:0] dbe = 4'hF; logic dwt; logic [31:0] drd;
  logic irq;
  logic sr, sw; logic [SRAM_AW-1:0] sa; logic [31:0] swd; logic [3:0] sbe; logic swt = 0; logic [31:0] srd;
  logic hreq, hgrant = 0, htxv, hv = 0, hf = 0, hrxf; hibi_word_t htxw, hw;
  logic miss, rxstall;
  logic [31:0] sram [1 << SRAM_AW];
  int checks = 0, failures = 0, sram_reads = 0;

  cpu_node #(.SRAM_HALF(1'b1), .HIBI_BASE(32'h200), .HIBI_SPAN(32'h100)) dut (
    .clk, .rst_n,
    .i_read(ir), .i_address(ia), .i_waitrequest(iw), .i_readdata(ird),
    .d_read(dr), .d_write(dw), .d_address(da), .d_writedata(dwd), .d_byteenable(dbe),
    .d_waitrequest(dwt), .d_readdata(drd), .irq,
    .s_read(sr), .s_write(sw), .s_address(sa), .s_writedata(swd), .s_byteenable(sbe),
    .s_waitrequest(swt), .s_readdata(srd),
    .hibi_req(hreq), .hibi_grant(hgrant), .hibi_tx_valid(htxv), .hibi_tx_word(htxw),
    .hibi_valid(hv), .hibi_word(hw), .hibi_full(hf), .hibi_rx_full(hrxf),
    .icache_miss(miss), .dma_rx_stall(rxstall)
  );

  assign srd = sram[sa];
  always @(negedge clk) swt <= ($urandom % 4) == 0;
  always @(posedge clk) if (sr && !swt) sram_reads++;
  always @(posedge clk) hgrant <= hreq;   // the bus grants whenever asked

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s", s);
  endtask

  task automatic fetch(input logic [CAW-1:0] a, output logic [31:0] d);
    @(negedge clk); ir = 1; ia = a; #1;
    while (iw) begin @(negedge clk); #1; end
    d = ird;
    @(negedge clk); ir = 0;
  endtask

  task automatic dread(input logic [31:0] a, output logic [31:0] d, output int waits);
    @(negedge clk); dr = 1; da = a; #1;
    waits = 0;
    while (dwt) begin @(negedge clk); #1; waits++; end
    d = drd;
    @(negedge clk); dr = 0;
  endtask

  task automatic dwrite(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); dw = 1; da = a; dwd = d; #1;
    while (dwt) begin @(negedge clk); #1; end
    @(negedge clk); dw = 0;
  endtask

  task automatic hput(input logic av, input logic [31:0] d);
    @(negedge clk); hv = 1; hw = '{av: av, data: d}; #1;
    while (hrxf) begin @(negedge clk); #1; end
    @(negedge clk); hv = 0;
  endtask

  localparam logic [31:0] DRAM = 32'h0010_0000, N2H2 = 32'h0020_0000;

  initial begin
    logic [31:0] d; int w, reads0;
    for (int i = 0; i < (1 << SRAM_AW); i++) sram[i] = $urandom;
    hw = '{av: 1'b0, data: 32'h0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // instruction fetches: 300 sequential words, twice
    for (int pass = 0; pass < 2; pass++) begin
      reads0 = sram_reads;
      for (int a = 0; a < 300; a++) begin
        fetch(CAW'(4096 + a), d);
        checks++;
        if (d !== sram[{1'b1, CAW'(4096 + a)}]) fail($sformatf("fetch %0d", a));
      end
      checks++;
      if (pass == 0 && sram_reads - reads0 != 304) fail($sformatf("first pass SRAM reads %0d", sram_reads - reads0));
      if (pass == 1 && sram_reads != reads0) fail("second pass missed the cache");
    end
    // data master: SRAM constants in the upper half
    for (int k = 0; k < 20; k++) begin
      int a;
      a = $urandom % (1 << CAW);
      dread(32'(a) << 2, d, w);
      checks++;
      if (d !== sram[{1'b1, CAW'(a)}]) fail("data read of SRAM constant");
    end
    // data RAM write and read-back
    for (int k = 0; k < 20; k++) dwrite(DRAM + 32'(4 * k), 32'hA000_0000 + k);
    for (int k = 0; k < 20; k++) begin
      dread(DRAM + 32'(4 * k), d, w);
      checks++;
      if (d !== 32'hA000_0000 + k || w != 1) fail($sformatf("data RAM word %0d = %h, %0d waits", k, d, w));
    end
    // DMA receive: channel 2, 6 words to data RAM word 100, HIBI address 0x203
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + 8 + N2H2_RX_MEM), 100);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + 8 + N2H2_RX_AMT), 6);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + 8 + N2H2_RX_HADDR), 32'h203);
    dwrite(N2H2 + 4 * (N2H2_RX_BASE + 8 + N2H2_RX_CTRL), 1);
    hput(1, 32'h203);
    for (int k = 0; k < 6; k++) hput(0, 32'hD0 + k);
    hput(1, 32'h999);              // another receiver's address: not taken
    hput(0, 32'hBAD);
    repeat (5) @(negedge clk);
    checks++;
    if (!irq) fail("no irq after DMA receive");
    for (int k = 0; k < 6; k++) begin
      dread(DRAM + 32'(4 * (100 + k)), d, w);
      checks++;
      if (d !== 32'hD0 + k) fail($sformatf("DMA word %0d = %h", k, d));
    end
    dread(DRAM + 32'(4 * 106), d, w);
    checks++;
    if (d === 32'hBAD) fail("foreign word stored");
    dwrite(N2H2 + 4 * N2H2_RX_IRQ, 32'hFF);
    // DMA send: data RAM words 0..9 to HIBI address 0x1000
    dwrite(N2H2 + 4 * N2H2_TX_MEM, 0);
    dwrite(N2H2 + 4 * N2H2_TX_LEN, 10);
    dwrite(N2H2 + 4 * N2H2_TX_HADDR, 32'h1000);
    fork
      dwrite(N2H2 + 4 * N2H2_TX_CTRL, 1);
      begin
        int got;
        got = -1;
        while (got < 10) begin
          @(posedge clk);
          if (htxv && !hf && got >= 0 && htxw.av) begin
            // a new grant in the middle of the transfer re-sends the address
            checks++;
            if (htxw.data != 32'h1000) fail("re-sent TX address");
          end else if (htxv && !hf) begin
            checks++;
            if (got < 0) begin if (!htxw.av || htxw.data != 32'h1000) fail("TX address"); end
            else if (htxw.av || htxw.data !== (got < 10 ? 32'hA000_0000 + got : 0)) fail($sformatf("TX word %0d %h", got, htxw.data));
            got++;
          end
        end
      end
    join
    checks++;
    if (irq) fail("irq not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
