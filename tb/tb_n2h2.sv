// Self-checking testbench of n2h2.
//
// A memory model stands for the data RAM (one cycle read latency) and the
// testbench plays both the processor, through the register port, and the
// HIBI wrapper. Receive: all eight channels are armed for different HIBI
// addresses, memory areas and amounts; transfers for them arrive
// interleaved, split into pieces that each re-send their address, and one
// transfer arrives before its channel is armed and must wait (stall) until
// it is. Every received word must land at its place, each channel must
// raise its interrupt bit exactly when complete, and the bits must clear.
// Transmit: a block of data RAM is sent with a random ready pattern and must
// leave as one address word and the data in order, with busy reading 1 until
// the last word has been taken.
module tb_n2h2;
  import mpsoc_pkg::*;
  localparam int CH = 8, MAW = 14;
  logic clk = 0, rst_n = 0;
  logic rw = 0; logic [5:0] ra = '0; logic [31:0] rwd = '0, rrd; logic irq;
  logic men; logic [3:0] mwe; logic [MAW-1:0] maddr; logic [31:0] mwd, mrd;
  logic txv, txr = 0, rxv = 0, rxr, stall; hibi_word_t txw, rxw;
  logic [31:0] mem [1 << MAW];
  int checks = 0, failures = 0, stall_cycles = 0;

  n2h2 #(.RX_CH(CH), .MAW(MAW)) dut (
    .clk, .rst_n, .reg_write(rw), .reg_addr(ra), .reg_wdata(rwd), .reg_rdata(rrd), .irq,
    .mem_en(men), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd), .mem_rdata(mrd),
    .tx_valid(txv), .tx_word(txw), .tx_ready(txr),
    .rx_valid(rxv), .rx_word(rxw), .rx_ready(rxr), .rx_stall(stall)
  );

  always @(posedge clk) begin
    if (men) begin
      if (mwe == 4'hF) mem[maddr] <= mwd;
      mrd <= mem[maddr];
    end
    if (stall) stall_cycles++;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s", s);
  endtask

  task automatic wreg(input int a, input logic [31:0] d);
    @(negedge clk); rw = 1; ra = 6'(a); rwd = d;
    @(negedge clk); rw = 0;
  endtask

  task automatic rreg(input int a, output logic [31:0] d);
    ra = 6'(a); #1 d = rrd;
  endtask

  // send one word towards the DMA (wrapper RX FIFO head)
  task automatic put(input logic av, input logic [31:0] d);
    @(negedge clk); rxv = 1; rxw = '{av: av, data: d};
    #1;
    while (!rxr) begin @(negedge clk); #1; end
    @(posedge clk); #1 rxv = 0;
  endtask

  int amt [CH], base [CH], sent [CH];

  initial begin
    logic [31:0] v;
    for (int i = 0; i < (1 << MAW); i++) mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- receive ----------
    for (int c = 0; c < CH; c++) begin
      amt[c] = 3 + c * 2; base[c] = 1000 + 100 * c; sent[c] = 0;
      wreg(N2H2_RX_BASE + 4*c + N2H2_RX_MEM, base[c]);
      wreg(N2H2_RX_BASE + 4*c + N2H2_RX_AMT, amt[c]);
      wreg(N2H2_RX_BASE + 4*c + N2H2_RX_HADDR, 32'h200 + c);
      if (c != 5) wreg(N2H2_RX_BASE + 4*c + N2H2_RX_CTRL, 1);
    end
    // channel 5 is not armed yet: its data must wait
    fork
      begin
        put(1, 32'h205);
        for (int w = 0; w < amt[5]; w++) put(0, {16'h5, 16'(w)});
        sent[5] = amt[5];
      end
      begin
        repeat (30) @(negedge clk);
        checks++;
        if (stall_cycles < 20) fail("no stall while channel unarmed");
        rreg(N2H2_RX_BASE + 4*5 + N2H2_RX_CTRL, v);
        checks++;
        if (v != 0) fail("data taken before channel armed");
        wreg(N2H2_RX_BASE + 4*5 + N2H2_RX_CTRL, 1);
      end
    join
    // the other channels, interleaved in pieces of up to 3 words
    begin
      bit left;
      left = 1;
      while (left) begin
        int c, n;
        left = 0;
        c = $urandom % CH;
        if (sent[c] < amt[c]) begin
          put(1, 32'h200 + c);
          n = 1 + $urandom % 3;
          for (int w = 0; w < n && sent[c] < amt[c]; w++) begin
            put(0, {16'(c), 16'(sent[c])});
            sent[c]++;
          end
        end
        for (int k = 0; k < CH; k++) if (sent[k] < amt[k]) left = 1;
      end
    end
    repeat (3) @(negedge clk);
    for (int c = 0; c < CH; c++)
      for (int w = 0; w < amt[c]; w++) begin
        checks++;
        if (mem[base[c] + w] !== {16'(c), 16'(w)}) fail($sformatf("ch %0d word %0d = %h", c, w, mem[base[c] + w]));
      end
    checks++;
    if (mem[base[0] + amt[0]] !== 0) fail("wrote past the amount");
    rreg(N2H2_RX_IRQ, v);
    checks++;
    if (v[CH-1:0] !== '1 || !irq) fail($sformatf("irq bits %b", v));
    wreg(N2H2_RX_IRQ, 32'h0F);
    rreg(N2H2_RX_IRQ, v);
    checks++;
    if (v[CH-1:0] !== 8'hF0 || !irq) fail($sformatf("irq after partial clear %b", v));
    wreg(N2H2_RX_IRQ, 32'hF0);
    checks++;
    if (irq) fail("irq after clear");
    // ---------- transmit ----------
    for (int i = 0; i < 40; i++) mem[3000 + i] = $urandom;
    wreg(N2H2_TX_MEM, 3000);
    wreg(N2H2_TX_LEN, 40);
    wreg(N2H2_TX_HADDR, 32'h1234);
    wreg(N2H2_TX_CTRL, 1);
    rreg(N2H2_TX_CTRL, v);
    checks++;
    if (v != 1) fail("not busy after start");
    begin
      int got;
      got = -1;
      while (got < 40) begin
        @(negedge clk);
        txr = ($urandom % 3) != 0;
        #1;
        if (txv && txr) begin
          checks++;
          if (got < 0) begin
            if (!txw.av || txw.data != 32'h1234) fail("TX address word");
          end else if (txw.av || txw.data !== mem[3000 + got]) fail($sformatf("TX word %0d", got));
          got++;
        end
      end
      @(negedge clk); txr = 0;
      rreg(N2H2_TX_CTRL, v);
      checks++;
      if (v != 0 || txv) fail("still busy after the last word");
    end
    $display("stall cycles %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
