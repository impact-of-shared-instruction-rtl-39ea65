// Self-checking testbench of icache.
//
// A processor model fetches random addresses with locality (runs of
// sequential fetches, jumps, and addresses that alias in the cache), holding
// each fetch while waitrequest is high. A memory model answers the refill
// reads with random waitrequest. The testbench checks every returned word,
// predicts hit or miss with its own tag table, checks that each refill reads
// the eight words of the line in order and that a hit takes no wait cycle.
module tb_icache;
  localparam int AW = 14, LINES = 256, LW = 8;

  logic clk = 0, rst_n = 0;
  logic cr = 0; logic [AW-1:0] ca = '0; logic cw; logic [31:0] cd;
  logic mr; logic [AW-1:0] ma; logic mw; logic [31:0] md; logic miss;
  logic [31:0] mem [1 << AW];
  int checks = 0, failures = 0, misses = 0, exp_misses = 0, fills = 0;

  icache #(.CACHE_BYTES(8192), .LINE_WORDS(LW), .AW(AW)) dut (
    .clk, .rst_n, .cpu_read(cr), .cpu_address(ca), .cpu_waitrequest(cw),
    .cpu_readdata(cd), .m_read(mr), .m_address(ma), .m_waitrequest(mw),
    .m_readdata(md), .miss
  );

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model with random wait states; checks the refill order
  logic [AW-1:0] exp_fill;
  int fill_pos = 0;
  always_comb begin
    md = mem[ma];
  end
  always @(negedge clk) mw <= ($urandom % 3) == 0;
  always @(posedge clk) begin
    if (miss) misses++;
    if (rst_n && mr && !mw) begin
      checks++;
      if (ma !== exp_fill + AW'(fill_pos)) begin
        failures++;
        $display("FAIL refill address %h expected %h", ma, exp_fill + AW'(fill_pos));
      end
      fill_pos = (fill_pos + 1) % LW;
      if (fill_pos == 0) fills++;
    end
  end

  logic [AW-1:0] tags [LINES];
  logic          valid [LINES];

  initial begin
    int waits;
    logic [AW-1:0] a;
    for (int i = 0; i < (1 << AW); i++) mem[i] = $urandom;
    for (int i = 0; i < LINES; i++) valid[i] = 0;
    mw = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    a = '0;
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom % 100;
      if (r < 70)      a = a + 1'b1;                 // sequential
      else if (r < 85) a = AW'($urandom % 2048);     // jump within 8 KB
      else             a = AW'($urandom);            // anywhere (aliases)
      begin
        int line; bit hit;
        line = (a >> 3) % LINES;
        hit  = valid[line] && tags[line] == (a >> 3);
        if (!hit) begin
          exp_misses++;
          valid[line] = 1; tags[line] = a >> 3;
        end
        exp_fill = {a[AW-1:3], 3'b000};
        cr = 1; ca = a;
        #1;
        waits = 0;
        while (cw) begin
          @(negedge clk);
          waits++;
          if (waits > 200) break;
        end
        checks++;
        if (cd !== mem[a]) begin
          failures++;
          $display("FAIL fetch %h got %h exp %h", a, cd, mem[a]);
        end
        checks++;
        if (hit && waits != 0) begin
          failures++;
          $display("FAIL hit at %h waited %0d", a, waits);
        end
        if (!hit && waits < LW) begin
          checks++; failures++;
          $display("FAIL miss at %h waited only %0d", a, waits);
        end
        @(negedge clk);
        cr = ($urandom % 4) == 0;   // idle cycles now and then
        if (cr) begin cr = 0; @(negedge clk); end
      end
    end
    checks++;
    if (misses != exp_misses || fills != exp_misses) begin
      failures++;
      $display("FAIL misses %0d fills %0d expected %0d", misses, fills, exp_misses);
    end
    $display("fetches 3000 misses %0d", misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
