// Self-checking testbench of monitor_hibi_if.
//
// The testbench plays the HIBI wrapper (RX words in, TX words out with a
// random ready pattern) and a register file standing in for the monitor,
// whose register k holds a value derived from k. It checks that start and
// stop commands pulse the matching output for exactly one cycle, that
// address words and empty commands do nothing, and that a dump sends the
// return address and then the NREG counters in the documented order, and
// that no command is accepted while a dump is in progress.
module tb_monitor_hibi_if;
  import mpsoc_pkg::*;
  localparam int N = 4, NREG = 5 * N + 6 + (N - 1);
  logic clk = 0, rst_n = 0;
  logic rxv = 0, rxr, txv, txr = 0, cs, cp;
  hibi_word_t rxw, txw;
  logic [6:0] ra; logic [31:0] rd;
  int checks = 0, failures = 0, starts = 0, stops = 0;

  monitor_hibi_if #(.N_CPU(N)) dut (
    .clk, .rst_n, .rx_valid(rxv), .rx_word(rxw), .rx_ready(rxr),
    .tx_valid(txv), .tx_word(txw), .tx_ready(txr),
    .cmd_start(cs), .cmd_stop(cp), .reg_addr(ra), .reg_rdata(rd)
  );

  assign rd = 32'hAB00_0000 + 32'(ra);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (cs) starts++;
    if (cp) stops++;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s", s);
  endtask

  task automatic put(input logic av, input logic [31:0] d);
    @(negedge clk); rxv = 1; rxw = '{av: av, data: d}; #1;
    while (!rxr) begin @(negedge clk); #1; end
    @(negedge clk); rxv = 0;
  endtask

  function automatic int exp_reg(int i);
    if (i < 5 * N) return 8 * (i / 5) + (i % 5);
    if (i < 5 * N + 6) return 64 + (i - 5 * N);
    return 64 + 8 + 2 + (i - 5 * N - 6);
  endfunction

  initial begin
    rxw = '{av: 1'b0, data: 32'h0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    put(1, 32'h2000);
    put(0, 32'h4000_0000);
    put(0, 32'h0000_1234);
    put(0, 32'h8000_0000);
    repeat (2) @(negedge clk);
    checks++;
    if (starts != 1 || stops != 1) fail($sformatf("starts %0d stops %0d", starts, stops));
    for (int rep = 0; rep < 2; rep++) begin
      int got;
      put(0, 32'hC000_0000 | 32'(32'h1F0 + rep));
      got = -1;
      fork
        // a start arriving during the dump must wait
        begin
          @(negedge clk); rxv = 1; rxw = '{av: 1'b0, data: 32'h4000_0000};
        end
        while (got < NREG) begin
          @(negedge clk);
          txr = ($urandom % 3) != 0;
          #1;
          if (txv && txr) begin
            checks++;
            if (got < 0) begin
              if (!txw.av || txw.data != 32'h1F0 + rep) fail("dump address");
            end else if (txw.av || txw.data != 32'hAB00_0000 + exp_reg(got))
              fail($sformatf("dump word %0d = %h", got, txw.data));
            checks++;
            if (rxr) fail("command accepted during dump");
            got++;
          end
        end
      join
      @(negedge clk); txr = 0;
      @(negedge clk); rxv = 0;   // the waiting start is taken now
      checks++;
      if (txv) fail("dump longer than NREG words");
    end
    checks++;
    if (starts != 3) fail($sformatf("starts %0d", starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
