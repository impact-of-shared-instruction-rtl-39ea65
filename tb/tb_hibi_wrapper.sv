// Self-checking testbench of hibi_wrapper.
//
// Three wrappers share a hibi_bus, with a maximum transfer length of four
// words. Agents 0 and 1 send transfers of random length (an address word
// then data words tagged with sender and sequence number) to the other
// agents; every agent drains its RX FIFO with random pauses, so receivers
// fill up and stall the bus. The testbench checks that each receiver gets
// every word of every sender in order, that each data word follows an
// address word addressed to that receiver, that no grant carries more than
// four data words, and that split transfers re-send their address.
module tb_hibi_wrapper;
  import mpsoc_pkg::*;
  localparam int N = 3, MAXL = 4;
  logic clk = 0, rst_n = 0;

  logic [N-1:0] txv, txr, rxv, rxr, req, grant, btv, rxfull;
  hibi_word_t   txw [N], rxw [N], btw [N];
  logic bv, bf; hibi_word_t bw;
  int checks = 0, failures = 0, splits = 0, stalls = 0;

  for (genvar i = 0; i < N; i++) begin : g_w
    hibi_wrapper #(.ADDR_BASE(32'h100 * (i + 1)), .ADDR_SPAN(32'h100), .MAX_LEN(MAXL),
                   .TX_DEPTH(4), .RX_DEPTH(4)) u_w (
      .clk, .rst_n,
      .tx_valid(txv[i]), .tx_word(txw[i]), .tx_ready(txr[i]),
      .rx_valid(rxv[i]), .rx_word(rxw[i]), .rx_ready(rxr[i]),
      .bus_req(req[i]), .bus_grant(grant[i]), .bus_tx_valid(btv[i]), .bus_tx_word(btw[i]),
      .bus_valid(bv), .bus_word(bw), .bus_full(bf), .bus_rx_full(rxfull[i])
    );
  end
  hibi_bus #(.N_AGENTS(N)) u_bus (
    .clk, .rst_n, .req, .grant, .tx_valid(btv), .tx_word(btw), .rx_full(rxfull),
    .bus_valid(bv), .bus_word(bw), .bus_full(bf)
  );

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

  // expected data per (sender, receiver): sequence numbers sent so far
  int sent_seq [N][N];
  int recv_seq [N][N];
  int total_sent = 0, total_recv = 0;

  // senders 0 and 1: a script of transfers
  for (genvar s = 0; s < 2; s++) begin : g_src
    initial begin
      txv[s] = 0; txw[s] = '{av: 1'b0, data: 32'h0};
      wait (rst_n);
      for (int x = 0; x < 60; x++) begin
        int dst, len;
        dst = (s + 1 + ($urandom % 2)) % N;
        len = 1 + $urandom % 11;
        @(negedge clk);
        txv[s] = 1; txw[s] = '{av: 1'b1, data: 32'h100 * (dst + 1) + 32'($urandom % 8)};
        while (!txr[s]) @(negedge clk);
        for (int w = 0; w < len; w++) begin
          @(negedge clk);
          txv[s] = 1; txw[s] = '{av: 1'b0, data: {8'(s), 8'(dst), 16'(sent_seq[s][dst])}};
          while (!txr[s]) @(negedge clk);
          sent_seq[s][dst]++;
          total_sent++;
        end
        @(negedge clk) txv[s] = 0;
        repeat ($urandom % 5) @(negedge clk);
      end
    end
  end
  initial begin
    txv[2] = 1'b0;
    txw[2] = '{av: 1'b0, data: 32'h0};
  end

  // receivers
  int cur_addr [N];
  always @(negedge clk) for (int r = 0; r < N; r++) rxr[r] <= ($urandom % 100) < 40;
  always @(posedge clk) begin
    if (rst_n) for (int r = 0; r < N; r++) begin
      if (rxv[r] && rxr[r]) begin
        if (rxw[r].av) cur_addr[r] = int'(rxw[r].data);
        else begin
          int s, d, q;
          s = int'(rxw[r].data[31:24]); d = int'(rxw[r].data[23:16]); q = int'(rxw[r].data[15:0]);
          checks++;
          if (d != r || cur_addr[r] / 32'h100 != r + 1) fail($sformatf("word for %0d arrived at %0d (addr %h)", d, r, cur_addr[r]));
          checks++;
          if (s > 1 || q != recv_seq[s][r]) fail($sformatf("order: from %0d got seq %0d expected %0d", s, q, recv_seq[s][r]));
          else recv_seq[s][r]++;
          total_recv++;
        end
      end
    end
  end

  // bus observer: data words per grant, re-sent addresses, stalls
  int words_in_grant, cur_owner;
  logic [31:0] last_addr [N];
  always @(posedge clk) begin
    if (rst_n) begin
      if (grant == '0) words_in_grant = 0;
      if (bv && bf) stalls++;
      if (bv && !bf) begin
        if (bw.av) begin
          for (int i = 0; i < N; i++)
            if (grant[i] && words_in_grant == 0 && last_addr[i] == bw.data) splits++;
          for (int i = 0; i < N; i++) if (grant[i]) last_addr[i] = bw.data;
        end else begin
          words_in_grant++;
          checks++;
          if (words_in_grant > MAXL) fail("transfer longer than the maximum");
        end
      end
    end
  end

  initial begin
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) begin sent_seq[a][b] = 0; recv_seq[a][b] = 0; end
    for (int a = 0; a < N; a++) last_addr[a] = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (total_sent > 0);
    repeat (20000) @(negedge clk);
    checks++;
    if (total_recv != total_sent) fail($sformatf("received %0d of %0d words", total_recv, total_sent));
    checks++;
    if (splits == 0 || stalls == 0) fail($sformatf("splits %0d stalls %0d", splits, stalls));
    $display("words %0d, re-sent addresses %0d, stall cycles %0d", total_recv, splits, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
