// Self-checking testbench of hibi_bus.
//
// Five agent models raise and hold bus requests at random, keep them for a
// random number of cycles once granted, and present random words. The
// testbench checks against its own round-robin reference that the right
// agent is granted, that a grant lasts exactly as long as the owner's
// request, that only one agent is granted, that the broadcast word and
// valid are the owner's, and that full is the OR of the receivers' full.
module tb_hibi_bus;
  import mpsoc_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant, txv = '0, rxf = '0;
  hibi_word_t txw [N];
  logic bv, bf; hibi_word_t bw;
  int checks = 0, failures = 0, handovers = 0;

  hibi_bus #(.N_AGENTS(N)) dut (
    .clk, .rst_n, .req, .grant, .tx_valid(txv), .tx_word(txw), .rx_full(rxf),
    .bus_valid(bv), .bus_word(bw), .bus_full(bf)
  );

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

  initial begin
    int owner, last, hold;
    for (int i = 0; i < N; i++) txw[i] = '{av: 1'b0, data: 32'h0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    owner = -1; last = N - 1; hold = 0;
    for (int t = 0; t < 5000; t++) begin
      // agents: new requests, and the owner drops its request when done
      for (int i = 0; i < N; i++) begin
        if (!req[i] && ($urandom % 100) < 20) req[i] = 1;
        txv[i] = $urandom % 2;
        txw[i] = '{av: 1'($urandom), data: $urandom};
        rxf[i] = ($urandom % 8) == 0;
      end
      if (owner >= 0) begin
        if (hold == 0) req[owner] = 0; else hold--;
      end
      #1;
      checks++;
      if (!$onehot0(grant)) fail("several grants");
      if (owner >= 0) begin
        checks++;
        if (grant !== N'(1 << owner)) fail($sformatf("t=%0d owner %0d lost grant", t, owner));
        checks++;
        if (bv !== txv[owner] || (txv[owner] && bw !== txw[owner])) fail("bus word is not the owner's");
      end else begin
        checks++;
        if (grant !== '0 || bv) fail("grant while bus idle");
      end
      checks++;
      if (bf !== |rxf) fail("full");
      @(negedge clk);
      // reference: update owner after this clock edge
      if (owner >= 0) begin
        if (!req[owner]) owner = -1;
      end else begin
        for (int k = 1; k <= N; k++)
          if (owner < 0 && req[(last + k) % N]) owner = (last + k) % N;
        if (owner >= 0) begin last = owner; hold = $urandom % 6; handovers++; end
      end
    end
    checks++;
    if (handovers < 100) fail("too few handovers");
    $display("handovers %0d", handovers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
