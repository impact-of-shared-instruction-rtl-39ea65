// Self-checking testbench of onchip_ram.
//
// Random reads and byte-enabled writes on both ports of the 64 KB RAM are
// mirrored in a shadow array; every read result, which appears one cycle
// after the request, is compared with the shadow value from before that
// cycle's writes. Both ports avoid writing the same word in one cycle.
module tb_onchip_ram;
  localparam int BYTES = 65536, AW = 14;
  logic clk = 0;
  logic ae = 0, be_ = 0; logic [3:0] awe = '0, bwe = '0;
  logic [AW-1:0] aa = '0, ba = '0; logic [31:0] awd = '0, bwd = '0, ard, brd;
  logic [31:0] shadow [1 << AW];
  int checks = 0, failures = 0;

  onchip_ram #(.BYTES(BYTES)) dut (
    .clk, .a_en(ae), .a_we(awe), .a_addr(aa), .a_wdata(awd), .a_rdata(ard),
    .b_en(be_), .b_we(bwe), .b_addr(ba), .b_wdata(bwd), .b_rdata(brd)
  );

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expa, expb; bit chka, chkb;
    // fill through port A
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); ae = 1; awe = 4'hF; aa = AW'(i); awd = $urandom; shadow[i] = awd;
    end
    @(negedge clk); ae = 0;
    chka = 0; chkb = 0;
    for (int t = 0; t < 5000; t++) begin
      ae = $urandom % 2; be_ = $urandom % 2;
      aa = AW'($urandom % 256); ba = AW'($urandom % 256);
      awe = ($urandom % 2) ? 4'($urandom) : 4'h0;
      bwe = ($urandom % 2) ? 4'($urandom) : 4'h0;
      if (aa == ba) bwe = 4'h0;
      awd = $urandom; bwd = $urandom;
      expa = shadow[aa]; expb = shadow[ba];
      @(posedge clk);
      if (ae) for (int b = 0; b < 4; b++) if (awe[b]) shadow[aa][8*b +: 8] = awd[8*b +: 8];
      if (be_) for (int b = 0; b < 4; b++) if (bwe[b]) shadow[ba][8*b +: 8] = bwd[8*b +: 8];
      chka = ae; chkb = be_;
      @(negedge clk);
      if (chka) begin checks++; if (ard !== expa) begin failures++; $display("FAIL A read %h exp %h", ard, expa); end end
      if (chkb) begin checks++; if (brd !== expb) begin failures++; $display("FAIL B read %h exp %h", brd, expb); end end
    end
    // the top of the 64 KB range is reachable
    ae = 1; awe = 4'hF; aa = '1; awd = 32'hCAFE_F00D;
    @(negedge clk); awe = 4'h0; ba = '1; be_ = 1;
    @(negedge clk);
    checks++;
    if (brd !== 32'hCAFE_F00D) begin failures++; $display("FAIL last word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
