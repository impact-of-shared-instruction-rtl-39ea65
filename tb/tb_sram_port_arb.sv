// Self-checking testbench of sram_port_arb.
//
// An instruction-refill master and a data master issue random requests to
// the tile's SRAM port, each holding its request until accepted; the bridge
// side answers with random waitrequest from a memory model. The testbench
// checks the selection rule (data first, but a presented transfer is kept
// until accepted), that the outgoing signals stay still while waiting, that
// each master gets the right read data.
module tb_sram_port_arb;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  logic ir = 0, dr = 0, dw = 0; logic [AW-1:0] ia = '0, da = '0; logic [31:0] dwd = '0; logic [3:0] dbe = '0;
  logic iw, dwt; logic [31:0] rdata;
  logic mr, mwr; logic [AW-1:0] ma; logic [31:0] mwd; logic [3:0] mbe; logic mwt = 0; logic [31:0] mrd;
  logic [31:0] mem [1 << AW];
  int checks = 0, failures = 0, data_wins = 0, held = 0;

  sram_port_arb #(.AW(AW)) dut (
    .clk, .rst_n, .i_read(ir), .i_address(ia), .i_waitrequest(iw),
    .d_read(dr), .d_write(dw), .d_address(da), .d_writedata(dwd), .d_byteenable(dbe),
    .d_waitrequest(dwt), .readdata(rdata),
    .m_read(mr), .m_write(mwr), .m_address(ma), .m_writedata(mwd), .m_byteenable(mbe),
    .m_waitrequest(mwt), .m_readdata(mrd)
  );

  assign mrd = mem[ma];
  always @(posedge clk) if (mwr && !mwt) mem[ma] <= mwd;

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
    bit prev_wait, prev_d;
    logic [AW-1:0] prev_a;
    for (int i = 0; i < (1 << AW); i++) mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_wait = 0; prev_d = 0; prev_a = '0;
    for (int t = 0; t < 5000; t++) begin
      bit exp_d;
      if (!ir && ($urandom % 100) < 50) begin ir = 1; ia = AW'($urandom); end
      if (!dr && !dw && ($urandom % 100) < 30) begin
        da = AW'($urandom);
        if ($urandom % 2) begin dw = 1; dwd = $urandom; dbe = 4'hF; end else dr = 1;
      end
      mwt = ($urandom % 3) == 0;
      #1;
      exp_d = prev_wait ? prev_d : (dr || dw);
      checks++;
      if ((mr || mwr) && exp_d != (dr || dw) && !(exp_d == 0 && ir)) fail("no request on port");
      if (mr || mwr) begin
        checks++;
        if (exp_d ? (ma !== da || mr !== dr || mwr !== dw) : (ma !== ia || !mr || mwr))
          fail($sformatf("t=%0d wrong master selected (expected data=%0b)", t, exp_d));
        if (prev_wait) begin
          checks++;
          held++;
          if (ma !== prev_a) fail("address changed while waiting");
        end
        if (!mwt && mr) begin
          checks++;
          if (rdata !== mem[ma]) fail("read data");
        end
        checks++;
        if (exp_d) begin
          if (dwt !== mwt || (ir && !iw)) fail("data master handshake");
          if (ir) data_wins++;
        end else begin
          if (iw !== mwt || ((dr || dw) && !dwt)) fail("instruction master handshake");
        end
      end
      prev_wait = (mr || mwr) && mwt;
      prev_d = exp_d; prev_a = ma;
      @(negedge clk);
      if (ir && !iw) ir = 0;
      if ((dr || dw) && !dwt) begin dr = 0; dw = 0; end
    end
    checks++;
    if (data_wins == 0 || held == 0) fail("priority or hold never exercised");
    $display("data wins over pending fetch %0d, held transfers %0d", data_wins, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
