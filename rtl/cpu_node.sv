// Processor tile: everything of one master or slave processor except the
// CPU core itself.
//
// The tile gives a CPU core two Avalon masters to connect to. The instruction
// master fetches through an 8 KB direct-mapped instruction cache whose line
// refills go to the shared external SRAM. The data master reaches, by
// address: the tile's half of the SRAM (the code segment holds compile-time
// constants), the 64 KB data RAM, and the registers of the N2H2 DMA. The cache
// refills and the data master's SRAM accesses are merged into the tile's one
// SRAM port, which leaves the tile for the Avalon external bridge. The N2H2
// moves data between the data RAM and the HIBI bus through the tile's HIBI
// wrapper.
//
// The external SRAM is split in two halves: the master runs from one, all
// slaves run the same program from the other. SRAM_HALF selects the half, so
// CPU code addresses are word addresses inside 512 KB.
//
// Data master address map (byte addresses, this design's choice):
//   0x0000_0000 - 0x0007_FFFF  SRAM half (zero wait when the bridge grants)
//   0x0010_0000 - 0x0010_FFFF  data RAM (reads: one wait cycle)
//   0x0020_0000 - 0x0020_00FF  N2H2 registers (zero wait)
// What the tile holds (cache, data RAM, N2H2, HIBI wrapper, SRAM interface)
// follows the document; boot ROM, vector table, UART and timer are not part
// of it.
module cpu_node
  import mpsoc_pkg::*;
#(
  parameter bit                SRAM_HALF    = 1'b1,
  parameter int unsigned       ICACHE_BYTES = 8192,
  parameter int unsigned       DRAM_BYTES   = 65536,
  parameter int unsigned       RX_CH        = 8,
  parameter logic [WORD_W-1:0] HIBI_BASE    = 32'h0000_0200,
  parameter logic [WORD_W-1:0] HIBI_SPAN    = 32'h0000_0100,
  parameter int unsigned       HIBI_MAX_LEN = 16,
  localparam int unsigned      CAW          = SRAM_AW - 1   // code word address bits
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU instruction master
  input  logic              i_read,
  input  logic [CAW-1:0]    i_address,
  output logic              i_waitrequest,
  output logic [WORD_W-1:0] i_readdata,
  // CPU data master
  input  logic              d_read,
  input  logic              d_write,
  input  logic [WORD_W-1:0] d_address,
  input  logic [WORD_W-1:0] d_writedata,
  input  logic [3:0]        d_byteenable,
  output logic              d_waitrequest,
  output logic [WORD_W-1:0] d_readdata,
  output logic              irq,
  // SRAM port towards the Avalon external bridge
  output logic              s_read,
  output logic              s_write,
  output logic [SRAM_AW-1:0] s_address,
  output logic [WORD_W-1:0] s_writedata,
  output logic [3:0]        s_byteenable,
  input  logic              s_waitrequest,
  input  logic [WORD_W-1:0] s_readdata,
  // HIBI bus side
  output logic              hibi_req,
  input  logic              hibi_grant,
  output logic              hibi_tx_valid,
  output hibi_word_t        hibi_tx_word,
  input  logic              hibi_valid,
  input  hibi_word_t        hibi_word,
  input  logic              hibi_full,
  output logic              hibi_rx_full,
  // events
  output logic              icache_miss,
  output logic              dma_rx_stall
);

  localparam int unsigned MAW = $clog2(DRAM_BYTES / 4);

  // ---------------- data master decode ----------------
  logic sel_sram, sel_dram, sel_n2h2;
  assign sel_sram = d_address[21:20] == 2'd0;
  assign sel_dram = d_address[21:20] == 2'd1;
  assign sel_n2h2 = d_address[21:20] == 2'd2;

  // ---------------- instruction cache ----------------
  logic              ic_m_read, ic_m_wait;
  logic [SRAM_AW-1:0] ic_m_addr;
  logic [WORD_W-1:0] sram_rd;

  icache #(.CACHE_BYTES(ICACHE_BYTES), .LINE_WORDS(8), .AW(SRAM_AW)) u_icache (
    .clk, .rst_n,
    .cpu_read(i_read), .cpu_address({SRAM_HALF, i_address}),
    .cpu_waitrequest(i_waitrequest), .cpu_readdata(i_readdata),
    .m_read(ic_m_read), .m_address(ic_m_addr),
    .m_waitrequest(ic_m_wait), .m_readdata(sram_rd),
    .miss(icache_miss)
  );

  // ---------------- SRAM interface ----------------
  logic dm_sram_wait;

  sram_port_arb #(.AW(SRAM_AW)) u_sram_if (
    .clk, .rst_n,
    .i_read(ic_m_read), .i_address(ic_m_addr), .i_waitrequest(ic_m_wait),
    .d_read(d_read && sel_sram), .d_write(d_write && sel_sram),
    .d_address({SRAM_HALF, d_address[CAW+1:2]}),
    .d_writedata, .d_byteenable, .d_waitrequest(dm_sram_wait),
    .readdata(sram_rd),
    .m_read(s_read), .m_write(s_write), .m_address(s_address),
    .m_writedata(s_writedata), .m_byteenable(s_byteenable),
    .m_waitrequest(s_waitrequest), .m_readdata(s_readdata)
  );

  // ---------------- data RAM ----------------
  logic              dram_pend_q;
  logic [WORD_W-1:0] dram_a_rdata, dram_b_rdata;
  logic              dma_en;
  logic [3:0]        dma_we;
  logic [MAW-1:0]    dma_addr;
  logic [WORD_W-1:0] dma_wdata;

  onchip_ram #(.BYTES(DRAM_BYTES)) u_dram (
    .clk,
    .a_en((d_read || d_write) && sel_dram && !dram_pend_q),
    .a_we(d_write ? d_byteenable : 4'h0),
    .a_addr(d_address[MAW+1:2]), .a_wdata(d_writedata), .a_rdata(dram_a_rdata),
    .b_en(dma_en), .b_we(dma_we), .b_addr(dma_addr), .b_wdata(dma_wdata),
    .b_rdata(dram_b_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dram_pend_q <= 1'b0;
    else        dram_pend_q <= d_read && sel_dram && !dram_pend_q;
  end

  // ---------------- N2H2 and HIBI wrapper ----------------
  logic       n_tx_valid, n_tx_ready, n_rx_valid, n_rx_ready;
  hibi_word_t n_tx_word, n_rx_word;
  logic [WORD_W-1:0] n2h2_rdata;

  n2h2 #(.RX_CH(RX_CH), .MAW(MAW)) u_n2h2 (
    .clk, .rst_n,
    .reg_write(d_write && sel_n2h2), .reg_addr(d_address[7:2]),
    .reg_wdata(d_writedata), .reg_rdata(n2h2_rdata), .irq,
    .mem_en(dma_en), .mem_we(dma_we), .mem_addr(dma_addr),
    .mem_wdata(dma_wdata), .mem_rdata(dram_b_rdata),
    .tx_valid(n_tx_valid), .tx_word(n_tx_word), .tx_ready(n_tx_ready),
    .rx_valid(n_rx_valid), .rx_word(n_rx_word), .rx_ready(n_rx_ready),
    .rx_stall(dma_rx_stall)
  );

  hibi_wrapper #(.ADDR_BASE(HIBI_BASE), .ADDR_SPAN(HIBI_SPAN), .MAX_LEN(HIBI_MAX_LEN)) u_hibi (
    .clk, .rst_n,
    .tx_valid(n_tx_valid), .tx_word(n_tx_word), .tx_ready(n_tx_ready),
    .rx_valid(n_rx_valid), .rx_word(n_rx_word), .rx_ready(n_rx_ready),
    .bus_req(hibi_req), .bus_grant(hibi_grant),
    .bus_tx_valid(hibi_tx_valid), .bus_tx_word(hibi_tx_word),
    .bus_valid(hibi_valid), .bus_word(hibi_word), .bus_full(hibi_full),
    .bus_rx_full(hibi_rx_full)
  );

  // ---------------- data master response ----------------
  always_comb begin
    d_waitrequest = 1'b0;
    d_readdata    = '0;
    if (sel_sram) begin
      d_waitrequest = dm_sram_wait;
      d_readdata    = sram_rd;
    end else if (sel_dram) begin
      d_waitrequest = d_read && !dram_pend_q;
      d_readdata    = dram_a_rdata;
    end else if (sel_n2h2) begin
      d_readdata    = n2h2_rdata;
    end
  end

endmodule
