// Multiprocessor system-on-chip with one shared instruction memory.
//
// One master tile and N_SLAVES slave tiles (three in the measured system)
// each hold an instruction cache, a data RAM, an N2H2 DMA and a HIBI wrapper;
// their CPU cores sit outside this module and attach to the per-tile
// instruction and data master ports. All tiles fetch code from one external
// SRAM: each tile's SRAM port goes to the Avalon external bridge, which
// arbitrates and multiplexes them onto the SRAM pins. The hardware monitor
// listens to every tile's SRAM read and waitrequest and to the SRAM read
// strobe and counts the contention statistics. The tiles exchange data over
// the HIBI bus, which also carries the monitor's own HIBI interface (through
// which the master starts, stops and reads out the monitor) and a further
// agent for the picture memory (SDRAM) controller; that agent's wrapper is
// here and its agent side is brought out as ports, as are the Ethernet
// strobes that share the SRAM bus.
//
// Tile 0 is the master and runs from the lower SRAM half; tiles 1..N_SLAVES
// are slaves and share the upper half. HIBI addresses: tile k listens to
// 0x100*(k+1) .. +0xFF, the picture-memory agent to 0x1000 .. 0x1FFF, the
// monitor to 0x2000 .. 0x20FF (commands: see monitor_hibi_if).
// The composition follows the document's architecture; address assignments
// are this design's choice.
module mpsoc_top
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_SLAVES     = 3,
  parameter int unsigned ICACHE_BYTES = 8192,
  parameter int unsigned DRAM_BYTES   = 65536,
  parameter int unsigned RX_CH        = 8,
  parameter int unsigned HIBI_MAX_LEN = 16,
  localparam int unsigned N_CPU       = N_SLAVES + 1,
  localparam int unsigned CAW         = SRAM_AW - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU instruction masters
  input  logic [N_CPU-1:0]              i_read,
  input  logic [N_CPU-1:0][CAW-1:0]     i_address,
  output logic [N_CPU-1:0]              i_waitrequest,
  output logic [N_CPU-1:0][WORD_W-1:0]  i_readdata,
  // CPU data masters
  input  logic [N_CPU-1:0]              d_read,
  input  logic [N_CPU-1:0]              d_write,
  input  logic [N_CPU-1:0][WORD_W-1:0]  d_address,
  input  logic [N_CPU-1:0][WORD_W-1:0]  d_writedata,
  input  logic [N_CPU-1:0][3:0]         d_byteenable,
  output logic [N_CPU-1:0]              d_waitrequest,
  output logic [N_CPU-1:0][WORD_W-1:0]  d_readdata,
  output logic [N_CPU-1:0]              irq,
  // external SRAM pins
  output logic [SRAM_AW-1:0]            sram_addr,
  output logic                          sram_read,
  output logic                          sram_write,
  output logic [WORD_W-1:0]             sram_wdata,
  output logic [3:0]                    sram_be,
  input  logic [WORD_W-1:0]             sram_rdata,
  // Ethernet strobes on the SRAM bus (observed only)
  input  logic                          eth_read,
  input  logic                          eth_write,
  // hardware monitor status
  output logic                          mon_running,
  // picture-memory controller, HIBI agent side
  input  logic                          pm_tx_valid,
  input  hibi_word_t                    pm_tx_word,
  output logic                          pm_tx_ready,
  output logic                          pm_rx_valid,
  output hibi_word_t                    pm_rx_word,
  input  logic                          pm_rx_ready,
  // events
  output logic [N_CPU-1:0]              icache_miss,
  output logic [N_CPU-1:0]              dma_rx_stall
);

  localparam int unsigned N_AG   = N_CPU + 2;   // tiles, picture memory, monitor
  localparam int unsigned AG_PM  = N_CPU;
  localparam int unsigned AG_MON = N_CPU + 1;

  // tile SRAM ports
  logic [N_CPU-1:0]               s_read, s_write, s_wait;
  logic [N_CPU-1:0][SRAM_AW-1:0]  s_addr;
  logic [N_CPU-1:0][WORD_W-1:0]   s_wdata;
  logic [N_CPU-1:0][3:0]          s_be;
  logic [WORD_W-1:0]              s_rdata;

  // HIBI
  logic [N_AG-1:0] h_req, h_grant, h_txv, h_rxfull;
  hibi_word_t      h_txw [N_AG];
  logic            h_valid, h_full;
  hibi_word_t      h_word;

  for (genvar k = 0; k < N_CPU; k++) begin : g_tile
    cpu_node #(
      .SRAM_HALF   (k != 0),
      .ICACHE_BYTES(ICACHE_BYTES),
      .DRAM_BYTES  (DRAM_BYTES),
      .RX_CH       (RX_CH),
      .HIBI_BASE   (32'h100 * (k + 1)),
      .HIBI_SPAN   (32'h100),
      .HIBI_MAX_LEN(HIBI_MAX_LEN)
    ) u_node (
      .clk, .rst_n,
      .i_read(i_read[k]), .i_address(i_address[k]),
      .i_waitrequest(i_waitrequest[k]), .i_readdata(i_readdata[k]),
      .d_read(d_read[k]), .d_write(d_write[k]), .d_address(d_address[k]),
      .d_writedata(d_writedata[k]), .d_byteenable(d_byteenable[k]),
      .d_waitrequest(d_waitrequest[k]), .d_readdata(d_readdata[k]), .irq(irq[k]),
      .s_read(s_read[k]), .s_write(s_write[k]), .s_address(s_addr[k]),
      .s_writedata(s_wdata[k]), .s_byteenable(s_be[k]),
      .s_waitrequest(s_wait[k]), .s_readdata(s_rdata),
      .hibi_req(h_req[k]), .hibi_grant(h_grant[k]),
      .hibi_tx_valid(h_txv[k]), .hibi_tx_word(h_txw[k]),
      .hibi_valid(h_valid), .hibi_word(h_word), .hibi_full(h_full),
      .hibi_rx_full(h_rxfull[k]),
      .icache_miss(icache_miss[k]), .dma_rx_stall(dma_rx_stall[k])
    );
  end

  avalon_ext_bridge #(.N_PORTS(N_CPU), .AW(SRAM_AW)) u_bridge (
    .clk, .rst_n,
    .p_read(s_read), .p_write(s_write), .p_address(s_addr),
    .p_writedata(s_wdata), .p_byteenable(s_be),
    .p_waitrequest(s_wait), .p_readdata(s_rdata),
    .sram_addr, .sram_read, .sram_write, .sram_wdata, .sram_be, .sram_rdata
  );

  // hardware monitor with its HIBI interface
  logic              mon_start, mon_stop, m_rxv, m_rxr, m_txv, m_txr;
  logic [6:0]        mon_addr;
  logic [WORD_W-1:0] mon_rdata;
  hibi_word_t        m_rxw, m_txw;

  hw_monitor #(.N_CPU(N_CPU), .CNT_W(32)) u_monitor (
    .clk, .rst_n,
    .cmd_start(mon_start), .cmd_stop(mon_stop), .running(mon_running),
    .cpu_read(s_read), .cpu_waitrequest(s_wait),
    .sram_read, .eth_read, .eth_write,
    .reg_addr(mon_addr), .reg_rdata(mon_rdata)
  );

  monitor_hibi_if #(.N_CPU(N_CPU)) u_mon_if (
    .clk, .rst_n,
    .rx_valid(m_rxv), .rx_word(m_rxw), .rx_ready(m_rxr),
    .tx_valid(m_txv), .tx_word(m_txw), .tx_ready(m_txr),
    .cmd_start(mon_start), .cmd_stop(mon_stop),
    .reg_addr(mon_addr), .reg_rdata(mon_rdata)
  );

  hibi_wrapper #(.ADDR_BASE(32'h2000), .ADDR_SPAN(32'h100), .MAX_LEN(HIBI_MAX_LEN)) u_mon_wrapper (
    .clk, .rst_n,
    .tx_valid(m_txv), .tx_word(m_txw), .tx_ready(m_txr),
    .rx_valid(m_rxv), .rx_word(m_rxw), .rx_ready(m_rxr),
    .bus_req(h_req[AG_MON]), .bus_grant(h_grant[AG_MON]),
    .bus_tx_valid(h_txv[AG_MON]), .bus_tx_word(h_txw[AG_MON]),
    .bus_valid(h_valid), .bus_word(h_word), .bus_full(h_full),
    .bus_rx_full(h_rxfull[AG_MON])
  );

  hibi_wrapper #(.ADDR_BASE(32'h1000), .ADDR_SPAN(32'h1000), .MAX_LEN(HIBI_MAX_LEN)) u_pm_wrapper (
    .clk, .rst_n,
    .tx_valid(pm_tx_valid), .tx_word(pm_tx_word), .tx_ready(pm_tx_ready),
    .rx_valid(pm_rx_valid), .rx_word(pm_rx_word), .rx_ready(pm_rx_ready),
    .bus_req(h_req[AG_PM]), .bus_grant(h_grant[AG_PM]),
    .bus_tx_valid(h_txv[AG_PM]), .bus_tx_word(h_txw[AG_PM]),
    .bus_valid(h_valid), .bus_word(h_word), .bus_full(h_full),
    .bus_rx_full(h_rxfull[AG_PM])
  );

  hibi_bus #(.N_AGENTS(N_AG)) u_hibi (
    .clk, .rst_n,
    .req(h_req), .grant(h_grant), .tx_valid(h_txv), .tx_word(h_txw),
    .rx_full(h_rxfull), .bus_valid(h_valid), .bus_word(h_word), .bus_full(h_full)
  );

endmodule
