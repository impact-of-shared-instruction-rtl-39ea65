// Shared types and constants of the shared-instruction-memory multiprocessor.
//
// The system has one master and several encoding slave processors. Every
// processor fetches its instructions from one external 1 MB SRAM through an
// instruction cache; data moves between processors and the picture memory over
// the HIBI on-chip bus. This package holds what more than one module needs:
// the word width, the SRAM geometry, the HIBI transfer word and the register
// maps of the hardware monitor and of the N2H2 DMA.
//
// The 32-bit word, the 1 MB SRAM split into two halves (master / slaves), the
// eight N2H2 receive channels and the list of monitor counters follow the
// document. Register numbering and the HIBI word format are this design's own.
package mpsoc_pkg;

  localparam int unsigned WORD_W      = 32;
  localparam int unsigned SRAM_BYTES  = 1024 * 1024;       // 1 MB program memory
  localparam int unsigned SRAM_AW     = $clog2(SRAM_BYTES / 4); // word address bits (18)

  // One word on the HIBI bus: either an address word (av = 1) that opens a
  // transfer to a receiver, or a data word that belongs to the last address.
  typedef struct packed {
    logic              av;
    logic [WORD_W-1:0] data;
  } hibi_word_t;

  // Hardware monitor: per-processor counter kinds.
  typedef enum logic [2:0] {
    MON_WAIT    = 3'd0,  // T_w  : cycles with read and waitrequest
    MON_READS   = 3'd1,  // A_r  : 32-bit words read
    MON_MAXLAT  = 3'd2,  // L    : longest latency of one read, cycles
    MON_MAXBLK  = 3'd3,  // S    : largest number of words in one block
    MON_BLOCKS  = 3'd4   // A_b  : number of separate read blocks
  } mon_cpu_cnt_e;

  // Hardware monitor: system-wide registers (register index = 64 + value).
  typedef enum logic [4:0] {
    MON_ELAPSED  = 5'd0,  // T_fet : cycles while enabled
    MON_TOTAL    = 5'd1,  // A_t   : words read on the SRAM bus
    MON_SPLONG   = 5'd2,  // A_sp  : longest continuous SRAM read period
    MON_SPCOUNT  = 5'd3,  // A_sb  : number of continuous SRAM read periods
    MON_ETH_RD   = 5'd4,  // Ethernet read cycles
    MON_ETH_WR   = 5'd5,  // Ethernet write cycles
    MON_SIMUL    = 5'd8   // A_k at MON_SIMUL + k : cycles with exactly k readers
  } mon_sys_cnt_e;

  localparam int unsigned MON_SYS_BASE = 64;

  // N2H2 register map (word index inside the N2H2 window).
  localparam int unsigned N2H2_TX_MEM   = 0;  // TX source address in data RAM (word)
  localparam int unsigned N2H2_TX_LEN   = 1;  // TX length in words
  localparam int unsigned N2H2_TX_HADDR = 2;  // TX HIBI destination address
  localparam int unsigned N2H2_TX_CTRL  = 3;  // write 1: start; read: busy
  localparam int unsigned N2H2_RX_IRQ   = 4;  // RX done bits; write 1 to clear
  localparam int unsigned N2H2_RX_BASE  = 8;  // channel c at N2H2_RX_BASE + 4*c + {0..3}
  // per-channel offsets
  localparam int unsigned N2H2_RX_MEM   = 0;  // destination word address in data RAM
  localparam int unsigned N2H2_RX_AMT   = 1;  // number of words to wait for
  localparam int unsigned N2H2_RX_HADDR = 2;  // HIBI address the channel listens to
  localparam int unsigned N2H2_RX_CTRL  = 3;  // write 1: arm; read: words received

endpackage
