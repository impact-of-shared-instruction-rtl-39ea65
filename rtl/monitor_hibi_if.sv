// HIBI interface of the hardware monitor.
//
// The master processor controls the monitor over HIBI: it starts the
// monitor just before the slaves begin encoding, stops it after they finish,
// and then asks for the counters, which it forwards to the host. This block
// sits between a HIBI wrapper and the monitor. It takes every data word
// addressed to the monitor as a command, bits [31:30]:
//   01  start: clear the counters and count,
//   10  stop:  freeze the counters,
//   11  dump:  send all counters to the HIBI address in bits [29:0].
// A dump is one HIBI transfer: the return address, then NREG data words in
// this order: for each processor i = 0..N_CPU-1 its T_w, A_r, L, S, A_b;
// then T_fet, A_t, A_sp, A_sb, Ethernet reads, Ethernet writes; then A_k for
// k = 2..N_CPU. No command is taken while a dump is being sent; address
// words and 00 commands are consumed and ignored.
//
// That the monitor is controlled by the master and has a HIBI interface is
// the document's; the command encoding and the dump format are this design's.
// Timing: one command per cycle; a dump sends one word per cycle the wrapper
// accepts it.
module monitor_hibi_if
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_CPU = 4,
  localparam int unsigned NREG = 5 * N_CPU + 6 + (N_CPU - 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // HIBI wrapper agent side
  input  logic              rx_valid,
  input  hibi_word_t        rx_word,
  output logic              rx_ready,
  output logic              tx_valid,
  output hibi_word_t        tx_word,
  input  logic              tx_ready,
  // monitor
  output logic              cmd_start,
  output logic              cmd_stop,
  output logic [6:0]        reg_addr,
  input  logic [WORD_W-1:0] reg_rdata
);

  localparam int unsigned IW = $clog2(NREG + 1);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_e;
  state_e            state;
  logic [29:0]       ret_q;
  logic [IW-1:0]     idx_q;
  logic              cmd;

  assign rx_ready  = (state == S_IDLE);
  assign cmd       = rx_valid && rx_ready && !rx_word.av;
  assign cmd_start = cmd && rx_word.data[31:30] == 2'b01;
  assign cmd_stop  = cmd && rx_word.data[31:30] == 2'b10;

  // register index of dump word idx_q
  int unsigned i;
  assign i = 32'(idx_q);
  always_comb begin
    if (i < 5 * N_CPU)            reg_addr = 7'(8 * (i / 5) + (i % 5));
    else if (i < 5 * N_CPU + 6)   reg_addr = 7'(MON_SYS_BASE + (i - 5 * N_CPU));
    else                          reg_addr = 7'(MON_SYS_BASE + int'(MON_SIMUL) + 2 + (i - 5 * N_CPU - 6));
  end

  assign tx_valid = (state != S_IDLE);
  assign tx_word  = (state == S_ADDR) ? '{av: 1'b1, data: {2'b00, ret_q}}
                                      : '{av: 1'b0, data: reg_rdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ret_q <= '0;
      idx_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (cmd && rx_word.data[31:30] == 2'b11) begin
          ret_q <= rx_word.data[29:0];
          idx_q <= '0;
          state <= S_ADDR;
        end
        S_ADDR: if (tx_ready) state <= S_DATA;
        S_DATA: if (tx_ready) begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == IW'(NREG - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
