// N2H2: DMA controller between a processor's data RAM and the HIBI network.
//
// The processor programs the DMA through a small register file and then
// leaves all copying to it. One TX channel reads LEN words from the data RAM,
// starting at a word address, and sends them to a HIBI address: one address
// word followed by the data words. RX_CH receive channels (eight in the
// document's system) each wait for a given number of words sent to a given
// HIBI address and store them at consecutive data-RAM words from a given
// address; when a channel has its full amount it sets its bit in the RX
// interrupt register, raises irq and disarms itself. Several channels can be
// armed at once, so data from several sources arrive without processor help.
//
// Words that arrive for an address no armed channel listens to, or after the
// matching channel has its full amount, are held in the wrapper's RX FIFO
// (and so back-pressure the bus) until a channel is armed for them. The
// TX/RX channel counts and the "wait for an amount of data and store it where
// the CPU said" behaviour are the document's; the register map (mpsoc_pkg),
// the stall rule and RX-before-TX priority on the RAM port are this design's.
//
// Timing: registers are written in one cycle and read combinationally. The
// RAM port has one cycle read latency; TX moves one word every two cycles,
// RX one word per cycle.
module n2h2
  import mpsoc_pkg::*;
#(
  parameter int unsigned RX_CH = 8,
  parameter int unsigned MAW   = 14     // data RAM word-address bits (64 KB)
) (
  input  logic              clk,
  input  logic              rst_n,
  // register slave (processor data master)
  input  logic              reg_write,
  input  logic [5:0]        reg_addr,
  input  logic [WORD_W-1:0] reg_wdata,
  output logic [WORD_W-1:0] reg_rdata,
  output logic              irq,
  // data RAM port
  output logic              mem_en,
  output logic [3:0]        mem_we,
  output logic [MAW-1:0]    mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic [WORD_W-1:0] mem_rdata,
  // HIBI wrapper agent side
  output logic              tx_valid,
  output hibi_word_t        tx_word,
  input  logic              tx_ready,
  input  logic              rx_valid,
  input  hibi_word_t        rx_word,
  output logic              rx_ready,
  // events
  output logic              rx_stall
);

  localparam int unsigned CHW = (RX_CH > 1) ? $clog2(RX_CH) : 1;

  // ---------------- registers ----------------
  logic [MAW-1:0]    tx_mem_q;
  logic [MAW:0]      tx_len_q;
  logic [WORD_W-1:0] tx_haddr_q;
  logic [RX_CH-1:0]  rx_irq_q, rx_armed_q;
  logic [MAW-1:0]    rx_mem_q   [RX_CH];
  logic [MAW:0]      rx_amt_q   [RX_CH];
  logic [WORD_W-1:0] rx_haddr_q [RX_CH];
  logic [MAW:0]      rx_cnt_q   [RX_CH];

  typedef enum logic [1:0] {TX_IDLE, TX_ADDR, TX_READ, TX_SEND} tx_state_e;
  tx_state_e         tx_state;
  logic [WORD_W-1:0] tx_data_q;
  logic              tx_data_ok_q;  // tx_data_q holds the RAM word

  // ---------------- RX decision ----------------
  logic           cur_ok_q;       // an address word selected a channel
  logic [CHW-1:0] cur_ch_q;
  logic           match_ok;
  logic [CHW-1:0] match_ch;
  logic           rx_take_addr, rx_take_data;

  always_comb begin
    match_ok = 1'b0;
    match_ch = '0;
    for (int unsigned c = 0; c < RX_CH; c++) begin
      if (!match_ok && rx_armed_q[c] && rx_haddr_q[c] == rx_word.data) begin
        match_ok = 1'b1;
        match_ch = CHW'(c);
      end
    end
  end

  assign rx_take_addr = rx_valid && rx_word.av && match_ok;
  assign rx_take_data = rx_valid && !rx_word.av && cur_ok_q && rx_armed_q[cur_ch_q];
  assign rx_ready     = rx_take_addr || rx_take_data;
  assign rx_stall     = rx_valid && !rx_ready;

  // ---------------- RAM port ----------------
  logic tx_rd;
  assign tx_rd = (tx_state == TX_READ) && !rx_take_data;

  always_comb begin
    mem_en    = rx_take_data || tx_rd;
    mem_we    = rx_take_data ? 4'hF : 4'h0;
    mem_addr  = rx_take_data ? rx_mem_q[cur_ch_q] + MAW'(rx_cnt_q[cur_ch_q]) : tx_mem_q;
    mem_wdata = rx_word.data;
  end

  // ---------------- TX output ----------------
  assign tx_valid = (tx_state == TX_ADDR) || (tx_state == TX_SEND);
  assign tx_word  = (tx_state == TX_ADDR) ? '{av: 1'b1, data: tx_haddr_q}
                                          : '{av: 1'b0, data: tx_data_ok_q ? tx_data_q : mem_rdata};

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state     <= TX_IDLE;
      tx_mem_q     <= '0;
      tx_len_q     <= '0;
      tx_haddr_q   <= '0;
      tx_data_q    <= '0;
      tx_data_ok_q <= 1'b0;
      rx_irq_q     <= '0;
      rx_armed_q   <= '0;
      cur_ok_q     <= 1'b0;
      cur_ch_q     <= '0;
      for (int unsigned c = 0; c < RX_CH; c++) begin
        rx_mem_q[c]   <= '0;
        rx_amt_q[c]   <= '0;
        rx_haddr_q[c] <= '0;
        rx_cnt_q[c]   <= '0;
      end
    end else begin
      // register writes
      if (reg_write) begin
        case (int'(reg_addr))
          N2H2_TX_MEM:   if (tx_state == TX_IDLE) tx_mem_q   <= MAW'(reg_wdata);
          N2H2_TX_LEN:   if (tx_state == TX_IDLE) tx_len_q   <= (MAW+1)'(reg_wdata);
          N2H2_TX_HADDR: if (tx_state == TX_IDLE) tx_haddr_q <= reg_wdata;
          N2H2_TX_CTRL:  if (tx_state == TX_IDLE && reg_wdata[0] && tx_len_q != '0)
                           tx_state <= TX_ADDR;
          N2H2_RX_IRQ:   ;  // handled below with the set bits
          default: begin
            for (int unsigned c = 0; c < RX_CH; c++) begin
              if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_MEM)   rx_mem_q[c]   <= MAW'(reg_wdata);
              if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_AMT)   rx_amt_q[c]   <= (MAW+1)'(reg_wdata);
              if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_HADDR) rx_haddr_q[c] <= reg_wdata;
              if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_CTRL && reg_wdata[0]) begin
                rx_armed_q[c] <= 1'b1;
                rx_cnt_q[c]   <= '0;
              end
            end
          end
        endcase
      end

      // TX channel
      case (tx_state)
        TX_ADDR: if (tx_ready) tx_state <= TX_READ;
        TX_READ: if (tx_rd) begin
          tx_state     <= TX_SEND;
          tx_data_ok_q <= 1'b0;
        end
        TX_SEND: begin
          if (!tx_data_ok_q) begin
            tx_data_q    <= mem_rdata;
            tx_data_ok_q <= 1'b1;
          end
          if (tx_ready) begin
            tx_mem_q <= tx_mem_q + 1'b1;
            tx_len_q <= tx_len_q - 1'b1;
            tx_state <= (tx_len_q == (MAW+1)'(1)) ? TX_IDLE : TX_READ;
          end
        end
        default: ;
      endcase

      // RX channels
      if (rx_take_addr) begin
        cur_ok_q <= 1'b1;
        cur_ch_q <= match_ch;
      end
      if (rx_take_data) begin
        rx_cnt_q[cur_ch_q] <= rx_cnt_q[cur_ch_q] + 1'b1;
        if (rx_cnt_q[cur_ch_q] + 1'b1 == rx_amt_q[cur_ch_q]) begin
          rx_armed_q[cur_ch_q] <= 1'b0;
          rx_irq_q[cur_ch_q]   <= 1'b1;
        end
      end
      if (reg_write && int'(reg_addr) == N2H2_RX_IRQ)
        rx_irq_q <= (rx_irq_q & ~reg_wdata[RX_CH-1:0]) |
                    ((rx_take_data && rx_cnt_q[cur_ch_q] + 1'b1 == rx_amt_q[cur_ch_q])
                       ? (RX_CH'(1) << cur_ch_q) : '0);
    end
  end

  assign irq = |rx_irq_q;

  // register read
  always_comb begin
    reg_rdata = '0;
    case (int'(reg_addr))
      N2H2_TX_MEM:   reg_rdata = WORD_W'(tx_mem_q);
      N2H2_TX_LEN:   reg_rdata = WORD_W'(tx_len_q);
      N2H2_TX_HADDR: reg_rdata = tx_haddr_q;
      N2H2_TX_CTRL:  reg_rdata = WORD_W'(tx_state != TX_IDLE);
      N2H2_RX_IRQ:   reg_rdata = WORD_W'(rx_irq_q);
      default: begin
        for (int unsigned c = 0; c < RX_CH; c++) begin
          if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_MEM)   reg_rdata = WORD_W'(rx_mem_q[c]);
          if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_AMT)   reg_rdata = WORD_W'(rx_amt_q[c]);
          if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_HADDR) reg_rdata = rx_haddr_q[c];
          if (int'(reg_addr) == N2H2_RX_BASE + 4*c + N2H2_RX_CTRL)  reg_rdata = WORD_W'(rx_cnt_q[c]);
        end
      end
    endcase
  end

  initial assert (N2H2_RX_BASE + 4 * RX_CH <= 64) else $error("n2h2: too many RX channels for the register window");

endmodule
