// HIBI wrapper: connects one agent (an N2H2 DMA or a memory controller) to
// the HIBI bus.
//
// Transmit side: the agent pushes address words (av = 1) and data words into
// a TX FIFO. The wrapper requests the bus while the FIFO holds something.
// Once granted it sends words from the FIFO, one per cycle unless a receiver
// is full. It sends at most MAX_LEN data words per grant and then releases
// the bus; when it is granted again in the middle of a transfer it first
// re-sends the address of that transfer, so the receiver still knows where
// the data belong. Receive side: the wrapper watches every address word on
// the bus; a word whose address lies in [ADDR_BASE, ADDR_BASE + ADDR_SPAN)
// selects this wrapper, and that address word and the data words after it
// are stored in the RX FIFO, with rx_full stalling the bus when it is full.
//
// The limited transfer length and 32-bit words follow the document; FIFO
// depths, address ranges and the re-sent address are this design's choices.
module hibi_wrapper
  import mpsoc_pkg::*;
#(
  parameter logic [WORD_W-1:0] ADDR_BASE  = 32'h0000_0100,
  parameter logic [WORD_W-1:0] ADDR_SPAN  = 32'h0000_0100,
  parameter int unsigned       MAX_LEN    = 16,
  parameter int unsigned       TX_DEPTH   = 8,
  parameter int unsigned       RX_DEPTH   = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // agent side
  input  logic       tx_valid,
  input  hibi_word_t tx_word,
  output logic       tx_ready,
  output logic       rx_valid,
  output hibi_word_t rx_word,
  input  logic       rx_ready,
  // bus side
  output logic       bus_req,
  input  logic       bus_grant,
  output logic       bus_tx_valid,
  output hibi_word_t bus_tx_word,
  input  logic       bus_valid,
  input  hibi_word_t bus_word,
  input  logic       bus_full,
  output logic       bus_rx_full
);

  localparam int unsigned CW = $clog2(MAX_LEN + 1);

  // ---------------- transmit ----------------
  hibi_word_t    head;
  logic          tx_full, tx_empty, pop;
  logic [WORD_W-1:0] cur_addr_q;
  logic          addr_sent_q;   // an address word went out in this grant
  logic [CW-1:0] sent_q;        // data words sent in this grant
  logic          need_addr, limit, fire;

  sync_fifo #(.T(hibi_word_t), .DEPTH(TX_DEPTH)) u_txq (
    .clk, .rst_n, .push(tx_valid), .wr_data(tx_word), .pop,
    .rd_data(head), .full(tx_full), .empty(tx_empty)
  );
  assign tx_ready = !tx_full;

  assign need_addr    = !head.av && !addr_sent_q;
  assign limit        = (sent_q == CW'(MAX_LEN));
  assign bus_req      = !tx_empty && !(bus_grant && limit);
  assign bus_tx_valid = bus_grant && !tx_empty && !limit;
  assign bus_tx_word  = need_addr ? '{av: 1'b1, data: cur_addr_q} : head;
  assign fire         = bus_tx_valid && !bus_full;
  assign pop          = fire && !need_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_addr_q  <= '0;
      addr_sent_q <= 1'b0;
      sent_q      <= '0;
    end else if (!bus_grant) begin
      addr_sent_q <= 1'b0;
      sent_q      <= '0;
    end else if (fire) begin
      if (bus_tx_word.av) begin
        addr_sent_q <= 1'b1;
        cur_addr_q  <= bus_tx_word.data;
      end else begin
        sent_q <= sent_q + 1'b1;
      end
    end
  end

  // ---------------- receive ----------------
  logic sel_q, hit, target, rx_full, rx_empty;

  assign hit    = bus_word.data >= ADDR_BASE && (bus_word.data - ADDR_BASE) < ADDR_SPAN;
  assign target = bus_valid && (bus_word.av ? hit : sel_q);
  assign bus_rx_full = target && rx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          sel_q <= 1'b0;
    else if (bus_valid && bus_word.av && !bus_full) sel_q <= hit;
  end

  sync_fifo #(.T(hibi_word_t), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n, .push(target && !bus_full), .wr_data(bus_word), .pop(rx_ready),
    .rd_data(rx_word), .full(rx_full), .empty(rx_empty)
  );
  assign rx_valid = !rx_empty;

endmodule
