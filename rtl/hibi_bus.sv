// HIBI shared bus segment: 32-bit words, round-robin arbitration.
//
// Agents (HIBI wrappers) raise req to ask for the bus. When the bus is free
// the arbiter picks the next requesting agent after the previous owner and
// grants it from the following cycle; the owner keeps the bus for as long as
// it holds req, and the wrapper itself drops req after its maximum transfer
// length, so no agent can starve the others. While granted, the owner's word
// is broadcast to every agent; a word moves when bus_valid is high and no
// addressed receiver signals full. A word is either an address word (av) that
// selects the receiver, or a data word for the receiver last addressed.
// 32-bit width and round-robin arbitration follow the document; the signal
// set and the one idle cycle between owners are this design's choices.
module hibi_bus
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_AGENTS = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_AGENTS-1:0]     req,
  output logic [N_AGENTS-1:0]     grant,
  input  logic [N_AGENTS-1:0]     tx_valid,
  input  hibi_word_t              tx_word [N_AGENTS],
  input  logic [N_AGENTS-1:0]     rx_full,
  output logic                    bus_valid,
  output hibi_word_t              bus_word,
  output logic                    bus_full
);

  localparam int unsigned PW = (N_AGENTS > 1) ? $clog2(N_AGENTS) : 1;

  logic [PW-1:0] owner_q, last_q, win;
  logic          busy_q, any;

  always_comb begin
    win = '0;
    any = 1'b0;
    for (int unsigned k = 1; k <= N_AGENTS; k++) begin
      if (!any && req[(int'(last_q) + k) % N_AGENTS]) begin
        win = PW'((int'(last_q) + k) % N_AGENTS);
        any = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      last_q  <= PW'(N_AGENTS - 1);
    end else if (busy_q) begin
      if (!req[owner_q]) busy_q <= 1'b0;
    end else if (any) begin
      busy_q  <= 1'b1;
      owner_q <= win;
      last_q  <= win;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N_AGENTS; i++)
      grant[i] = busy_q && owner_q == PW'(i);
  end

  assign bus_valid = busy_q && tx_valid[owner_q];
  assign bus_word  = tx_word[owner_q];
  assign bus_full  = |rx_full;

  a_one_owner: assert property (@(posedge clk) $onehot0(grant));

endmodule
