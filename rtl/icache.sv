// Direct-mapped instruction cache between a processor's instruction master
// and the shared external SRAM.
//
// Each processor has an 8 KB instruction cache with lines of eight 32-bit
// words (the document's configuration). A fetch that hits returns its word in
// the same cycle with waitrequest low. A fetch that misses holds waitrequest
// high while the cache reads the whole line from the SRAM port, one Avalon
// read per word starting at the first word of the line; the fetch is answered
// from the refilled line in the cycle after the last word arrives. Every
// refill therefore appears on the SRAM bus as a block of LINE_WORDS reads.
// Valid bits are cleared by reset; there is no write path (code is read-only).
// Refill order, single-cycle hit and the absence of prefetching are this
// design's choices: the document notes the real core prefetches, which
// cannot be observed outside the core.
//
// Interface: word addresses of AW bits on both sides; Avalon read with
// waitrequest, read data valid in the cycle read is high and waitrequest low.
// `miss` pulses for one cycle when a refill starts.
module icache
  import mpsoc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned LINE_WORDS  = 8,
  parameter int unsigned AW          = SRAM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor instruction master
  input  logic              cpu_read,
  input  logic [AW-1:0]     cpu_address,
  output logic              cpu_waitrequest,
  output logic [WORD_W-1:0] cpu_readdata,
  // refill master towards the SRAM
  output logic              m_read,
  output logic [AW-1:0]     m_address,
  input  logic              m_waitrequest,
  input  logic [WORD_W-1:0] m_readdata,
  // event
  output logic              miss
);

  localparam int unsigned LINES = CACHE_BYTES / (4 * LINE_WORDS);
  localparam int unsigned OW    = $clog2(LINE_WORDS);
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned TW    = AW - IW - OW;

  logic [WORD_W-1:0] data_mem [LINES * LINE_WORDS];
  logic [TW-1:0]     tag_mem  [LINES];
  logic [LINES-1:0]  valid;

  logic [OW-1:0] off;
  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  assign {tag, idx, off} = cpu_address;

  typedef enum logic {S_LOOKUP, S_FILL} state_e;
  state_e        state;
  logic [OW-1:0] fill_cnt;
  logic          hit;

  assign hit = valid[idx] && (tag_mem[idx] == tag);

  assign cpu_waitrequest = cpu_read && !(state == S_LOOKUP && hit);
  assign cpu_readdata    = data_mem[{idx, off}];
  assign m_read          = (state == S_FILL);
  assign m_address       = {tag, idx, fill_cnt};
  assign miss            = (state == S_LOOKUP) && cpu_read && !hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOOKUP;
      fill_cnt <= '0;
      valid    <= '0;
    end else begin
      case (state)
        S_LOOKUP: if (miss) begin
          state       <= S_FILL;
          fill_cnt    <= '0;
          valid[idx]  <= 1'b0;
        end
        S_FILL: if (!m_waitrequest) begin
          fill_cnt <= fill_cnt + 1'b1;
          if (fill_cnt == OW'(LINE_WORDS - 1)) begin
            state      <= S_LOOKUP;
            valid[idx] <= 1'b1;
          end
        end
        default: state <= S_LOOKUP;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_FILL && !m_waitrequest)
      data_mem[{idx, fill_cnt}] <= m_readdata;
    if (state == S_FILL && !m_waitrequest && fill_cnt == OW'(LINE_WORDS - 1))
      tag_mem[idx] <= tag;
  end

  // The processor keeps its address still while it waits (Avalon rule).
  a_addr_stable: assert property (@(posedge clk)
                                  cpu_read && cpu_waitrequest |=> $stable(cpu_address));

endmodule
