// True dual-port on-chip RAM with byte enables (a processor tile's data RAM).
//
// Both ports read and write the same array of 32-bit words. A read returns
// the word in the cycle after `en` (registered output, as FPGA block RAM
// does); a write with byte enables `we` updates the selected bytes at the
// clock edge. The 64 KB size is the document's; two ports (processor and
// N2H2 DMA) are this design's choice. When both ports write the same word in
// one cycle, port B's bytes win.
module onchip_ram
  import mpsoc_pkg::*;
#(
  parameter int unsigned BYTES = 65536,
  localparam int unsigned AW   = $clog2(BYTES / 4)
) (
  input  logic              clk,
  // port A
  input  logic              a_en,
  input  logic [3:0]        a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [WORD_W-1:0] a_wdata,
  output logic [WORD_W-1:0] a_rdata,
  // port B
  input  logic              b_en,
  input  logic [3:0]        b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [WORD_W-1:0] b_wdata,
  output logic [WORD_W-1:0] b_rdata
);

  logic [WORD_W-1:0] mem [BYTES / 4];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int unsigned b = 0; b < 4; b++)
        if (a_we[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      for (int unsigned b = 0; b < 4; b++)
        if (b_we[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
      b_rdata <= mem[b_addr];
    end
  end

endmodule
