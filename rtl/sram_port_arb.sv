// Avalon interface to the SRAM inside a processor tile.
//
// A processor reaches the external SRAM with two masters: the instruction
// cache refill master, and the data master, which reads the constants the
// compiler keeps in the code segment (and may write the SRAM). This block
// merges them onto the tile's single SRAM port that leaves for the Avalon
// external bridge, so the hardware monitor sees one read/waitrequest pair per
// processor, as in the document's measurement set-up. Arbitration is fixed
// priority per transfer with the data master first; once a master's transfer
// has been presented to the bridge it is kept there until accepted, so the
// outgoing signals stay still while waitrequest is high. The priority order
// is this design's choice.
//
// Timing: combinational pass-through of the selected master, one register
// (the master owning a presented transfer).
module sram_port_arb
  import mpsoc_pkg::*;
#(
  parameter int unsigned AW = SRAM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction cache refill master (read only)
  input  logic              i_read,
  input  logic [AW-1:0]     i_address,
  output logic              i_waitrequest,
  // data master
  input  logic              d_read,
  input  logic              d_write,
  input  logic [AW-1:0]     d_address,
  input  logic [WORD_W-1:0] d_writedata,
  input  logic [3:0]        d_byteenable,
  output logic              d_waitrequest,
  // shared read data for both masters
  output logic [WORD_W-1:0] readdata,
  // port towards the bridge
  output logic              m_read,
  output logic              m_write,
  output logic [AW-1:0]     m_address,
  output logic [WORD_W-1:0] m_writedata,
  output logic [3:0]        m_byteenable,
  input  logic              m_waitrequest,
  input  logic [WORD_W-1:0] m_readdata
);

  logic d_req, sel_d, lock_q, lock_d_q;

  assign d_req = d_read || d_write;
  // Keep the owner of a transfer that is waiting; otherwise data first.
  assign sel_d = lock_q ? lock_d_q : d_req;

  assign m_read       = sel_d ? d_read  : i_read;
  assign m_write      = sel_d ? d_write : 1'b0;
  assign m_address    = sel_d ? d_address : i_address;
  assign m_writedata  = d_writedata;
  assign m_byteenable = sel_d ? d_byteenable : 4'hF;
  assign readdata     = m_readdata;

  assign d_waitrequest = d_req  && !(sel_d  && !m_waitrequest);
  assign i_waitrequest = i_read && !(!sel_d && !m_waitrequest);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q   <= 1'b0;
      lock_d_q <= 1'b0;
    end else begin
      lock_q   <= (m_read || m_write) && m_waitrequest;
      lock_d_q <= sel_d;
    end
  end

endmodule
