// Avalon external bridge: shares the external program SRAM among processors.
//
// Every processor tile has one Avalon master port towards the external SRAM.
// The bridge grants the SRAM to one requesting port per clock cycle and routes
// that port's address, write data and byte enables to the SRAM pins; all other
// requesting ports see waitrequest and must hold their signals still, as the
// Avalon rules require. The SRAM is modelled as a zero-wait device: read data
// returns in the same cycle (asynchronous SRAM at the system clock), so a
// port that is granted completes its transfer in that cycle (read/write high,
// waitrequest low).
//
// Arbitration is round-robin per transfer: after a grant the next search starts
// at the port after the winner. The document only says the access is
// arbitrated "depending on the priorities of the masters"; round-robin is this
// design's choice because it bounds the latency of one read to N_PORTS cycles,
// which matches the maximum latency of 4 cycles measured for four processors.
// Port 0 wins when no grant has yet been given.
//
// Timing: combinational from request to grant/waitrequest/readdata; one
// register (the round-robin pointer).
module avalon_ext_bridge
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned AW      = SRAM_AW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor side
  input  logic [N_PORTS-1:0]            p_read,
  input  logic [N_PORTS-1:0]            p_write,
  input  logic [N_PORTS-1:0][AW-1:0]    p_address,
  input  logic [N_PORTS-1:0][WORD_W-1:0] p_writedata,
  input  logic [N_PORTS-1:0][3:0]       p_byteenable,
  output logic [N_PORTS-1:0]            p_waitrequest,
  output logic [WORD_W-1:0]             p_readdata,   // shared read data bus
  // external SRAM pins
  output logic [AW-1:0]                 sram_addr,
  output logic                          sram_read,
  output logic                          sram_write,
  output logic [WORD_W-1:0]             sram_wdata,
  output logic [3:0]                    sram_be,
  input  logic [WORD_W-1:0]             sram_rdata
);

  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  logic [N_PORTS-1:0] req;
  logic [PW-1:0]      last_q;
  logic [PW-1:0]      win;
  logic               any;

  assign req = p_read | p_write;

  // Round-robin search starting after the last winner.
  always_comb begin
    win = '0;
    any = 1'b0;
    for (int unsigned k = 1; k <= N_PORTS; k++) begin
      if (!any && req[(int'(last_q) + k) % N_PORTS]) begin
        win = PW'((int'(last_q) + k) % N_PORTS);
        any = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   last_q <= PW'(N_PORTS - 1);
    else if (any) last_q <= win;
  end

  always_comb begin
    for (int unsigned i = 0; i < N_PORTS; i++)
      p_waitrequest[i] = req[i] && !(any && win == PW'(i));
  end

  assign sram_addr  = p_address[win];
  assign sram_read  = any && p_read[win];
  assign sram_write = any && p_write[win];
  assign sram_wdata = p_writedata[win];
  assign sram_be    = p_byteenable[win];
  assign p_readdata = sram_rdata;

  // A port may not read and write at once.
  a_rw_exclusive: assert property (@(posedge clk)
                                   (p_read & p_write) == '0);

endmodule
