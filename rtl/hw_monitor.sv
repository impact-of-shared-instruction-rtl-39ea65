// Hardware monitor of the shared SRAM bus.
//
// The monitor listens to the Avalon read and waitrequest signals of every
// processor's SRAM port and to the read strobe of the SRAM bus itself (plus the
// Ethernet read/write strobes, which share that bus on the board). While it is
// enabled it counts, per processor:
//   T_w  wait cycles (read and waitrequest high),
//   A_r  words read (read high, waitrequest low),
//   L    longest latency of one read, in cycles from the first cycle the read
//        is presented up to and including the cycle it is accepted,
//   S    largest number of words read within one block,
//   A_b  number of blocks; a block is a maximal run of cycles with read high,
// and for the whole system:
//   T_fet elapsed cycles, A_t words read on the SRAM bus, A_sp longest run of
//   consecutive SRAM read cycles, A_sb number of such runs, A_k number of
//   cycles in which exactly k processors present a read (k = 2..N_CPU), and
//   the Ethernet read and write cycles.
// The counter list is the document's; the exact definitions of latency, block
// and the run counters are this design's reading of their names.
//
// Interface: cmd_start clears every counter and starts counting from the next
// cycle, cmd_stop freezes the counters. Counters are read combinationally
// through reg_addr/reg_rdata: processor i, counter j (mon_cpu_cnt_e) at
// 8*i + j; system counter s (mon_sys_cnt_e) at 64 + s; A_k at 64 + 8 + k.
// Counters are CNT_W bits wide and saturate.
module hw_monitor
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_CPU = 4,
  parameter int unsigned CNT_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 cmd_start,
  input  logic                 cmd_stop,
  output logic                 running,
  // observed signals
  input  logic [N_CPU-1:0]     cpu_read,
  input  logic [N_CPU-1:0]     cpu_waitrequest,
  input  logic                 sram_read,
  input  logic                 eth_read,
  input  logic                 eth_write,
  // counter read-out
  input  logic [6:0]           reg_addr,
  output logic [CNT_W-1:0]     reg_rdata
);

  typedef logic [CNT_W-1:0] cnt_t;

  cnt_t cpu_wait   [N_CPU];
  cnt_t cpu_reads  [N_CPU];
  cnt_t cpu_maxlat [N_CPU];
  cnt_t cpu_maxblk [N_CPU];
  cnt_t cpu_blocks [N_CPU];
  cnt_t cur_lat    [N_CPU];   // wait cycles of the pending read so far
  cnt_t cur_blk    [N_CPU];   // words accepted in the current block
  logic [N_CPU-1:0] prev_read;

  cnt_t elapsed, total, sp_long, sp_count, sp_cur, eth_rd, eth_wr;
  cnt_t simul [N_CPU+1];
  logic prev_sram;

  function automatic cnt_t inc(cnt_t v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  function automatic cnt_t max2(cnt_t a, cnt_t b);
    return (a > b) ? a : b;
  endfunction

  int unsigned n_readers;
  always_comb begin
    n_readers = 0;
    for (int unsigned i = 0; i < N_CPU; i++) n_readers += int'(cpu_read[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
    end else if (cmd_start) begin
      running <= 1'b1;
    end else if (cmd_stop) begin
      running <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_CPU; i++) begin
        cpu_wait[i]   <= '0;
        cpu_reads[i]  <= '0;
        cpu_maxlat[i] <= '0;
        cpu_maxblk[i] <= '0;
        cpu_blocks[i] <= '0;
        cur_lat[i]    <= '0;
        cur_blk[i]    <= '0;
      end
      for (int unsigned k = 0; k <= N_CPU; k++) simul[k] <= '0;
      prev_read <= '0;
      prev_sram <= 1'b0;
      elapsed   <= '0;
      total     <= '0;
      sp_long   <= '0;
      sp_count  <= '0;
      sp_cur    <= '0;
      eth_rd    <= '0;
      eth_wr    <= '0;
    end else if (cmd_start) begin
      for (int unsigned i = 0; i < N_CPU; i++) begin
        cpu_wait[i]   <= '0;
        cpu_reads[i]  <= '0;
        cpu_maxlat[i] <= '0;
        cpu_maxblk[i] <= '0;
        cpu_blocks[i] <= '0;
        cur_lat[i]    <= '0;
        cur_blk[i]    <= '0;
      end
      for (int unsigned k = 0; k <= N_CPU; k++) simul[k] <= '0;
      prev_read <= '0;
      prev_sram <= 1'b0;
      elapsed   <= '0;
      total     <= '0;
      sp_long   <= '0;
      sp_count  <= '0;
      sp_cur    <= '0;
      eth_rd    <= '0;
      eth_wr    <= '0;
    end else if (running && !cmd_stop) begin
      elapsed <= inc(elapsed);
      for (int unsigned i = 0; i < N_CPU; i++) begin
        if (cpu_read[i]) begin
          if (!prev_read[i]) cpu_blocks[i] <= inc(cpu_blocks[i]);
          if (cpu_waitrequest[i]) begin
            cpu_wait[i] <= inc(cpu_wait[i]);
            cur_lat[i]  <= inc(cur_lat[i]);
          end else begin
            cpu_reads[i]  <= inc(cpu_reads[i]);
            cpu_maxlat[i] <= max2(cpu_maxlat[i], inc(cur_lat[i]));
            cur_lat[i]    <= '0;
            cur_blk[i]    <= prev_read[i] ? inc(cur_blk[i]) : cnt_t'(1);
            cpu_maxblk[i] <= max2(cpu_maxblk[i], prev_read[i] ? inc(cur_blk[i]) : cnt_t'(1));
          end
        end else begin
          cur_blk[i] <= '0;
        end
      end
      prev_read <= cpu_read;
      for (int unsigned k = 2; k <= N_CPU; k++)
        if (n_readers == k) simul[k] <= inc(simul[k]);
      if (sram_read) begin
        total  <= inc(total);
        sp_cur <= prev_sram ? inc(sp_cur) : cnt_t'(1);
        sp_long <= max2(sp_long, prev_sram ? inc(sp_cur) : cnt_t'(1));
        if (!prev_sram) sp_count <= inc(sp_count);
      end
      prev_sram <= sram_read;
      if (eth_read)  eth_rd <= inc(eth_rd);
      if (eth_write) eth_wr <= inc(eth_wr);
    end
  end

  // Counter read-out.
  always_comb begin
    reg_rdata = '0;
    if (reg_addr < 7'(MON_SYS_BASE)) begin
      for (int unsigned i = 0; i < N_CPU; i++) begin
        if (reg_addr[5:3] == 3'(i)) begin
          case (reg_addr[2:0])
            MON_WAIT:   reg_rdata = cpu_wait[i];
            MON_READS:  reg_rdata = cpu_reads[i];
            MON_MAXLAT: reg_rdata = cpu_maxlat[i];
            MON_MAXBLK: reg_rdata = cpu_maxblk[i];
            MON_BLOCKS: reg_rdata = cpu_blocks[i];
            default:    reg_rdata = '0;
          endcase
        end
      end
    end else begin
      case (reg_addr[4:0])
        MON_ELAPSED: reg_rdata = elapsed;
        MON_TOTAL:   reg_rdata = total;
        MON_SPLONG:  reg_rdata = sp_long;
        MON_SPCOUNT: reg_rdata = sp_count;
        MON_ETH_RD:  reg_rdata = eth_rd;
        MON_ETH_WR:  reg_rdata = eth_wr;
        default: begin
          for (int unsigned k = 2; k <= N_CPU; k++)
            if (reg_addr[4:0] == 5'(MON_SIMUL + k)) reg_rdata = simul[k];
        end
      endcase
    end
  end

  initial assert (N_CPU >= 1 && N_CPU <= 8) else $error("hw_monitor: N_CPU must be 1..8");

endmodule
