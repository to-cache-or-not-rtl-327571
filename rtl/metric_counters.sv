// Performance counters of the memory ports, read through a small register
// port. They count, per memory port, the quantities used to tune a cache:
// AXI handshakes (bus traffic), cache hits and misses, cycles with a full
// write buffer, cycles stalled by it, and the number and total duration of
// memory requests (their ratio is the average memory access time); plus one
// global counter of clock cycles spent inside accelerator calls.
//
// Inputs, all sampled every cycle: hs_i[p] is the number of AXI handshakes
// on port p in this cycle (0..5, one per channel); stat_i[p] are the cache
// event pulses (zero for a port without a cache); req_start_i[p] and
// req_done_i[p] are the request and completion pulses between the
// accelerator and the port's memory controller; run_i is high while a call
// is in progress. A request counts as busy from the cycle after its start up
// to and including its done cycle, so a request answered two cycles after
// its start adds 2 to the duration counter.
//
// Register map (CNT_W-bit counters, wrapping): address {port, reg}, reg =
//   0 AXI handshakes   1 hits   2 misses   3 buffer-full cycles
//   4 buffer-stall cycles   5 requests completed   6 request cycles
//   7 flushes completed
// and address {N_PORTS, 0} = clock cycles inside calls; other addresses
// read 0. rd_data_o returns the register at rd_addr_i one cycle later.
// clear_i zeroes every counter.
//
// Which metrics are collected follows the published evaluation metrics and
// its use of memory-mapped counter registers on the board; the register
// map, widths and read port are this design's own.
module metric_counters
  import axi_cache_pkg::*;
#(
  parameter int unsigned N_PORTS = 3,
  parameter int unsigned CNT_W   = 32,
  localparam int unsigned PW     = $clog2(N_PORTS + 1),
  localparam int unsigned RA_W   = PW + 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear_i,
  input  logic                          run_i,
  input  logic [N_PORTS-1:0][2:0]       hs_i,
  input  cache_stat_t [N_PORTS-1:0]     stat_i,
  input  logic [N_PORTS-1:0]            req_start_i,
  input  logic [N_PORTS-1:0]            req_done_i,
  input  logic [RA_W-1:0]               rd_addr_i,
  output logic [CNT_W-1:0]              rd_data_o
);

  logic [CNT_W-1:0] cnt_q [N_PORTS][8];
  logic [CNT_W-1:0] cyc_q;
  logic [N_PORTS-1:0] busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clear_i) begin
      for (int p = 0; p < N_PORTS; p++)
        for (int r = 0; r < 8; r++) cnt_q[p][r] <= '0;
      cyc_q  <= '0;
      busy_q <= '0;
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        cnt_q[p][0] <= cnt_q[p][0] + CNT_W'(hs_i[p]);
        cnt_q[p][1] <= cnt_q[p][1] + CNT_W'(stat_i[p].hit);
        cnt_q[p][2] <= cnt_q[p][2] + CNT_W'(stat_i[p].miss);
        cnt_q[p][3] <= cnt_q[p][3] + CNT_W'(stat_i[p].buf_full);
        cnt_q[p][4] <= cnt_q[p][4] + CNT_W'(stat_i[p].buf_stall);
        cnt_q[p][5] <= cnt_q[p][5] + CNT_W'(req_done_i[p]);
        cnt_q[p][6] <= cnt_q[p][6] + CNT_W'(busy_q[p]);
        cnt_q[p][7] <= cnt_q[p][7] + CNT_W'(stat_i[p].flush);
        if (req_start_i[p])     busy_q[p] <= 1'b1;
        else if (req_done_i[p]) busy_q[p] <= 1'b0;
      end
      cyc_q <= cyc_q + CNT_W'(run_i);
    end
  end

  logic [PW-1:0] rd_port;
  logic [2:0]    rd_reg;
  assign {rd_port, rd_reg} = rd_addr_i;

  always_ff @(posedge clk) begin
    if (!rst_n)                                   rd_data_o <= '0;
    else if (32'(rd_port) < N_PORTS)              rd_data_o <= cnt_q[rd_port][rd_reg];
    else if (32'(rd_port) == N_PORTS && rd_reg == 3'd0) rd_data_o <= cyc_q;
    else                                          rd_data_o <= '0;
  end

endmodule
