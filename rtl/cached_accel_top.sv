`include "axi_ports.svh"
// Accelerator with per-port tunable caches.
//
// The example accelerator (foo_accel, c[index] = a[index] + b[index]) talks
// to three memory controllers, one per AXI bundle, each with its own AXI4
// master port:
//   gmem0 (pointer a): cached, 8 lines of 32 elements, direct mapped, bus
//                      width = element width, 2-entry write buffer, LRU,
//                      write-through                          -> m0_*
//   gmem1 (pointer b): cached, 2 ways of 32 lines of 8 elements, 64-bit bus,
//                      4-entry write buffer, LRU, write-back   -> m1_*
//   gmem2 (pointer c): standard controller, no cache          -> m2_*
// These are the configuration example's settings; every cache option is a
// parameter, so each port can be tuned on its own (or set *_USE_CACHE = 0).
// The caches are independent and hold no coherence: each port must own the
// memory it writes.
//
// Control: start_i pulses with a_i, b_i, c_i (byte addresses) and index_i;
// done_o pulses once the result is stored and every cache has been flushed.
// stat0_o / stat1_o are the event pulses of the two caches.
//
// Counters (metric_counters): per port, AXI handshakes, hits, misses,
// buffer-full and buffer-stall cycles, requests and their total duration,
// flushes; and the cycles spent inside calls. mreg_addr_i selects a counter
// ({port, reg}, port 3 reg 0 = call cycles) and mreg_data_o returns it one
// cycle later; mreg_clear_i zeroes them all. The register layout is this
// design's own.
module cached_accel_top
  import axi_cache_pkg::*;
#(
  parameter int unsigned   ADDR_W          = 32,
  parameter int unsigned   DATA_W          = 64,
  // gmem0
  parameter bit            G0_USE_CACHE    = 1'b1,
  parameter int unsigned   G0_N_WAYS       = 1,
  parameter int unsigned   G0_WAY_SIZE     = 8,
  parameter int unsigned   G0_LINE_SIZE    = 32,
  parameter int unsigned   G0_BUS_W        = DATA_W,
  parameter int unsigned   G0_BUFFER_SIZE  = 2,
  parameter rep_policy_e   G0_REP_POLICY   = REP_LRU,
  parameter write_policy_e G0_WR_POLICY    = WP_WT,
  // gmem1
  parameter bit            G1_USE_CACHE    = 1'b1,
  parameter int unsigned   G1_N_WAYS       = 2,
  parameter int unsigned   G1_WAY_SIZE     = 32,
  parameter int unsigned   G1_LINE_SIZE    = 8,
  parameter int unsigned   G1_BUS_W        = 64,
  parameter int unsigned   G1_BUFFER_SIZE  = 4,
  parameter rep_policy_e   G1_REP_POLICY   = REP_LRU,
  parameter write_policy_e G1_WR_POLICY    = WP_WB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [ADDR_W-1:0] a_i,
  input  logic [ADDR_W-1:0] b_i,
  input  logic [ADDR_W-1:0] c_i,
  input  logic [ADDR_W-1:0] index_i,
  output logic              done_o,
  output cache_stat_t       stat0_o,
  output cache_stat_t       stat1_o,
  input  logic              mreg_clear_i,
  input  logic [4:0]        mreg_addr_i,
  output logic [31:0]       mreg_data_o,
  `AXI_M_PORTS(m0, ADDR_W, G0_BUS_W),
  `AXI_M_PORTS(m1, ADDR_W, G1_BUS_W),
  `AXI_M_PORTS(m2, ADDR_W, DATA_W)
);

  localparam int unsigned SZW = $clog2(DATA_W) + 1;

  logic [2:0]             m_start, m_we, m_done;
  logic [2:0][SZW-1:0]    m_size;
  logic [2:0][ADDR_W-1:0] m_addr;
  logic [2:0][DATA_W-1:0] m_wdata, m_rdata;
  cache_stat_t            stat2_unused;

  foo_accel #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_accel (
    .clk, .rst_n, .start_i, .a_i, .b_i, .c_i, .index_i, .done_o,
    .m_start_o(m_start), .m_we_o(m_we), .m_size_o(m_size), .m_addr_o(m_addr),
    .m_wdata_o(m_wdata), .m_done_i(m_done), .m_rdata_i(m_rdata)
  );

  axi_mem_ctrl #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .USE_CACHE(G0_USE_CACHE),
    .N_WAYS(G0_N_WAYS), .WAY_SIZE(G0_WAY_SIZE), .LINE_SIZE(G0_LINE_SIZE),
    .BUS_W(G0_BUS_W), .BUFFER_SIZE(G0_BUFFER_SIZE),
    .REP_POLICY(G0_REP_POLICY), .WR_POLICY(G0_WR_POLICY)
  ) u_gmem0 (
    .clk, .rst_n,
    .start_i(m_start[0]), .we_i(m_we[0]), .size_i(m_size[0]), .addr_i(m_addr[0]),
    .wdata_i(m_wdata[0]), .done_o(m_done[0]), .rdata_o(m_rdata[0]), .stat_o(stat0_o),
    `AXI_M_CONNECT(m_axi, m0)
  );

  axi_mem_ctrl #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .USE_CACHE(G1_USE_CACHE),
    .N_WAYS(G1_N_WAYS), .WAY_SIZE(G1_WAY_SIZE), .LINE_SIZE(G1_LINE_SIZE),
    .BUS_W(G1_BUS_W), .BUFFER_SIZE(G1_BUFFER_SIZE),
    .REP_POLICY(G1_REP_POLICY), .WR_POLICY(G1_WR_POLICY)
  ) u_gmem1 (
    .clk, .rst_n,
    .start_i(m_start[1]), .we_i(m_we[1]), .size_i(m_size[1]), .addr_i(m_addr[1]),
    .wdata_i(m_wdata[1]), .done_o(m_done[1]), .rdata_o(m_rdata[1]), .stat_o(stat1_o),
    `AXI_M_CONNECT(m_axi, m1)
  );

  axi_mem_ctrl #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .USE_CACHE(1'b0)
  ) u_gmem2 (
    .clk, .rst_n,
    .start_i(m_start[2]), .we_i(m_we[2]), .size_i(m_size[2]), .addr_i(m_addr[2]),
    .wdata_i(m_wdata[2]), .done_o(m_done[2]), .rdata_o(m_rdata[2]), .stat_o(stat2_unused),
    `AXI_M_CONNECT(m_axi, m2)
  );

  // handshakes per port in this cycle, one per AXI channel
  function automatic logic [2:0] n_hs(input logic ar, r, aw, w, b);
    return 3'(ar) + 3'(r) + 3'(aw) + 3'(w) + 3'(b);
  endfunction

  logic [2:0][2:0] hs;
  assign hs[0] = n_hs(m0_arvalid && m0_arready, m0_rvalid && m0_rready,
                      m0_awvalid && m0_awready, m0_wvalid && m0_wready, m0_bvalid && m0_bready);
  assign hs[1] = n_hs(m1_arvalid && m1_arready, m1_rvalid && m1_rready,
                      m1_awvalid && m1_awready, m1_wvalid && m1_wready, m1_bvalid && m1_bready);
  assign hs[2] = n_hs(m2_arvalid && m2_arready, m2_rvalid && m2_rready,
                      m2_awvalid && m2_awready, m2_wvalid && m2_wready, m2_bvalid && m2_bready);

  // a call runs from the cycle after start_i up to and including done_o
  logic run_q;
  always_ff @(posedge clk) begin
    if (!rst_n)      run_q <= 1'b0;
    else if (start_i) run_q <= 1'b1;
    else if (done_o)  run_q <= 1'b0;
  end

  metric_counters #(.N_PORTS(3), .CNT_W(32)) u_metrics (
    .clk, .rst_n, .clear_i(mreg_clear_i), .run_i(run_q), .hs_i(hs),
    .stat_i({stat2_unused, stat1_o, stat0_o}),
    .req_start_i(m_start), .req_done_i(m_done),
    .rd_addr_i(mreg_addr_i), .rd_data_o(mreg_data_o)
  );

endmodule
