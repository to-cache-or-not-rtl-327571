`include "axi_ports.svh"
// Configurable AXI cache: frontend, cache memory and backend joined.
//
// The memory controller drives the valid/ready frontend; the cache memory
// answers hits in one cycle and runs misses, write-buffer traffic and the
// flush; the backend owns the AXI master port with a line-fetch read
// controller and a write controller that keeps several writes outstanding.
//
// Parameters are the cache options: N_WAYS (ways, 1 = direct mapped),
// WAY_SIZE (lines per way), LINE_SIZE (elements of DATA_W bits per line),
// BUS_W (AXI data width, default the element width), BUFFER_SIZE (pending
// writes), REP_POLICY (LRU or tree pseudo-LRU) and WR_POLICY (write-through
// no-allocate, or write-back allocate). Defaults are the first cache of the
// configuration example: 8 lines of 32 elements, direct mapped, other options
// at their documented defaults. A line must be 1 to 256 bus beats long.
module axi_cache
  import axi_cache_pkg::*;
#(
  parameter int unsigned   ADDR_W      = 32,
  parameter int unsigned   DATA_W      = 64,
  parameter int unsigned   N_WAYS      = 1,
  parameter int unsigned   WAY_SIZE    = 8,
  parameter int unsigned   LINE_SIZE   = 32,
  parameter int unsigned   BUS_W       = DATA_W,
  parameter int unsigned   BUFFER_SIZE = 2,
  parameter rep_policy_e   REP_POLICY  = REP_LRU,
  parameter write_policy_e WR_POLICY   = WP_WT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic              we_i,
  input  logic              flush_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic              ready_o,
  output logic [DATA_W-1:0] rdata_o,
  output cache_stat_t       stat_o,
  `AXI_M_PORTS(m_axi, ADDR_W, BUS_W)
);

  localparam int unsigned LINE_W     = LINE_SIZE * DATA_W;
  localparam int unsigned LINE_BEATS = LINE_W / BUS_W;
  localparam int unsigned WR_BEATS   = (WR_POLICY == WP_WB) ? LINE_BEATS : 1;
  localparam int unsigned WB_W       = WR_BEATS * BUS_W;

  logic              req, q_we, q_flush, mem_done;
  logic [ADDR_W-1:0] req_addr, q_addr;
  logic [DATA_W-1:0] q_wdata, mem_rdata;

  logic              fetch_valid, fetch_ready, line_valid;
  logic [ADDR_W-1:0] fetch_addr;
  logic [LINE_W-1:0] line;
  logic              iss_valid, iss_adv, retire;
  logic [ADDR_W-1:0] iss_addr;
  logic [WB_W-1:0]   iss_data;
  logic [WB_W/8-1:0] iss_strb;

  cache_frontend #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_front (
    .clk, .rst_n,
    .valid_i, .we_i, .flush_i, .addr_i, .wdata_i, .ready_o, .rdata_o,
    .req_o(req), .req_addr_o(req_addr), .q_we_o(q_we), .q_flush_o(q_flush),
    .q_addr_o(q_addr), .q_wdata_o(q_wdata),
    .mem_done_i(mem_done), .mem_rdata_i(mem_rdata)
  );

  cache_memory #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .N_WAYS(N_WAYS), .WAY_SIZE(WAY_SIZE),
    .LINE_SIZE(LINE_SIZE), .BUS_W(BUS_W), .BUFFER_SIZE(BUFFER_SIZE),
    .REP_POLICY(REP_POLICY), .WR_POLICY(WR_POLICY)
  ) u_mem (
    .clk, .rst_n,
    .req_i(req), .req_addr_i(req_addr), .q_we_i(q_we), .q_flush_i(q_flush),
    .q_addr_i(q_addr), .q_wdata_i(q_wdata),
    .done_o(mem_done), .rdata_o(mem_rdata), .stat_o,
    .fetch_valid_o(fetch_valid), .fetch_addr_o(fetch_addr), .fetch_ready_i(fetch_ready),
    .line_valid_i(line_valid), .line_i(line),
    .iss_valid_o(iss_valid), .iss_addr_o(iss_addr), .iss_data_o(iss_data),
    .iss_strb_o(iss_strb), .iss_adv_i(iss_adv), .retire_i(retire)
  );

  cache_backend #(
    .ADDR_W(ADDR_W), .BUS_W(BUS_W), .LINE_BEATS(LINE_BEATS), .WR_BEATS(WR_BEATS)
  ) u_back (
    .clk, .rst_n,
    .fetch_valid_i(fetch_valid), .fetch_addr_i(fetch_addr), .fetch_ready_o(fetch_ready),
    .line_valid_o(line_valid), .line_o(line),
    .iss_valid_i(iss_valid), .iss_addr_i(iss_addr), .iss_data_i(iss_data),
    .iss_strb_i(iss_strb), .iss_adv_o(iss_adv), .retire_o(retire),
    `AXI_M_CONNECT(m_axi, m_axi)
  );

endmodule
