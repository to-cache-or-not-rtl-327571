`include "axi_ports.svh"
// Memory controller of one AXI port (bundle) of the accelerator.
//
// Every bundle gets this module with the same accelerator-side interface, so
// the accelerator's state machine is the same with or without a cache. With
// USE_CACHE = 0 it is the standard controller (one single-beat AXI
// transaction per access). With USE_CACHE = 1 it holds an axi_cache and hands
// the bus to it: a start pulse raises the cache's valid with the registered
// request, done is the cache's ready. A write of size 0 is the
// end-of-computation marker and becomes a cache flush, so all buffered or
// dirty data reaches memory before the accelerator reports completion.
//
// Accelerator side: start_i (1-cycle pulse) with we_i, size_i (bits, 0 =
// flush), addr_i, wdata_i; done_o pulses with rdata_o. Only whole elements
// of DATA_W bits are accessed. stat_o carries the cache event pulses (zero
// without a cache). With no cache the bus is DATA_W bits wide and BUS_W must
// equal DATA_W.
module axi_mem_ctrl
  import axi_cache_pkg::*;
#(
  parameter int unsigned   ADDR_W      = 32,
  parameter int unsigned   DATA_W      = 64,
  parameter bit            USE_CACHE   = 1'b1,
  parameter int unsigned   N_WAYS      = 1,
  parameter int unsigned   WAY_SIZE    = 8,
  parameter int unsigned   LINE_SIZE   = 32,
  parameter int unsigned   BUS_W       = DATA_W,
  parameter int unsigned   BUFFER_SIZE = 2,
  parameter rep_policy_e   REP_POLICY  = REP_LRU,
  parameter write_policy_e WR_POLICY   = WP_WT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start_i,
  input  logic                     we_i,
  input  logic [$clog2(DATA_W):0]  size_i,
  input  logic [ADDR_W-1:0]        addr_i,
  input  logic [DATA_W-1:0]        wdata_i,
  output logic                     done_o,
  output logic [DATA_W-1:0]        rdata_o,
  output cache_stat_t              stat_o,
  `AXI_M_PORTS(m_axi, ADDR_W, BUS_W)
);

  if (USE_CACHE) begin : g_cache
    logic              valid_q, we_q, flush_q;
    logic [ADDR_W-1:0] addr_q;
    logic [DATA_W-1:0] wdata_q;
    logic              ready;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        valid_q <= 1'b0;
        we_q    <= 1'b0;
        flush_q <= 1'b0;
        addr_q  <= '0;
        wdata_q <= '0;
      end else if (start_i && !valid_q) begin
        valid_q <= 1'b1;
        we_q    <= we_i;
        flush_q <= we_i && (size_i == '0);
        addr_q  <= addr_i;
        wdata_q <= wdata_i;
      end else if (ready) begin
        valid_q <= 1'b0;
      end
    end

    axi_cache #(
      .ADDR_W(ADDR_W), .DATA_W(DATA_W), .N_WAYS(N_WAYS), .WAY_SIZE(WAY_SIZE),
      .LINE_SIZE(LINE_SIZE), .BUS_W(BUS_W), .BUFFER_SIZE(BUFFER_SIZE),
      .REP_POLICY(REP_POLICY), .WR_POLICY(WR_POLICY)
    ) u_cache (
      .clk, .rst_n,
      .valid_i(valid_q), .we_i(we_q && !flush_q), .flush_i(flush_q),
      .addr_i(addr_q), .wdata_i(wdata_q),
      .ready_o(ready), .rdata_o, .stat_o,
      `AXI_M_CONNECT(m_axi, m_axi)
    );
    assign done_o = ready;

    a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
      start_i |-> !valid_q);
  end else begin : g_std
    std_axi_ctrl #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_std (
      .clk, .rst_n,
      .start_i, .we_i, .size_i, .addr_i, .wdata_i, .done_o, .rdata_o,
      `AXI_M_CONNECT(m_axi, m_axi)
    );
    assign stat_o = '0;
    initial assert (BUS_W == DATA_W)
      else $error("axi_mem_ctrl: without a cache BUS_W must equal DATA_W");
  end

endmodule
