`include "axi_ports.svh"
// Backend of the cache: the AXI master, made of two independent controllers
// that run at the same time.
//
// Read controller: on fetch_valid_i (held until fetch_ready_o) it issues one
// INCR burst of LINE_BEATS beats of BUS_W bits for the line at fetch_addr_i
// (line aligned), gathers the beats, and pulses line_valid_o with the whole
// line in line_o when rlast arrives. fetch_ready_o is high while it is idle.
//
// Write controller: whenever the write buffer has an unissued entry it sends
// it as one burst of WR_BEATS beats (AW and W in parallel; WR_BEATS is 1 for
// a write-through cache, LINE_BEATS for a write-back cache), then moves the
// issue pointer on without waiting for the response, so the next write can
// start while earlier ones are still outstanding. Each write response
// (B handshake, bready always high) retires the oldest buffer entry.
// Response codes are not checked. All transactions use ID 0, so AXI keeps
// responses in order.
module cache_backend
  import axi_cache_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned BUS_W      = 64,
  parameter int unsigned LINE_BEATS = 4,
  parameter int unsigned WR_BEATS   = 1,
  localparam int unsigned LINE_W    = BUS_W * LINE_BEATS,
  localparam int unsigned WR_W      = BUS_W * WR_BEATS
) (
  input  logic                clk,
  input  logic                rst_n,
  // line fetch (read controller)
  input  logic                fetch_valid_i,
  input  logic [ADDR_W-1:0]   fetch_addr_i,
  output logic                fetch_ready_o,
  output logic                line_valid_o,
  output logic [LINE_W-1:0]   line_o,
  // write buffer issue port (write controller)
  input  logic                iss_valid_i,
  input  logic [ADDR_W-1:0]   iss_addr_i,
  input  logic [WR_W-1:0]     iss_data_i,
  input  logic [WR_W/8-1:0]   iss_strb_i,
  output logic                iss_adv_o,
  output logic                retire_o,
  `AXI_M_PORTS(m_axi, ADDR_W, BUS_W)
);

  localparam int unsigned BW = (LINE_BEATS > 1) ? $clog2(LINE_BEATS) : 1;

  // ---------------- read controller ----------------
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;
  rstate_e          rstate_q;
  logic [BW-1:0]    rbeat_q;
  logic [LINE_W-1:0] rline_q;

  assign fetch_ready_o = (rstate_q == R_IDLE);
  assign m_axi_arvalid = (rstate_q == R_ADDR);
  assign m_axi_arlen   = 8'(LINE_BEATS - 1);
  assign m_axi_arsize  = axi_size(BUS_W);
  assign m_axi_arburst = AXI_BURST_INCR;
  assign m_axi_rready  = (rstate_q == R_DATA);
  assign line_o        = rline_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate_q     <= R_IDLE;
      rbeat_q      <= '0;
      m_axi_araddr <= '0;
      line_valid_o <= 1'b0;
    end else begin
      line_valid_o <= 1'b0;
      unique case (rstate_q)
        R_IDLE: if (fetch_valid_i) begin
          m_axi_araddr <= fetch_addr_i;
          rbeat_q      <= '0;
          rstate_q     <= R_ADDR;
        end
        R_ADDR: if (m_axi_arready) rstate_q <= R_DATA;
        R_DATA: if (m_axi_rvalid) begin
          rbeat_q <= rbeat_q + 1'b1;
          if (m_axi_rlast) begin
            line_valid_o <= 1'b1;
            rstate_q     <= R_IDLE;
          end
        end
        default: rstate_q <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (rstate_q == R_DATA && m_axi_rvalid)
      rline_q[rbeat_q*BUS_W +: BUS_W] <= m_axi_rdata;

  // ---------------- write controller ----------------
  localparam int unsigned WBW = (WR_BEATS > 1) ? $clog2(WR_BEATS) : 1;
  logic            wbusy_q, aw_done_q;
  logic [WBW-1:0]  wbeat_q;
  logic            w_last_hs;

  assign m_axi_awvalid = wbusy_q && !aw_done_q;
  assign m_axi_awaddr  = iss_addr_i;
  assign m_axi_awlen   = 8'(WR_BEATS - 1);
  assign m_axi_awsize  = axi_size(BUS_W);
  assign m_axi_awburst = AXI_BURST_INCR;
  assign m_axi_wvalid  = wbusy_q;
  assign m_axi_wdata   = iss_data_i[wbeat_q*BUS_W +: BUS_W];
  assign m_axi_wstrb   = iss_strb_i[wbeat_q*(BUS_W/8) +: BUS_W/8];
  assign m_axi_wlast   = (wbeat_q == WBW'(WR_BEATS - 1));
  assign m_axi_bready  = 1'b1;
  assign retire_o      = m_axi_bvalid;

  assign w_last_hs = m_axi_wvalid && m_axi_wready && m_axi_wlast;
  // the burst is complete once its address and its last beat are both taken
  assign iss_adv_o = wbusy_q && w_last_hs && (aw_done_q || m_axi_awready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbusy_q   <= 1'b0;
      aw_done_q <= 1'b0;
      wbeat_q   <= '0;
    end else if (!wbusy_q) begin
      wbusy_q   <= iss_valid_i;
      aw_done_q <= 1'b0;
      wbeat_q   <= '0;
    end else if (iss_adv_o) begin
      wbusy_q   <= 1'b0;
      aw_done_q <= 1'b0;
      wbeat_q   <= '0;
    end else begin
      if (m_axi_awvalid && m_axi_awready) aw_done_q <= 1'b1;
      if (m_axi_wvalid && m_axi_wready && !m_axi_wlast) wbeat_q <= wbeat_q + 1'b1;
    end
  end

endmodule
