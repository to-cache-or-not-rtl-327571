`include "axi_ports.svh"
// Standard AXI memory controller: one accelerator memory operation becomes
// one single-beat AXI transaction.
//
// A three-state machine, IDLE / W_READ / W_WRITE. In IDLE it waits for a
// start pulse. A read drives AR and moves to W_READ; a write drives AW and W
// together and moves to W_WRITE. In the wait state each address/data valid is
// dropped after its handshake, and the controller stays until the last read
// beat (rlast) or the write response (bvalid) arrives, then pulses done and
// returns to IDLE. Only one transaction is ever in flight, so every access
// pays the full memory latency.
//
// Accelerator side: start_i (1-cycle pulse) with we_i, size_i (bits),
// addr_i (byte address) and wdata_i; done_o pulses for one cycle, with
// rdata_o valid in that cycle for reads. AXI side: single-beat INCR bursts of
// DATA_W bits, ID 0.
//
// The state names and transitions follow the published state diagram of this
// controller. A write of size 0 is the end-of-computation flush marker used by
// cached controllers; this controller has nothing to flush and answers it
// with done in the next cycle without any bus traffic (a design choice).
module std_axi_ctrl
  import axi_cache_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start_i,
  input  logic                       we_i,
  input  logic [$clog2(DATA_W):0]    size_i,
  input  logic [ADDR_W-1:0]          addr_i,
  input  logic [DATA_W-1:0]          wdata_i,
  output logic                       done_o,
  output logic [DATA_W-1:0]          rdata_o,
  `AXI_M_PORTS(m_axi, ADDR_W, DATA_W)
);

  typedef enum logic [1:0] {IDLE, W_READ, W_WRITE, W_NOP} state_e;
  state_e state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= IDLE;
      m_axi_arvalid <= 1'b0;
      m_axi_awvalid <= 1'b0;
      m_axi_wvalid  <= 1'b0;
      m_axi_araddr  <= '0;
      m_axi_awaddr  <= '0;
      m_axi_wdata   <= '0;
      m_axi_wstrb   <= '0;
      done_o     <= 1'b0;
      rdata_o    <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        IDLE: if (start_i) begin
          if (!we_i) begin
            m_axi_araddr  <= addr_i;
            m_axi_arvalid <= 1'b1;
            state_q       <= W_READ;
          end else if (size_i == '0) begin
            state_q <= W_NOP;
          end else begin
            m_axi_awaddr  <= addr_i;
            m_axi_awvalid <= 1'b1;
            m_axi_wdata   <= wdata_i;
            m_axi_wstrb   <= '1;
            m_axi_wvalid  <= 1'b1;
            state_q       <= W_WRITE;
          end
        end
        W_READ: begin
          if (m_axi_arready) m_axi_arvalid <= 1'b0;
          if (m_axi_rvalid && m_axi_rlast) begin
            rdata_o <= m_axi_rdata;
            done_o  <= 1'b1;
            state_q <= IDLE;
          end
        end
        W_WRITE: begin
          if (m_axi_awready) m_axi_awvalid <= 1'b0;
          if (m_axi_wready)  m_axi_wvalid  <= 1'b0;
          if (m_axi_bvalid) begin
            done_o  <= 1'b1;
            state_q <= IDLE;
          end
        end
        W_NOP: begin
          done_o  <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign m_axi_arlen   = 8'd0;
  assign m_axi_awlen   = 8'd0;
  assign m_axi_arsize  = axi_size(DATA_W);
  assign m_axi_awsize  = axi_size(DATA_W);
  assign m_axi_arburst = AXI_BURST_INCR;
  assign m_axi_awburst = AXI_BURST_INCR;
  assign m_axi_wlast   = 1'b1;
  assign m_axi_rready  = (state_q == W_READ);
  assign m_axi_bready  = (state_q == W_WRITE);

  // A response may only arrive for a request that was issued.
  a_no_stray_r: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_rvalid |-> state_q == W_READ);

endmodule
