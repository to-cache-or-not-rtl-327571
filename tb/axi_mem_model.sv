// Behavioural AXI4 slave memory for testbenches (not synthesizable intent).
//
// Byte-addressed array of MEM_BYTES bytes (addresses wrap). Reads: an AR is
// accepted when no read is in progress; after LATENCY cycles the beats of the
// INCR burst are returned one per cycle, rlast on the last. Writes: AW and W
// are accepted independently; each completed burst gets its B response
// LATENCY cycles after its last W beat, responses in order, so several writes
// can be outstanding. Counts handshakes and the largest number of writes
// outstanding at once. The testbench reads and writes mem[] directly.
`include "axi_ports.svh"
module axi_mem_model #(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned BUS_W     = 64,
  parameter int unsigned MEM_BYTES = 65536,
  parameter int unsigned LATENCY   = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic [2:0]        s_arsize,
  input  logic [1:0]        s_arburst,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [BUS_W-1:0]  s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rlast,
  output logic              s_rvalid,
  input  logic              s_rready,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic [7:0]        s_awlen,
  input  logic [2:0]        s_awsize,
  input  logic [1:0]        s_awburst,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [BUS_W-1:0]  s_wdata,
  input  logic [BUS_W/8-1:0] s_wstrb,
  input  logic              s_wlast,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready
);
  localparam int unsigned NB = BUS_W / 8;

  logic [7:0] mem [MEM_BYTES];
  int unsigned ar_hs, r_hs, aw_hs, w_hs, b_hs, max_outstanding, outstanding;

  // read side
  logic        rbusy;
  int unsigned rcnt, rwait, raddr, rlen;
  // write side
  int unsigned awq [$];
  int unsigned bq  [$];   // cycle at which each B may be sent
  int unsigned cycle;
  int unsigned wbeat;
  logic        wburst_open;
  int unsigned waddr;

  assign s_arready = rst_n && !rbusy;
  assign s_awready = rst_n;
  assign s_wready  = rst_n;
  assign s_rresp   = 2'b00;
  assign s_bresp   = 2'b00;

  initial begin
    for (int i = 0; i < MEM_BYTES; i++) mem[i] = 8'h00;
    ar_hs = 0; r_hs = 0; aw_hs = 0; w_hs = 0; b_hs = 0;
    max_outstanding = 0; outstanding = 0;
    rbusy = 0; s_rvalid = 0; s_rlast = 0; s_rdata = '0; s_bvalid = 0;
    cycle = 0; wbeat = 0; wburst_open = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      rbusy <= 0; s_rvalid <= 0; s_bvalid <= 0;
    end else begin
      // ---- read ----
      if (s_arvalid && s_arready) begin
        ar_hs++;
        rbusy = 1; raddr = s_araddr; rlen = s_arlen + 1; rcnt = 0; rwait = LATENCY;
      end else if (rbusy) begin
        if (s_rvalid && s_rready) begin
          r_hs++;
          rcnt++;
          raddr += NB;
        end
        if (rcnt == rlen) begin
          rbusy = 0; s_rvalid <= 0;
        end else if (rwait > 0) begin
          rwait--;
          s_rvalid <= 0;
        end else begin
          logic [BUS_W-1:0] d;
          for (int i = 0; i < NB; i++) d[i*8 +: 8] = mem[(raddr & ~(NB-1)) % MEM_BYTES + i];
          s_rdata  <= d;
          s_rvalid <= 1;
          s_rlast  <= (rcnt == rlen - 1);
        end
      end
      // ---- write ----
      if (s_awvalid && s_awready) begin
        aw_hs++;
        awq.push_back(s_awaddr);
      end
      if (s_wvalid && s_wready) begin
        w_hs++;
        if (!wburst_open) begin
          if (awq.size() > 0) waddr = awq.pop_front();
          else $error("axi_mem_model: W beat without address");
          wburst_open = 1;
          wbeat = 0;
        end
        for (int i = 0; i < NB; i++)
          if (s_wstrb[i]) mem[((waddr & ~(NB-1)) + wbeat*NB + i) % MEM_BYTES] = s_wdata[i*8 +: 8];
        wbeat++;
        if (s_wlast) begin
          wburst_open = 0;
          bq.push_back(cycle + LATENCY);
          outstanding++;
          if (outstanding > max_outstanding) max_outstanding = outstanding;
        end
      end
      if (s_bvalid && s_bready) begin
        b_hs++;
        outstanding--;
        s_bvalid <= 0;
        void'(bq.pop_front());
      end else if (!s_bvalid && bq.size() > 0 && bq[0] <= cycle) begin
        s_bvalid <= 1;
      end
    end
  end
endmodule
