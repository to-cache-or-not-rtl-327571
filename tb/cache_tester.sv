// Random-traffic harness for one axi_cache configuration (used by the cache
// testbenches). Drives N_OPS random element reads and writes over a region
// of REGION_BYTES (a few times the cache capacity, so lines conflict and are
// evicted), compares every read with a reference copy of memory kept here,
// checks that every hit is answered one cycle after the request, then
// flushes and compares the whole AXI memory with the reference. Counts the
// cache events and bus behaviour it saw; reports checks/failures and sets
// finished when done.
`include "axi_ports.svh"
module cache_tester
  import axi_cache_pkg::*;
#(
  parameter int unsigned   DATA_W       = 32,
  parameter int unsigned   N_WAYS       = 1,
  parameter int unsigned   WAY_SIZE     = 4,
  parameter int unsigned   LINE_SIZE    = 4,
  parameter int unsigned   BUS_W        = 32,
  parameter int unsigned   BUFFER_SIZE  = 2,
  parameter rep_policy_e   REP_POLICY   = REP_LRU,
  parameter write_policy_e WR_POLICY    = WP_WT,
  parameter int unsigned   REGION_BYTES = 1024,
  parameter int unsigned   N_OPS        = 2000,
  parameter int unsigned   LATENCY      = 8,
  parameter int unsigned   SEED         = 1,
  // 0: random traffic; 1: radix-2 FFT on 1024 complex 32-bit values
  // (re[] then im[]); 2: Gram-Schmidt on three 32 x 32 32-bit matrices
  // (A, Q, R); 3: one sequential pass over a training set with a few writes
  // (digit recognition). N_OPS only applies to the random traffic.
  parameter int unsigned   TRACE        = 0,
  // idle cycles after every request (stands in for the kernel's arithmetic)
  parameter int unsigned   GAP          = 0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished,
  output int   n_hit,
  output int   n_miss,
  output int   n_stall,
  output int   n_flush,
  output int   max_outstanding,
  output int   aw_count
);
  localparam int unsigned AW = 32;
  localparam int unsigned EB = DATA_W / 8;
  localparam int unsigned NELEM = REGION_BYTES / EB;

  logic valid, we, flush, ready;
  logic [AW-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  cache_stat_t stat;
  `AXI_WIRES(s, AW, BUS_W);

  axi_cache #(
    .ADDR_W(AW), .DATA_W(DATA_W), .N_WAYS(N_WAYS), .WAY_SIZE(WAY_SIZE),
    .LINE_SIZE(LINE_SIZE), .BUS_W(BUS_W), .BUFFER_SIZE(BUFFER_SIZE),
    .REP_POLICY(REP_POLICY), .WR_POLICY(WR_POLICY)
  ) dut (
    .clk, .rst_n, .valid_i(valid), .we_i(we), .flush_i(flush), .addr_i(addr),
    .wdata_i(wdata), .ready_o(ready), .rdata_o(rdata), .stat_o(stat),
    `AXI_M_CONNECT(m_axi, s)
  );

  axi_mem_model #(.ADDR_W(AW), .BUS_W(BUS_W), .MEM_BYTES(REGION_BYTES), .LATENCY(LATENCY)) mem (
    .clk, .rst_n,
    .s_araddr, .s_arlen, .s_arsize, .s_arburst, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .s_awaddr, .s_awlen, .s_awsize, .s_awburst, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready);

  logic [DATA_W-1:0] ref_mem [NELEM];
  int n_rmiss = 0;   // reads not answered as hits (read by the workload bench)

  always @(posedge clk) if (rst_n) begin
    if (stat.hit)   n_hit++;
    if (stat.miss)  n_miss++;
    if (stat.buf_stall) n_stall++;
    if (stat.flush) n_flush++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [cache %0d]: %s", SEED, what); end
  endtask

  task automatic op(input bit w, input bit f, input int unsigned e, input logic [DATA_W-1:0] d);
    int cyc;
    bit was_hit;
    @(negedge clk);
    valid = 1; we = w; flush = f; addr = AW'(e * EB); wdata = d;
    cyc = 0; was_hit = 0;
    do begin
      @(negedge clk);
      cyc++;
      if (stat.hit) was_hit = 1;
    end while (!ready && cyc < 100000);
    valid = 0;
    check(ready, "request completes");
    if (!w && !f)
      check(rdata == ref_mem[e], $sformatf("read elem %0d: got %h expected %h", e, rdata, ref_mem[e]));
    if (was_hit) check(cyc == 1, $sformatf("hit answered after %0d cycles", cyc));
    if (w && !f) ref_mem[e] = d;
    if (!w && !f && !was_hit) n_rmiss++;
    repeat (GAP) @(negedge clk);
  endtask

  function automatic logic [DATA_W-1:0] rnd();
    return DATA_W'({$urandom, $urandom});
  endfunction

  // bit-reversal permutation, then log2(N) butterfly stages with a growing
  // span: each butterfly reads and writes re/im of both of its points
  task automatic fft_trace();
    localparam int N = 1024;
    for (int i = 0; i < N; i++) begin
      int j = 0;
      for (int b = 0; b < 10; b++) j |= ((i >> b) & 1) << (9 - b);
      if (i < j) begin
        op(0, 0, i, '0); op(0, 0, N + i, '0); op(0, 0, j, '0); op(0, 0, N + j, '0);
        op(1, 0, i, rnd()); op(1, 0, N + i, rnd()); op(1, 0, j, rnd()); op(1, 0, N + j, rnd());
      end
    end
    for (int span = 1; span < N; span *= 2)
      for (int g = 0; g < N; g += 2 * span)
        for (int k = 0; k < span; k++) begin
          int i = g + k, j = g + k + span;
          op(0, 0, i, '0); op(0, 0, N + i, '0); op(0, 0, j, '0); op(0, 0, N + j, '0);
          op(1, 0, i, rnd()); op(1, 0, N + i, rnd()); op(1, 0, j, rnd()); op(1, 0, N + j, rnd());
        end
  endtask

  // modified Gram-Schmidt, A at element 0, Q at 1024, R at 2048 (row major);
  // the dot products are kept in a register, and each R[k][j] is read back
  // once after it is written
  task automatic gs_trace();
    localparam int N = 32, A = 0, Q = 1024, R = 2048;
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < N; i++) op(0, 0, A + i * N + k, '0);
      op(1, 0, R + k * N + k, rnd());
      op(0, 0, R + k * N + k, '0);
      for (int i = 0; i < N; i++) begin
        op(0, 0, A + i * N + k, '0);
        op(1, 0, Q + i * N + k, rnd());
      end
      for (int j = k + 1; j < N; j++) begin
        for (int i = 0; i < N; i++) begin
          op(0, 0, Q + i * N + k, '0);
          op(0, 0, A + i * N + j, '0);
        end
        op(1, 0, R + k * N + j, rnd());
        op(0, 0, R + k * N + j, '0);
        for (int i = 0; i < N; i++) begin
          op(0, 0, A + i * N + j, '0);
          op(1, 0, A + i * N + j, rnd());
        end
      end
    end
  endtask

  // read every element of the region once in order; record a result for
  // every 1024 elements in the last 64 elements
  task automatic digitrec_trace();
    for (int e = 0; e < NELEM - 64; e++) begin
      op(0, 0, e, '0);
      if (e % 1024 == 1023) op(1, 0, NELEM - 64 + (e / 1024) % 64, rnd());
    end
  endtask

  initial begin
    void'($urandom(SEED));
    checks = 0; failures = 0; finished = 0;
    n_hit = 0; n_miss = 0; n_stall = 0; n_flush = 0;
    valid = 0; we = 0; flush = 0; addr = 0; wdata = 0;
    for (int e = 0; e < NELEM; e++) begin
      ref_mem[e] = DATA_W'({$urandom, $urandom});
      for (int b = 0; b < EB; b++) mem.mem[e * EB + b] = ref_mem[e][b*8 +: 8];
    end
    @(posedge rst_n);
    if (TRACE == 1) fft_trace();
    else if (TRACE == 2) gs_trace();
    else if (TRACE == 3) digitrec_trace();
    else for (int i = 0; i < N_OPS; i++) begin
      int unsigned e;
      // mostly local accesses inside a moving window, some anywhere
      if ($urandom_range(3) != 0) e = ((i / 8) * 3 + $urandom_range(15)) % NELEM;
      else                        e = $urandom_range(NELEM - 1);
      op($urandom_range(2) == 0, 0, e, DATA_W'({$urandom, $urandom}));
      if (i == N_OPS / 2) op(1, 1, 0, '0);   // a flush in the middle as well
    end
    if (TRACE != 0) op(1, 1, 0, '0);       // keeps the flush count at two
    op(1, 1, 0, '0);
    for (int e = 0; e < NELEM; e++) begin
      logic [DATA_W-1:0] m;
      for (int b = 0; b < EB; b++) m[b*8 +: 8] = mem.mem[e * EB + b];
      if (m != ref_mem[e]) check(0, $sformatf("memory elem %0d after flush: %h vs %h", e, m, ref_mem[e]));
    end
    check(1, "memory matches reference after flush");
    check(mem.outstanding == 0, "no write outstanding after flush");
    repeat (2) @(negedge clk);
    max_outstanding = mem.max_outstanding;
    aw_count = mem.aw_hs;
    finished = 1;
  end
endmodule
