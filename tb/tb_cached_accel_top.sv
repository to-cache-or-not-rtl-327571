// End-to-end testbench of cached_accel_top at its default parameters.
// Three behavioural AXI memories hold a[], b[] and c[]. The accelerator is
// called for a run of consecutive indices (line reuse: hits in both caches),
// for indices that map to the same sets (conflict misses and replacement in
// the 2-way cache of port gmem1, lines of gmem0 replaced), and for random
// indices. After every call c[index] must equal a[index] + b[index] in the
// memory behind gmem2. Required to have happened at least once: hits and
// misses on both caches, a flush on both caches, a line replaced in each
// cache, and a call served entirely from the caches being faster than one
// that misses in both. At the end the performance counters are read through
// the register port and compared with the memory models' handshake counts,
// the bench's own hit/miss/flush tallies, the request count (three
// operations and a flush per port per call, stores and flush on gmem2) and
// the call cycles measured by the bench.
`include "axi_ports.svh"
module tb_cached_accel_top;
  import axi_cache_pkg::*;
  localparam int unsigned AW = 32, DW = 64, MEMB = 65536, LAT = 17;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  logic [AW-1:0] a_p, b_p, c_p, index;
  cache_stat_t st0, st1;
  logic mclr;
  logic [4:0] maddr;
  logic [31:0] mdata;
  `AXI_WIRES(m0, AW, DW);
  `AXI_WIRES(m1, AW, DW);
  `AXI_WIRES(m2, AW, DW);

  cached_accel_top dut (
    .clk, .rst_n, .start_i(start), .a_i(a_p), .b_i(b_p), .c_i(c_p), .index_i(index),
    .done_o(done), .stat0_o(st0), .stat1_o(st1),
    .mreg_clear_i(mclr), .mreg_addr_i(maddr), .mreg_data_o(mdata),
    `AXI_M_CONNECT(m0, m0), `AXI_M_CONNECT(m1, m1), `AXI_M_CONNECT(m2, m2));

  axi_mem_model #(.ADDR_W(AW), .BUS_W(DW), .MEM_BYTES(MEMB), .LATENCY(LAT)) mem0 (
    .clk, .rst_n,
    .s_araddr(m0_araddr), .s_arlen(m0_arlen), .s_arsize(m0_arsize), .s_arburst(m0_arburst),
    .s_arvalid(m0_arvalid), .s_arready(m0_arready), .s_rdata(m0_rdata), .s_rresp(m0_rresp),
    .s_rlast(m0_rlast), .s_rvalid(m0_rvalid), .s_rready(m0_rready),
    .s_awaddr(m0_awaddr), .s_awlen(m0_awlen), .s_awsize(m0_awsize), .s_awburst(m0_awburst),
    .s_awvalid(m0_awvalid), .s_awready(m0_awready), .s_wdata(m0_wdata), .s_wstrb(m0_wstrb),
    .s_wlast(m0_wlast), .s_wvalid(m0_wvalid), .s_wready(m0_wready),
    .s_bresp(m0_bresp), .s_bvalid(m0_bvalid), .s_bready(m0_bready));
  axi_mem_model #(.ADDR_W(AW), .BUS_W(DW), .MEM_BYTES(MEMB), .LATENCY(LAT)) mem1 (
    .clk, .rst_n,
    .s_araddr(m1_araddr), .s_arlen(m1_arlen), .s_arsize(m1_arsize), .s_arburst(m1_arburst),
    .s_arvalid(m1_arvalid), .s_arready(m1_arready), .s_rdata(m1_rdata), .s_rresp(m1_rresp),
    .s_rlast(m1_rlast), .s_rvalid(m1_rvalid), .s_rready(m1_rready),
    .s_awaddr(m1_awaddr), .s_awlen(m1_awlen), .s_awsize(m1_awsize), .s_awburst(m1_awburst),
    .s_awvalid(m1_awvalid), .s_awready(m1_awready), .s_wdata(m1_wdata), .s_wstrb(m1_wstrb),
    .s_wlast(m1_wlast), .s_wvalid(m1_wvalid), .s_wready(m1_wready),
    .s_bresp(m1_bresp), .s_bvalid(m1_bvalid), .s_bready(m1_bready));
  axi_mem_model #(.ADDR_W(AW), .BUS_W(DW), .MEM_BYTES(MEMB), .LATENCY(LAT)) mem2 (
    .clk, .rst_n,
    .s_araddr(m2_araddr), .s_arlen(m2_arlen), .s_arsize(m2_arsize), .s_arburst(m2_arburst),
    .s_arvalid(m2_arvalid), .s_arready(m2_arready), .s_rdata(m2_rdata), .s_rresp(m2_rresp),
    .s_rlast(m2_rlast), .s_rvalid(m2_rvalid), .s_rready(m2_rready),
    .s_awaddr(m2_awaddr), .s_awlen(m2_awlen), .s_awsize(m2_awsize), .s_awburst(m2_awburst),
    .s_awvalid(m2_awvalid), .s_awready(m2_awready), .s_wdata(m2_wdata), .s_wstrb(m2_wstrb),
    .s_wlast(m2_wlast), .s_wvalid(m2_wvalid), .s_wready(m2_wready),
    .s_bresp(m2_bresp), .s_bvalid(m2_bvalid), .s_bready(m2_bready));

  localparam int unsigned NEL = MEMB / 8;
  int hit0 = 0, miss0 = 0, hit1 = 0, miss1 = 0, fl0 = 0, fl1 = 0;
  always @(posedge clk) if (rst_n) begin
    hit0 += int'(st0.hit);  miss0 += int'(st0.miss); fl0 += int'(st0.flush);
    hit1 += int'(st1.hit);  miss1 += int'(st1.miss); fl1 += int'(st1.flush);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DW-1:0] rd(input int which, input int unsigned e);
    logic [DW-1:0] v;
    for (int b = 0; b < 8; b++)
      v[b*8 +: 8] = (which == 0) ? mem0.mem[e*8+b] : (which == 1) ? mem1.mem[e*8+b] : mem2.mem[e*8+b];
    return v;
  endfunction

  int calls = 0, fast_cyc = -1, slow_cyc = -1, call_cyc = 0;
  int full0 = 0, full1 = 0, stall0 = 0, stall1 = 0;
  always @(posedge clk) if (rst_n) begin
    full0 += int'(st0.buf_full); stall0 += int'(st0.buf_stall);
    full1 += int'(st1.buf_full); stall1 += int'(st1.buf_stall);
  end

  task automatic mreg(input int port, input int r, output int v);
    @(negedge clk);
    maddr = 5'(port * 8 + r);
    @(negedge clk);
    v = int'(mdata);
  endtask
  task automatic call(input int unsigned e);
    int cyc = 0;
    int h0 = hit0, h1 = hit1, ms0 = miss0, ms1 = miss1;
    @(negedge clk);
    start = 1; index = AW'(e);
    @(negedge clk);
    start = 0;
    while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    calls++;
    call_cyc += cyc;
    check(done || cyc < 10000, "call completes");
    check(rd(2, e) == rd(0, e) + rd(1, e), $sformatf("c[%0d] = a + b", e));
    if (hit0 == h0 + 1 && hit1 == h1 + 1 && miss0 == ms0 && miss1 == ms1) begin
      if (fast_cyc < 0) fast_cyc = cyc;
      check(cyc == fast_cyc, "calls served from both caches all take the same time");
    end
    if (miss0 == ms0 + 1 && miss1 == ms1 + 1 && slow_cyc < 0) slow_cyc = cyc;
  endtask

  int ar0_first;
  initial begin
    start = 0; a_p = 0; b_p = 0; c_p = 0; index = 0; mclr = 0; maddr = 0;
    for (int e = 0; e < NEL; e++) begin
      logic [DW-1:0] va, vb;
      va = {$urandom, $urandom};
      vb = {$urandom, $urandom};
      for (int b = 0; b < 8; b++) begin
        mem0.mem[e*8+b] = va[b*8 +: 8];
        mem1.mem[e*8+b] = vb[b*8 +: 8];
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // consecutive indices: one miss per line, then hits
    for (int e = 0; e < 80; e++) call(e);
    check(mem0.ar_hs == 3, "gmem0 fetched 80 elements in three 32-element lines");
    check(mem1.ar_hs == 10, "gmem1 fetched 80 elements in ten 8-element lines");
    check(mem0.r_hs == 3 * 32 && mem1.r_hs == 10 * 8, "whole lines read in bursts");
    check(mem2.aw_hs == 80 && mem2.ar_hs == 0, "one standard write per call on gmem2");
    // indices 2 KiB apart share a set in gmem1 (and in gmem0)
    ar0_first = mem1.ar_hs;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++) call(1000 + k * 256);
    check(mem1.ar_hs - ar0_first == 9, "three lines in one 2-way set: every access misses (LRU)");
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 2; k++) call(3000 + k * 256);
    // random indices
    for (int i = 0; i < 60; i++) call($urandom_range(NEL - 1));
    $display("calls=%0d gmem0 hit/miss=%0d/%0d gmem1 hit/miss=%0d/%0d flush=%0d/%0d fast=%0d slow=%0d",
             calls, hit0, miss0, hit1, miss1, fl0, fl1, fast_cyc, slow_cyc);
    check(hit0 > 0 && miss0 > 0 && hit1 > 0 && miss1 > 0, "hits and misses on both caches");
    check(fl0 == calls && fl1 == calls, "every call ends with a flush of both caches");
    check(fast_cyc > 0 && slow_cyc > fast_cyc, "a call served from the caches is faster");
    begin
      int v, hs;
      int exp_hit [3], exp_miss [3], exp_full [3], exp_stall [3], exp_fl [3], exp_req [3];
      exp_hit = '{hit0, hit1, 0};   exp_miss = '{miss0, miss1, 0};
      exp_full = '{full0, full1, 0}; exp_stall = '{stall0, stall1, 0};
      exp_fl = '{fl0, fl1, 0};       exp_req = '{2 * calls, 2 * calls, 2 * calls};
      for (int p = 0; p < 3; p++) begin
        hs = (p == 0) ? mem0.ar_hs + mem0.r_hs + mem0.aw_hs + mem0.w_hs + mem0.b_hs
           : (p == 1) ? mem1.ar_hs + mem1.r_hs + mem1.aw_hs + mem1.w_hs + mem1.b_hs
           :            mem2.ar_hs + mem2.r_hs + mem2.aw_hs + mem2.w_hs + mem2.b_hs;
        mreg(p, 0, v); check(v == hs, $sformatf("port %0d handshakes %0d, memory saw %0d", p, v, hs));
        mreg(p, 1, v); check(v == exp_hit[p], $sformatf("port %0d hits %0d/%0d", p, v, exp_hit[p]));
        mreg(p, 2, v); check(v == exp_miss[p], $sformatf("port %0d misses %0d/%0d", p, v, exp_miss[p]));
        mreg(p, 3, v); check(v == exp_full[p], $sformatf("port %0d full cycles %0d/%0d", p, v, exp_full[p]));
        mreg(p, 4, v); check(v == exp_stall[p], $sformatf("port %0d stall cycles %0d/%0d", p, v, exp_stall[p]));
        mreg(p, 5, v); check(v == exp_req[p], $sformatf("port %0d requests %0d/%0d", p, v, exp_req[p]));
        mreg(p, 6, v); check(v >= 2 * exp_req[p], $sformatf("port %0d request cycles %0d", p, v));
        mreg(p, 7, v); check(v == exp_fl[p], $sformatf("port %0d flushes %0d/%0d", p, v, exp_fl[p]));
      end
      // the counter includes the cycle after start_i, which the bench's own
      // per-call count does not
      mreg(3, 0, v); check(v == call_cyc + calls, $sformatf("call cycles %0d, bench counted %0d + %0d calls", v, call_cyc, calls));
      @(negedge clk); mclr = 1;
      @(negedge clk); mclr = 0;
      mreg(0, 0, v); check(v == 0, "counters cleared");
      $display("metrics: full cycles %0d/%0d, stall cycles %0d/%0d", full0, full1, stall0, stall1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
