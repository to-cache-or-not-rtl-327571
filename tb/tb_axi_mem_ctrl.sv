// Testbench of axi_mem_ctrl in both forms, each on its own behavioural AXI
// memory: the cached controller at its default cache (8 lines of 32 64-bit
// elements, write-through) and the standard one. Same accelerator-side
// sequence on both: random writes and reads of a region larger than the
// cache, every read compared with a reference, then the end-of-computation
// size-0 write. Checks: a cached hit completes two cycles after start (start
// register, then the one-cycle hit); after the size-0 write the cached
// controller has no write outstanding and memory equals the reference; the
// standard controller takes LATENCY + 4 cycles per read and has no cache
// events.
`include "axi_ports.svh"
module tb_axi_mem_ctrl;
  import axi_cache_pkg::*;
  localparam int unsigned AW = 32, DW = 64, LAT = 10, MEMB = 8192, NEL = MEMB / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] start, we, done;
  logic [6:0] size;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata;
  logic [DW-1:0] rdata [2];
  cache_stat_t stat [2];
  `AXI_WIRES(c, AW, DW);
  `AXI_WIRES(s, AW, DW);

  axi_mem_ctrl #(.ADDR_W(AW), .DATA_W(DW), .USE_CACHE(1'b1)) dut_c (
    .clk, .rst_n, .start_i(start[0]), .we_i(we[0]), .size_i(size), .addr_i(addr),
    .wdata_i(wdata), .done_o(done[0]), .rdata_o(rdata[0]), .stat_o(stat[0]),
    `AXI_M_CONNECT(m_axi, c));
  axi_mem_ctrl #(.ADDR_W(AW), .DATA_W(DW), .USE_CACHE(1'b0)) dut_s (
    .clk, .rst_n, .start_i(start[1]), .we_i(we[1]), .size_i(size), .addr_i(addr),
    .wdata_i(wdata), .done_o(done[1]), .rdata_o(rdata[1]), .stat_o(stat[1]),
    `AXI_M_CONNECT(m_axi, s));

  axi_mem_model #(.ADDR_W(AW), .BUS_W(DW), .MEM_BYTES(MEMB), .LATENCY(LAT)) mem_c (
    .clk, .rst_n,
    .s_araddr(c_araddr), .s_arlen(c_arlen), .s_arsize(c_arsize), .s_arburst(c_arburst),
    .s_arvalid(c_arvalid), .s_arready(c_arready), .s_rdata(c_rdata), .s_rresp(c_rresp),
    .s_rlast(c_rlast), .s_rvalid(c_rvalid), .s_rready(c_rready),
    .s_awaddr(c_awaddr), .s_awlen(c_awlen), .s_awsize(c_awsize), .s_awburst(c_awburst),
    .s_awvalid(c_awvalid), .s_awready(c_awready), .s_wdata(c_wdata), .s_wstrb(c_wstrb),
    .s_wlast(c_wlast), .s_wvalid(c_wvalid), .s_wready(c_wready),
    .s_bresp(c_bresp), .s_bvalid(c_bvalid), .s_bready(c_bready));
  axi_mem_model #(.ADDR_W(AW), .BUS_W(DW), .MEM_BYTES(MEMB), .LATENCY(LAT)) mem_s (
    .clk, .rst_n,
    .s_araddr, .s_arlen, .s_arsize, .s_arburst, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .s_awaddr, .s_awlen, .s_awsize, .s_awburst, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [DW-1:0] ref_mem [NEL];
  int n_hit = 0, n_miss = 0, n_std_stat = 0;
  always @(posedge clk) begin
    n_hit  += int'(stat[0].hit);
    n_miss += int'(stat[0].miss);
    n_std_stat += int'(stat[1] != '0);
  end

  task automatic access(input int k, input bit w, input int unsigned e, input logic [DW-1:0] d,
                        input int unsigned sz);
    int cyc, h0, m0;
    h0 = n_hit; m0 = n_miss;
    @(negedge clk);
    start[k] = 1; we[k] = w; size = 7'(sz); addr = AW'(e * 8); wdata = d;
    @(negedge clk);
    start[k] = 0;
    cyc = 1;
    while (!done[k] && cyc < 10000) begin @(negedge clk); cyc++; end
    check(done[k], "access completes");
    if (!w) check(rdata[k] == ref_mem[e], $sformatf("ctrl %0d read %0d", k, e));
    @(posedge clk);   // let the event counters take this access's pulses
    #1;
    if (k == 0 && !w && n_hit != h0) check(cyc == 2, $sformatf("cached hit took %0d cycles (hits %0d, misses %0d -> %0d)", cyc, n_hit - h0, m0, n_miss));
    if (k == 1 && !w) check(cyc == LAT + 4, $sformatf("standard read took %0d cycles", cyc));
  endtask

  initial begin
    start = 0; we = 0; size = 0; addr = 0; wdata = 0;
    for (int e = 0; e < NEL; e++) begin
      ref_mem[e] = {$urandom, $urandom};
      for (int b = 0; b < 8; b++) begin
        mem_c.mem[e*8 + b] = ref_mem[e][b*8 +: 8];
        mem_s.mem[e*8 + b] = ref_mem[e][b*8 +: 8];
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      int unsigned e;
      bit w;
      logic [DW-1:0] d;
      e = (i < 300) ? (i % 128) * 2 + $urandom_range(1) : $urandom_range(NEL - 1);
      w = ($urandom_range(3) == 0);
      d = {$urandom, $urandom};
      access(0, w, e, d, 64);
      if (i % 4 == 0) access(1, w, e, d, 64);
      else if (w) begin
        // keep the second memory in step for the standard controller's reads
        for (int b = 0; b < 8; b++) mem_s.mem[e*8 + b] = d[b*8 +: 8];
      end
      if (w) ref_mem[e] = d;
    end
    access(0, 1, 0, '0, 0);
    check(mem_c.outstanding == 0, "no write outstanding after the cached flush");
    for (int e = 0; e < NEL; e++) begin
      logic [DW-1:0] m;
      for (int b = 0; b < 8; b++) m[b*8 +: 8] = mem_c.mem[e*8 + b];
      if (m != ref_mem[e]) check(0, $sformatf("cached memory elem %0d after flush", e));
    end
    check(1, "cached memory equals reference after flush");
    access(1, 1, 0, '0, 0);
    check(n_hit > 0 && n_miss > 0, "cached controller saw hits and misses");
    check(n_std_stat == 0, "standard controller reports no cache events");
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
