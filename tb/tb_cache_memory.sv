// Testbench of cache_memory on its own: a 2-way write-back instance (4 sets,
// 4-element lines of 32 bits, 64-bit bus, 2-entry buffer). The testbench
// plays the frontend (accept pulse and registered request) and the backend:
// line fetches are answered from a model memory after a delay, write-buffer
// entries are applied to the model memory and retired later. Random reads
// and writes are checked against a reference; hits must answer one cycle
// after acceptance; a flush must leave the model memory equal to the
// reference. Also checks that a line with a pending write-back is not
// fetched before that write has been retired.
module tb_cache_memory;
  import axi_cache_pkg::*;
  localparam int unsigned AW = 32, DW = 32, LS = 4, BW = 64, LW = LS * DW, MEMB = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req, q_we, q_flush, done, fetch_valid, fetch_ready, line_valid;
  logic iss_valid, iss_adv, retire;
  logic [AW-1:0] req_addr, q_addr, fetch_addr, iss_addr;
  logic [DW-1:0] q_wdata, rdata;
  logic [LW-1:0] line, iss_data;
  logic [LW/8-1:0] iss_strb;
  cache_stat_t stat;

  cache_memory #(.ADDR_W(AW), .DATA_W(DW), .N_WAYS(2), .WAY_SIZE(4), .LINE_SIZE(LS),
    .BUS_W(BW), .BUFFER_SIZE(2), .REP_POLICY(REP_LRU), .WR_POLICY(WP_WB)) dut (
    .clk, .rst_n, .req_i(req), .req_addr_i(req_addr), .q_we_i(q_we), .q_flush_i(q_flush),
    .q_addr_i(q_addr), .q_wdata_i(q_wdata), .done_o(done), .rdata_o(rdata), .stat_o(stat),
    .fetch_valid_o(fetch_valid), .fetch_addr_o(fetch_addr), .fetch_ready_i(fetch_ready),
    .line_valid_i(line_valid), .line_i(line),
    .iss_valid_o(iss_valid), .iss_addr_o(iss_addr), .iss_data_o(iss_data),
    .iss_strb_o(iss_strb), .iss_adv_i(iss_adv), .retire_i(retire));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] mm [MEMB];          // memory behind the backend
  logic [DW-1:0] ref_mem [MEMB / 4];

  // ---- backend stand-in ----
  int fdelay = 0;
  logic fetching = 0;
  logic [AW-1:0] faddr;
  int pend_ret [$];               // cycles left until each issued entry retires
  logic [AW-1:0] pend_addr [$];
  int n_fetch = 0, n_wb = 0, n_guard = 0;
  assign fetch_ready = !fetching;
  always @(posedge clk) begin
    line_valid <= 0;
    iss_adv    <= 0;
    retire     <= 0;
    if (rst_n) begin
      if (fetch_valid && fetch_ready) begin
        fetching <= 1; faddr = fetch_addr; fdelay = $urandom_range(2, 6); n_fetch++;
        foreach (pend_addr[k]) check(pend_addr[k] / 16 != fetch_addr / 16, "no fetch over a pending write");
      end else if (fetching) begin
        if (fdelay == 0) begin
          for (int b = 0; b < LW / 8; b++) line[b*8 +: 8] <= mm[(faddr + b) % MEMB];
          line_valid <= 1;
          fetching <= 0;
        end else fdelay--;
      end
      if (iss_valid && !iss_adv && $urandom_range(1)) begin
        for (int b = 0; b < LW / 8; b++) if (iss_strb[b]) mm[(iss_addr + b) % MEMB] = iss_data[b*8 +: 8];
        iss_adv <= 1;
        pend_ret.push_back($urandom_range(3, 12));
        pend_addr.push_back(iss_addr);
        n_wb++;
      end
      if (pend_ret.size() > 0) begin
        if (pend_ret[0] == 0) begin
          retire <= 1;
          void'(pend_ret.pop_front());
          void'(pend_addr.pop_front());
        end else pend_ret[0]--;
      end
      if (int'(dut.state_q) == 4 && dut.wb_match) n_guard++;  // 4 = S_FETCH
    end
  end

  task automatic op(input bit w, input bit f, input int unsigned e, input logic [DW-1:0] d);
    int cyc;
    bit h;
    @(negedge clk);
    req = 1; req_addr = AW'(e * 4);
    @(negedge clk);
    req = 0; q_we = w || f; q_flush = f; q_addr = AW'(e * 4); q_wdata = d;
    #1;
    cyc = 1; h = stat.hit;
    while (!done) begin @(negedge clk); cyc++; end
    check(!h || cyc == 1, "hit answered in the cycle after acceptance");
    if (!w && !f) check(rdata == ref_mem[e], $sformatf("read %0d", e));
    if (w && !f) ref_mem[e] = d;
  endtask

  initial begin
    req = 0; q_we = 0; q_flush = 0; q_addr = 0; q_wdata = 0; req_addr = 0;
    for (int e = 0; e < MEMB / 4; e++) begin
      ref_mem[e] = $urandom;
      for (int b = 0; b < 4; b++) mm[e*4 + b] = ref_mem[e][b*8 +: 8];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++)
      op($urandom_range(1), 0, $urandom_range(MEMB / 4 - 1), $urandom);
    op(1, 1, 0, 0);
    for (int e = 0; e < MEMB / 4; e++) begin
      logic [DW-1:0] m;
      for (int b = 0; b < 4; b++) m[b*8 +: 8] = mm[e*4 + b];
      if (m != ref_mem[e]) check(0, $sformatf("memory elem %0d after flush", e));
    end
    check(1, "memory equals reference after flush");
    check(n_fetch > 0 && n_wb > 0 && n_guard > 0, "fetches, write-backs and a fetch held back by a pending write happened");
    $display("fetches=%0d writebacks=%0d guarded=%0d", n_fetch, n_wb, n_guard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog state=%0d", int'(dut.state_q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
