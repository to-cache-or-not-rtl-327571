// Testbench of cache_frontend: requests are held on valid_i until ready_o
// (as the memory controller does) while a stand-in for the cache memory
// answers after a random number of cycles (1 to 5). Checks that every
// request is accepted exactly once (one req_o pulse), that the registered
// fields equal the request for the whole operation, that req_addr_o is the
// live address at acceptance, and that ready_o/rdata_o follow the answer.
module tb_cache_frontend;
  localparam int unsigned AW = 32, DW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid, we, flush, ready, req, q_we, q_flush, mem_done;
  logic [AW-1:0] addr, req_addr, q_addr;
  logic [DW-1:0] wdata, rdata, q_wdata, mem_rdata;

  cache_frontend #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk, .rst_n, .valid_i(valid), .we_i(we), .flush_i(flush), .addr_i(addr),
    .wdata_i(wdata), .ready_o(ready), .rdata_o(rdata), .req_o(req), .req_addr_o(req_addr),
    .q_we_o(q_we), .q_flush_o(q_flush), .q_addr_o(q_addr), .q_wdata_o(q_wdata),
    .mem_done_i(mem_done), .mem_rdata_i(mem_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int reqs = 0;
  always @(posedge clk) if (rst_n && req) reqs++;

  initial begin
    valid = 0; we = 0; flush = 0; addr = 0; wdata = 0; mem_done = 0; mem_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int d, r0;
      logic [DW-1:0] ans;
      @(negedge clk);
      valid = 1; we = 1'($urandom); flush = ($urandom_range(7) == 0);
      addr = $urandom; wdata = {$urandom, $urandom};
      r0 = reqs;
      #1;
      check(req && req_addr == addr, "request accepted at once with its live address");
      @(negedge clk);
      d = $urandom_range(1, 5);
      ans = {$urandom, $urandom};
      for (int k = 1; k < d; k++) begin
        check(!ready, "no ready before the answer");
        check(q_addr == addr && q_wdata == wdata && q_flush == flush && q_we == (we || flush),
              "registered request");
        @(negedge clk);
      end
      mem_done = 1; mem_rdata = ans;
      #1;
      check(ready && rdata == ans, "ready and data with the answer");
      @(negedge clk);
      mem_done = 0; valid = 0;
      check(reqs == r0 + 1, "exactly one acceptance per request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
