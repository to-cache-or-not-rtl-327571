// Testbench of cache_write_buffer: pushes, issues and retires entries in
// random interleavings against a queue model; checks FIFO order of the issue
// port, full/empty flags, that a push into a full buffer is dropped, and that
// the address match sees an entry from its push until its retirement
// (including issued, unretired entries), comparing above the line offset.
module tb_cache_write_buffer;
  localparam int unsigned D = 4, AW = 32, DW = 64, LSB = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push, full, empty, iss_valid, iss_adv, retire, match;
  logic [AW-1:0] push_addr, iss_addr, match_addr;
  logic [DW-1:0] push_data, iss_data;
  logic [DW/8-1:0] push_strb, iss_strb;

  cache_write_buffer #(.DEPTH(D), .ADDR_W(AW), .DATA_W(DW), .MATCH_LSB(LSB)) dut (
    .clk, .rst_n, .push_i(push), .push_addr_i(push_addr), .push_data_i(push_data),
    .push_strb_i(push_strb), .full_o(full), .empty_o(empty), .iss_valid_o(iss_valid),
    .iss_addr_o(iss_addr), .iss_data_o(iss_data), .iss_strb_o(iss_strb),
    .iss_adv_i(iss_adv), .retire_i(retire), .match_addr_i(match_addr), .match_o(match));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [AW-1:0] a; logic [DW-1:0] d; logic [DW/8-1:0] s; } ent_t;
  ent_t unissued [$];
  ent_t inflight [$];
  int n_full = 0, n_drop = 0, n_match = 0;

  initial begin
    push = 0; iss_adv = 0; retire = 0; push_addr = 0; push_data = 0; push_strb = 0; match_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      int unsigned occ;
      bit exp_match;
      occ = unissued.size() + inflight.size();
      exp_match = 0;
      // compare the outputs against the model before this cycle's actions
      check(empty == (occ == 0), $sformatf("empty flag i=%0d occ=%0d cnt=%0d", i, occ, dut.count_q));
      check(full == (occ == D), "full flag");
      check(iss_valid == (unissued.size() > 0), "issue valid");
      if (unissued.size() > 0)
        check(iss_addr == unissued[0].a && iss_data == unissued[0].d && iss_strb == unissued[0].s,
              "issue port shows the oldest unissued entry");
      match_addr = {$urandom_range(7), 5'($urandom)};
      foreach (unissued[k]) if (unissued[k].a[AW-1:LSB] == match_addr[AW-1:LSB]) exp_match = 1;
      foreach (inflight[k]) if (inflight[k].a[AW-1:LSB] == match_addr[AW-1:LSB]) exp_match = 1;
      #1;
      check(match == exp_match, "address match over pending entries");
      if (exp_match) n_match++;
      if (full) n_full++;
      // random actions
      push      = ($urandom_range(2) != 0);
      push_addr = {$urandom_range(7), 5'($urandom)};
      push_data = {$urandom, $urandom};
      push_strb = 8'($urandom);
      iss_adv   = iss_valid && ($urandom_range(1) == 1);
      retire    = (inflight.size() > 0) && ($urandom_range(2) == 0);
      @(negedge clk);
      if (retire) void'(inflight.pop_front());
      if (iss_adv) inflight.push_back(unissued.pop_front());
      if (push) begin
        if (occ < D) unissued.push_back('{push_addr, push_data, push_strb});
        else n_drop++;
      end
      push = 0; iss_adv = 0; retire = 0;
    end
    check(n_full > 0 && n_drop > 0 && n_match > 0, "full, dropped push and match all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
