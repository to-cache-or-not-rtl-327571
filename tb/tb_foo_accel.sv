// Testbench of foo_accel with stand-in memory controllers that answer each
// start after a fixed delay DLY from tb arrays. For random pointers and
// indices it checks: the addresses (pointer + index * 8), the order of the
// operations (load a, then load b, then store c), the stored value
// a[index] + b[index], that each wait state lasts until its done, that the
// flush (size-0 write) goes to all three ports after the store, that done
// comes only once every port has answered the flush (the ports answer it
// after DLY, DLY + 2 and DLY + 4 cycles), and the call's length: one cycle
// to S_0, DLY + 3 from each issuing state to the next (start register,
// stand-in accept, DLY, done register, wait state), S_6 and S_FLUSH, the
// slowest flush answer DLY + 4, and two cycles to register it and done.
module tb_foo_accel;
  localparam int unsigned AW = 32, DW = 64, DLY = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  logic [AW-1:0] a_p, b_p, c_p, index;
  logic [2:0] m_start, m_we, m_done;
  logic [2:0][6:0] m_size;
  logic [2:0][AW-1:0] m_addr;
  logic [2:0][DW-1:0] m_wdata, m_rdata;

  foo_accel #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk, .rst_n, .start_i(start), .a_i(a_p), .b_i(b_p), .c_i(c_p), .index_i(index),
    .done_o(done), .m_start_o(m_start), .m_we_o(m_we), .m_size_o(m_size),
    .m_addr_o(m_addr), .m_wdata_o(m_wdata), .m_done_i(m_done), .m_rdata_i(m_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // per-port stand-in: done DLY cycles after start (flush answers staggered)
  logic [DW-1:0] va, vb;
  string log_s;
  int cnt [3];
  logic [2:0] busy;
  always @(posedge clk) begin
    m_done <= '0;
    for (int p = 0; p < 3 && rst_n; p++) begin
      if (m_start[p]) begin
        busy[p] <= 1;
        cnt[p]  <= (m_size[p] == 0) ? DLY + 2 * p : DLY;
        log_s = {log_s, $sformatf("%0d", p), m_we[p] ? "w" : "r"};
        if (m_size[p] == 0) log_s = {log_s, "0"};
        log_s = {log_s, " "};
        if (m_size[p] != 0) begin
          if (p == 0) check(m_addr[p] == a_p + index * 8 && !m_we[p], "load a address");
          if (p == 1) check(m_addr[p] == b_p + index * 8 && !m_we[p], $sformatf("load b address %h %h %h", m_addr[p], b_p, index));
          if (p == 2) check(m_addr[p] == c_p + index * 8 && m_we[p] && m_wdata[p] == va + vb,
                            "store c address and value");
        end
      end else if (busy[p]) begin
        if (cnt[p] <= 1) begin
          busy[p]    <= 0;
          m_done[p]  <= 1;
          m_rdata[p] <= (p == 0) ? va : (p == 1) ? vb : {$urandom, $urandom};
        end else cnt[p] <= cnt[p] - 1;
      end
    end
  end

  initial begin
    start = 0; a_p = 0; b_p = 0; c_p = 0; index = 0; busy = 0; m_done = 0; m_rdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      int cyc;
      va = {$urandom, $urandom}; vb = {$urandom, $urandom};
      a_p = $urandom & ~32'h7; b_p = $urandom & ~32'h7; c_p = $urandom & ~32'h7;
      index = $urandom_range(4095);
      log_s = "";
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
        if (done && busy != 3'b000) check(0, "done while a port is still busy");
      end
      check(log_s == "0r 1r 2w 0w0 1w0 2w0 ", {"operation order: ", log_s});
      // each op: issue cycle, start register, DLY, done register; flush waits for port 2
      check(cyc == 1 + 3 * (DLY + 3) + 2 + (DLY + 4) + 2,
            $sformatf("call length %0d", cyc));
    end
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
