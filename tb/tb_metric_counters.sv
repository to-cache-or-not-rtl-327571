// Testbench of metric_counters: random event pulses, handshake counts and
// request start/done sequences on three ports drive the counters while the
// bench keeps its own tallies; the registers are then read back through the
// read port (one-cycle read latency) and compared. It also checks that
// clear_i zeroes everything, that unused addresses read 0, and that a
// request answered two cycles after its start adds exactly 2 to the
// duration counter.
module tb_metric_counters;
  import axi_cache_pkg::*;
  localparam int unsigned NP = 3, CW = 32, RA = $clog2(NP + 1) + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, run;
  logic [NP-1:0][2:0] hs;
  cache_stat_t [NP-1:0] st;
  logic [NP-1:0] rs, rdn;
  logic [RA-1:0] ra;
  logic [CW-1:0] rdata;

  metric_counters #(.N_PORTS(NP), .CNT_W(CW)) dut (
    .clk, .rst_n, .clear_i(clear), .run_i(run), .hs_i(hs), .stat_i(st),
    .req_start_i(rs), .req_done_i(rdn), .rd_addr_i(ra), .rd_data_o(rdata));

  longint exp_c [NP][8];
  longint exp_cyc;
  int left [NP];   // cycles until this port's pending request is done; -1 idle

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear_model();
    for (int p = 0; p < NP; p++) begin
      for (int r = 0; r < 8; r++) exp_c[p][r] = 0;
      left[p] = -1;
    end
    exp_cyc = 0;
  endtask

  task automatic read_all(input string when);
    @(negedge clk);
    hs = '0; st = '0; rs = '0; rdn = '0; run = 0;
    for (int a = 0; a < (1 << RA); a++) begin
      longint exp;
      int p = a >> 3, r = a & 7;
      ra = RA'(a);
      @(negedge clk);
      exp = (p < NP) ? exp_c[p][r] : (p == NP && r == 0) ? exp_cyc : 0;
      check(rdata == CW'(exp), $sformatf("%s: reg %0d.%0d = %0d, expected %0d", when, p, r, rdata, exp));
    end
  endtask

  // one cycle of random activity: pulses set after negedge, counted at the
  // following posedge
  task automatic random_cycle(input int maxdur);
    @(negedge clk);
    run = 1'($urandom);
    if (run) exp_cyc++;
    for (int p = 0; p < NP; p++) begin
      hs[p] = 3'($urandom_range(5));
      st[p] = cache_stat_t'($urandom);
      exp_c[p][0] += hs[p];
      exp_c[p][1] += st[p].hit;
      exp_c[p][2] += st[p].miss;
      exp_c[p][3] += st[p].buf_full;
      exp_c[p][4] += st[p].buf_stall;
      exp_c[p][7] += st[p].flush;
      rs[p] = 0; rdn[p] = 0;
      if (left[p] > 0) begin
        exp_c[p][6]++;            // busy this cycle
        left[p]--;
        if (left[p] == 0) begin rdn[p] = 1; exp_c[p][5]++; left[p] = -1; end
      end else if ($urandom_range(3) == 0) begin
        rs[p] = 1;
        left[p] = $urandom_range(maxdur, 1);
      end
    end
  endtask

  initial begin
    clear = 0; run = 0; hs = '0; st = '0; rs = '0; rdn = '0; ra = '0;
    clear_model();
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_all("after reset");
    // exact duration of a two-cycle request on port 1
    @(negedge clk); rs[1] = 1;
    @(negedge clk); rs[1] = 0;
    @(negedge clk); rdn[1] = 1;
    @(negedge clk); rdn[1] = 0;
    exp_c[1][5] = 1; exp_c[1][6] = 2;
    read_all("one request of two cycles");
    for (int i = 0; i < 3000; i++) random_cycle(i < 1500 ? 3 : 40);
    // let every pending request finish
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      hs = '0; st = '0; run = 0;
      for (int p = 0; p < NP; p++) begin
        rs[p] = 0; rdn[p] = 0;
        if (left[p] > 0) begin
          exp_c[p][6]++; left[p]--;
          if (left[p] == 0) begin rdn[p] = 1; exp_c[p][5]++; left[p] = -1; end
        end
      end
    end
    read_all("random activity");
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    clear_model();
    read_all("after clear");
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
