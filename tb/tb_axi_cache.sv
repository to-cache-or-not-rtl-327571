// Testbench of axi_cache: three configurations under random traffic, each
// checked against a reference memory (cache_tester).
//   A: write-through, direct mapped, 4 lines x 4 elements, bus = element
//   B: write-back, 2-way tree pseudo-LRU, 8 x 4 elements, 64-bit bus
//   C: write-back, 4-way LRU, 4 x 8 elements, 128-bit bus, 4-entry buffer
// Also requires that each mechanism occurred: hits, misses, write-buffer
// stalls, flushes, dirty-line write-backs, and more than one write
// outstanding on the bus.
module tb_axi_cache;
  import axi_cache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks, failures;
  int c [3], f [3], hit [3], miss [3], stall [3], fl [3], mo [3], aw [3];
  bit fin [3];

  cache_tester #(.DATA_W(32), .N_WAYS(1), .WAY_SIZE(4), .LINE_SIZE(4), .BUS_W(32),
    .BUFFER_SIZE(2), .REP_POLICY(REP_LRU), .WR_POLICY(WP_WT), .REGION_BYTES(512),
    .N_OPS(1500), .SEED(1)) t_a (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]), .n_hit(hit[0]),
    .n_miss(miss[0]), .n_stall(stall[0]), .n_flush(fl[0]), .max_outstanding(mo[0]), .aw_count(aw[0]));
  cache_tester #(.DATA_W(32), .N_WAYS(2), .WAY_SIZE(8), .LINE_SIZE(4), .BUS_W(64),
    .BUFFER_SIZE(2), .REP_POLICY(REP_TREE), .WR_POLICY(WP_WB), .REGION_BYTES(1024),
    .N_OPS(1500), .SEED(2)) t_b (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]), .n_hit(hit[1]),
    .n_miss(miss[1]), .n_stall(stall[1]), .n_flush(fl[1]), .max_outstanding(mo[1]), .aw_count(aw[1]));
  cache_tester #(.DATA_W(64), .N_WAYS(4), .WAY_SIZE(4), .LINE_SIZE(8), .BUS_W(128),
    .BUFFER_SIZE(4), .REP_POLICY(REP_LRU), .WR_POLICY(WP_WB), .REGION_BYTES(4096),
    .N_OPS(1500), .SEED(3)) t_c (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]), .n_hit(hit[2]),
    .n_miss(miss[2]), .n_stall(stall[2]), .n_flush(fl[2]), .max_outstanding(mo[2]), .aw_count(aw[2]));

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += c[i]; failures += f[i];
      $display("cache %0d: hits=%0d misses=%0d stalls=%0d flushes=%0d aw=%0d max_outstanding=%0d",
               i, hit[i], miss[i], stall[i], fl[i], aw[i], mo[i]);
      need(hit[i] > 0 && miss[i] > 0, "hits and misses both occur");
      need(fl[i] == 2, "both flushes completed");
    end
    need(stall[0] > 0, "write-through buffer stalls occur");
    need(aw[1] > 0 && aw[2] > 0, "dirty lines written back");
    need(mo[0] > 1, "several writes outstanding at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
