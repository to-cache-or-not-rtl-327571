// Testbench of cache_replacement: random touches on 4-way instances with
// both policies, compared with reference models written differently from
// the RTL: LRU as a recency-ordered list per set (victim = last), tree
// pseudo-LRU as an explicit walk over a node array. Also a direct-mapped
// instance, whose victim must always be way 0.
module tb_cache_replacement;
  import axi_cache_pkg::*;
  localparam int unsigned NW = 4, NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] set, tset, tway, v_lru, v_tree;
  logic       touch;
  logic       v_dm;
  logic       tway_dm;

  cache_replacement #(.N_WAYS(NW), .WAY_SIZE(NS), .POLICY(REP_LRU)) u_lru (
    .clk, .rst_n, .set_i(set), .victim_o(v_lru), .touch_i(touch), .touch_set_i(tset), .touch_way_i(tway));
  cache_replacement #(.N_WAYS(NW), .WAY_SIZE(NS), .POLICY(REP_TREE)) u_tree (
    .clk, .rst_n, .set_i(set), .victim_o(v_tree), .touch_i(touch), .touch_set_i(tset), .touch_way_i(tway));
  cache_replacement #(.N_WAYS(1), .WAY_SIZE(NS), .POLICY(REP_LRU)) u_dm (
    .clk, .rst_n, .set_i(set), .victim_o(v_dm), .touch_i(touch), .touch_set_i(tset), .touch_way_i(tway_dm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int order [NS][$];          // most recent first
  bit node  [NS][4];          // nodes 1..3: 1 = right half holds the victim

  function automatic int tree_victim(input int s);
    int n = node[s][1] ? 3 : 2;
    return (n - 2) * 2 + int'(node[s][n]);
  endfunction

  initial begin
    touch = 0; set = 0; tset = 0; tway = 0; tway_dm = 0;
    for (int s = 0; s < NS; s++) begin
      order[s] = {0, 1, 2, 3};
      for (int n = 0; n < 4; n++) node[s][n] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      set = 2'($urandom);
      #1;
      check(int'(v_lru) == order[set][NW-1], $sformatf("LRU victim set %0d", set));
      check(int'(v_tree) == tree_victim(set), $sformatf("tree victim set %0d", set));
      check(v_dm == 1'b0, "direct mapped victim");
      touch = 1; tset = 2'($urandom); tway = 2'($urandom);
      @(negedge clk);
      touch = 0;
      // models
      foreach (order[tset][k]) if (order[tset][k] == int'(tway)) begin order[tset].delete(k); break; end
      order[tset].push_front(int'(tway));
      node[tset][1] = (tway < 2);              // touched left -> evict right
      node[tset][2 + tway[1]] = ~tway[0];
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
