// Replacement policy controller of a set-associative cache.
//
// Keeps per-set replacement state and names the victim way of the set at
// set_i. touch_i marks way touch_way_i of set touch_set_i as most recently
// used (on every hit and every refill). Two policies:
//   REP_LRU  - true LRU: each way holds an age 0..N_WAYS-1 (0 = most recent);
//              a touch makes the way 0 and ages the younger ways by one; the
//              victim is the way with age N_WAYS-1.
//   REP_TREE - tree pseudo-LRU: N_WAYS-1 bits per set form a binary tree;
//              each bit points to the half to evict next, a touch points the
//              bits on its path away from the touched way, and the victim is
//              found by following the bits from the root.
// victim_o is combinational from the registered state. For N_WAYS = 1 there
// is no state and the victim is always way 0. The two policy names and LRU
// as the default come from the cache options; the encodings are this
// design's own.
module cache_replacement
  import axi_cache_pkg::*;
#(
  parameter int unsigned  N_WAYS   = 2,
  parameter int unsigned  WAY_SIZE = 32,
  parameter rep_policy_e  POLICY   = REP_LRU,
  localparam int unsigned WW      = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(WAY_SIZE)-1:0] set_i,
  output logic [WW-1:0]               victim_o,
  input  logic                        touch_i,
  input  logic [$clog2(WAY_SIZE)-1:0] touch_set_i,
  input  logic [WW-1:0]               touch_way_i
);

  if (N_WAYS == 1) begin : g_direct
    assign victim_o = '0;
  end else if (POLICY == REP_LRU) begin : g_lru
    logic [WW-1:0] age_q [WAY_SIZE][N_WAYS];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < WAY_SIZE; s++)
          for (int w = 0; w < N_WAYS; w++)
            age_q[s][w] <= WW'(w);
      end else if (touch_i) begin
        for (int w = 0; w < N_WAYS; w++) begin
          if (WW'(w) == touch_way_i)
            age_q[touch_set_i][w] <= '0;
          else if (age_q[touch_set_i][w] < age_q[touch_set_i][touch_way_i])
            age_q[touch_set_i][w] <= age_q[touch_set_i][w] + 1'b1;
        end
      end
    end

    always_comb begin
      victim_o = '0;
      for (int w = 0; w < N_WAYS; w++)
        if (age_q[set_i][w] == WW'(N_WAYS - 1)) victim_o = WW'(w);
    end
  end else begin : g_tree
    // node n (1..N_WAYS-1, heap order) has children 2n and 2n+1;
    // bit = 1 means "evict from the right (upper) half next".
    logic [N_WAYS-1:0] tree_q [WAY_SIZE];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < WAY_SIZE; s++) tree_q[s] <= '0;
      end else if (touch_i) begin
        for (int l = 0; l < WW; l++) begin
          // node on level l along the path to touch_way_i
          automatic int unsigned node = (1 << l) | (int'(touch_way_i) >> (WW - l));
          automatic logic        dir  = touch_way_i[WW-1-l];
          tree_q[touch_set_i][node] <= ~dir;
        end
      end
    end

    always_comb begin
      automatic int unsigned node = 1;
      for (int l = 0; l < WW; l++)
        node = 2 * node + int'(tree_q[set_i][node]);
      victim_o = WW'(node - N_WAYS);
    end
  end

endmodule
