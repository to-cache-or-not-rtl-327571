// Cache memory: the core of the cache. It holds tags and data, the valid and
// dirty bits, the replacement controller and the write buffer, decides hit or
// miss, and runs the miss, write and flush sequences.
//
// Storage: per way, a tag RAM and a data RAM of WAY_SIZE entries with a
// one-cycle synchronous read; a line is LINE_SIZE elements of DATA_W bits.
// Valid bits (and, for write-back, dirty bits) are register files with one
// bit per line. Addresses are byte addresses split into tag | set | offset.
//
// Timing: a request accepted in cycle t (req_i) reads all ways at its set in
// that cycle; in cycle t+1 (LOOKUP) the tags are compared. A hit is answered
// in t+1 (done_o, rdata_o). Otherwise:
//  - read miss, or write miss with write-back/allocate: pick a victim (an
//    invalid way first, else the replacement policy); for write-back, a
//    dirty victim is pushed whole into the write buffer; the line is fetched
//    through the backend once no pending buffer entry overlaps it; the
//    refill writes tag, data and valid (and merges the write data, setting
//    dirty), and the request is answered in the cycle after the line arrives.
//  - write with write-through/no-allocate: the word goes into the write
//    buffer (and into the line on a hit); done as soon as it is in the
//    buffer, so the write latency is hidden unless the buffer is full.
//  - flush (a write request of size 0): write-back walks every set and way,
//    moves dirty lines into the write buffer and clears their dirty bits;
//    both policies then wait for the buffer to empty (all responses back)
//    before done.
// stat_o reports one-cycle events: hit, miss (anything not answered in t+1,
// including a write stalled by a full buffer), buffer full, buffer stall,
// flush done.
//
// The structure (RAMs with single-cycle access, valid/dirty register files,
// replacement controller, write buffer shared by both write policies, flush
// by draining dirty lines then the buffer) follows the published cache
// description. Victim choice, the overlap check before a fetch and the state
// sequence are this design's own.
module cache_memory
  import axi_cache_pkg::*;
#(
  parameter int unsigned   ADDR_W      = 32,
  parameter int unsigned   DATA_W      = 64,
  parameter int unsigned   N_WAYS      = 1,
  parameter int unsigned   WAY_SIZE    = 8,
  parameter int unsigned   LINE_SIZE   = 32,
  parameter int unsigned   BUS_W       = DATA_W,
  parameter int unsigned   BUFFER_SIZE = 2,
  parameter rep_policy_e   REP_POLICY  = REP_LRU,
  parameter write_policy_e WR_POLICY   = WP_WT,
  localparam int unsigned  LINE_W      = LINE_SIZE * DATA_W,
  localparam int unsigned  WB_W        = (WR_POLICY == WP_WB) ? LINE_W : BUS_W,
  localparam int unsigned  WW          = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned  SW          = $clog2(WAY_SIZE)
) (
  input  logic                clk,
  input  logic                rst_n,
  // request from the frontend
  input  logic                req_i,        // accepted this cycle
  input  logic [ADDR_W-1:0]   req_addr_i,   // address in the accept cycle
  input  logic                q_we_i,       // registered request, from t+1
  input  logic                q_flush_i,
  input  logic [ADDR_W-1:0]   q_addr_i,
  input  logic [DATA_W-1:0]   q_wdata_i,
  output logic                done_o,
  output logic [DATA_W-1:0]   rdata_o,
  output cache_stat_t         stat_o,
  // line fetch (backend read controller)
  output logic                fetch_valid_o,
  output logic [ADDR_W-1:0]   fetch_addr_o,
  input  logic                fetch_ready_i,
  input  logic                line_valid_i,
  input  logic [LINE_W-1:0]   line_i,
  // write buffer issue port (backend write controller)
  output logic                iss_valid_o,
  output logic [ADDR_W-1:0]   iss_addr_o,
  output logic [WB_W-1:0]     iss_data_o,
  output logic [WB_W/8-1:0]   iss_strb_o,
  input  logic                iss_adv_i,
  input  logic                retire_i
);

  localparam int unsigned EB   = $clog2(DATA_W / 8);          // element byte bits
  localparam int unsigned OFF  = $clog2(LINE_W / 8);          // line offset bits
  localparam int unsigned TW   = ADDR_W - OFF - SW;           // tag bits
  localparam int unsigned BB   = $clog2(BUS_W / 8);           // bus byte bits
  localparam int unsigned NE   = (LINE_SIZE > 1) ? $clog2(LINE_SIZE) : 1;

  function automatic logic [SW-1:0] set_of(input logic [ADDR_W-1:0] a);
    return a[OFF +: SW];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TW];
  endfunction
  function automatic int unsigned elem_of(input logic [ADDR_W-1:0] a);
    return (LINE_SIZE > 1) ? int'(a[EB +: NE]) : 0;
  endfunction

  // ---------------- storage ----------------
  logic [TW-1:0]     tag_ram  [N_WAYS][WAY_SIZE];
  logic [LINE_W-1:0] data_ram [N_WAYS][WAY_SIZE];
  logic [TW-1:0]     tag_rd   [N_WAYS];
  logic [LINE_W-1:0] data_rd  [N_WAYS];
  logic [WAY_SIZE-1:0] valid_q [N_WAYS];
  logic [WAY_SIZE-1:0] dirty_q [N_WAYS];

  logic              ram_re;
  logic [SW-1:0]     ram_rset;
  logic [N_WAYS-1:0] ram_we;
  logic [SW-1:0]     ram_wset;
  logic [TW-1:0]     ram_wtag;
  logic [LINE_W-1:0] ram_wline;

  always_ff @(posedge clk) begin
    for (int w = 0; w < N_WAYS; w++) begin
      if (ram_we[w]) begin
        tag_ram[w][ram_wset]  <= ram_wtag;
        data_ram[w][ram_wset] <= ram_wline;
      end
      if (ram_re) begin
        tag_rd[w]  <= tag_ram[w][ram_rset];
        data_rd[w] <= data_ram[w][ram_rset];
      end
    end
  end

  // ---------------- state ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_WT_WAIT, S_EVICT, S_FETCH, S_FETCH_WAIT,
    S_FL_READ, S_FL_CHECK, S_FL_DRAIN
  } state_e;
  state_e state_q, state_d;

  logic [WW-1:0] way_q, way_d;           // hit way or victim way
  logic          hit_q, hit_d;           // a write-through write that hit
  logic [SW-1:0] fset_q, fset_d;         // flush walk position
  logic [WW-1:0] fway_q, fway_d;

  // ---------------- lookup ----------------
  logic [N_WAYS-1:0] way_hit;
  logic              hit;
  logic [WW-1:0]     hit_way;
  logic [WW-1:0]     rep_victim, victim;
  logic              have_invalid;
  logic [SW-1:0]     q_set;
  logic [TW-1:0]     q_tag;
  int unsigned       q_elem;

  assign q_set  = set_of(q_addr_i);
  assign q_tag  = tag_of(q_addr_i);
  assign q_elem = elem_of(q_addr_i);

  always_comb begin
    way_hit      = '0;
    hit_way      = '0;
    victim       = rep_victim;
    have_invalid = 1'b0;
    for (int w = N_WAYS - 1; w >= 0; w--) begin
      way_hit[w] = valid_q[w][q_set] && (tag_rd[w] == q_tag);
      if (way_hit[w]) hit_way = WW'(w);
      if (!valid_q[w][q_set]) begin
        victim       = WW'(w);
        have_invalid = 1'b1;
      end
    end
  end
  assign hit = |way_hit;

  logic          touch;
  logic [SW-1:0] touch_set;
  cache_replacement #(
    .N_WAYS(N_WAYS), .WAY_SIZE(WAY_SIZE), .POLICY(REP_POLICY)
  ) u_rep (
    .clk, .rst_n,
    .set_i      (q_set),
    .victim_o   (rep_victim),
    .touch_i    (touch),
    .touch_set_i(touch_set),
    .touch_way_i(way_d)
  );
  assign touch_set = q_set;

  // ---------------- write buffer ----------------
  logic              wb_push, wb_full, wb_empty, wb_match;
  logic [ADDR_W-1:0] wb_addr;
  logic [WB_W-1:0]   wb_data;
  logic [WB_W/8-1:0] wb_strb;

  cache_write_buffer #(
    .DEPTH(BUFFER_SIZE), .ADDR_W(ADDR_W), .DATA_W(WB_W), .MATCH_LSB(OFF)
  ) u_wbuf (
    .clk, .rst_n,
    .push_i(wb_push), .push_addr_i(wb_addr), .push_data_i(wb_data), .push_strb_i(wb_strb),
    .full_o(wb_full), .empty_o(wb_empty),
    .iss_valid_o, .iss_addr_o, .iss_data_o, .iss_strb_o, .iss_adv_i, .retire_i,
    .match_addr_i(q_addr_i), .match_o(wb_match)
  );

  // write-through entry: the element placed in its lane of a bus word
  logic [BUS_W-1:0]   wt_word;
  logic [BUS_W/8-1:0] wt_strb;
  always_comb begin
    automatic int unsigned lane = (BUS_W > DATA_W) ? int'((q_addr_i % (BUS_W / 8)) >> EB) : 0;
    wt_word = '0;
    wt_strb = '0;
    wt_word[lane*DATA_W +: DATA_W]         = q_wdata_i;
    wt_strb[lane*(DATA_W/8) +: DATA_W/8]   = '1;
  end

  // ---------------- control ----------------
  logic [LINE_W-1:0] cur_line;     // line the request works on
  logic [LINE_W-1:0] merged_line;  // cur_line with the write data merged in
  always_comb begin
    cur_line    = (state_q == S_FETCH_WAIT) ? line_i : data_rd[way_q];
    if (state_q == S_LOOKUP) cur_line = data_rd[hit_way];
    merged_line = cur_line;
    merged_line[q_elem*DATA_W +: DATA_W] = q_wdata_i;
  end
  assign rdata_o = cur_line[q_elem*DATA_W +: DATA_W];

  always_comb begin
    state_d   = state_q;
    way_d     = way_q;
    hit_d     = hit_q;
    fset_d    = fset_q;
    fway_d    = fway_q;
    done_o    = 1'b0;
    touch     = 1'b0;
    ram_re    = 1'b0;
    ram_rset  = set_of(req_addr_i);
    ram_we    = '0;
    ram_wset  = q_set;
    ram_wtag  = q_tag;
    ram_wline = merged_line;
    wb_push   = 1'b0;
    wb_addr   = {q_addr_i[ADDR_W-1:BB], BB'(0)};
    wb_data   = WB_W'(wt_word);
    wb_strb   = (WB_W/8)'(wt_strb);
    fetch_valid_o = 1'b0;
    fetch_addr_o  = {q_addr_i[ADDR_W-1:OFF], OFF'(0)};
    stat_o    = '0;
    stat_o.buf_full = wb_full;

    unique case (state_q)
      S_IDLE: if (req_i) begin
        ram_re  = 1'b1;
        state_d = S_LOOKUP;
      end

      S_LOOKUP: begin
        if (q_flush_i) begin
          fset_d  = '0;
          fway_d  = '0;
          state_d = (WR_POLICY == WP_WB) ? S_FL_READ : S_FL_DRAIN;
        end else if (WR_POLICY == WP_WT && q_we_i) begin
          way_d = hit_way;
          hit_d = hit;
          if (!wb_full) begin
            wb_push    = 1'b1;
            ram_we[hit_way] = hit;
            touch      = hit;
            done_o     = 1'b1;
            stat_o.hit = 1'b1;
            state_d    = S_IDLE;
          end else begin
            stat_o.miss      = 1'b1;
            stat_o.buf_stall = 1'b1;
            state_d          = S_WT_WAIT;
          end
        end else if (hit) begin
          way_d      = hit_way;
          touch      = 1'b1;
          done_o     = 1'b1;
          stat_o.hit = 1'b1;
          state_d    = S_IDLE;
          if (q_we_i) ram_we[hit_way] = 1'b1;   // write-back hit
        end else begin
          way_d       = victim;
          stat_o.miss = 1'b1;
          if (WR_POLICY == WP_WB && !have_invalid && dirty_q[victim][q_set])
            state_d = S_EVICT;
          else
            state_d = S_FETCH;
        end
      end

      S_WT_WAIT: begin
        stat_o.buf_stall = wb_full;
        if (!wb_full) begin
          wb_push         = 1'b1;
          ram_we[way_q]   = hit_q;
          touch           = hit_q;
          done_o          = 1'b1;
          state_d         = S_IDLE;
        end
      end

      S_EVICT: begin
        stat_o.buf_stall = wb_full;
        wb_addr = {tag_rd[way_q], q_set, OFF'(0)};
        wb_data = WB_W'(data_rd[way_q]);
        wb_strb = '1;
        if (!wb_full) begin
          wb_push = 1'b1;
          state_d = S_FETCH;
        end
      end

      S_FETCH: if (!wb_match) begin
        fetch_valid_o = 1'b1;
        if (fetch_ready_i) state_d = S_FETCH_WAIT;
      end

      S_FETCH_WAIT: if (line_valid_i) begin
        ram_we[way_q] = 1'b1;
        ram_wline     = q_we_i ? merged_line : line_i;
        touch         = 1'b1;
        done_o        = 1'b1;
        state_d       = S_IDLE;
      end

      S_FL_READ: begin
        ram_re   = 1'b1;
        ram_rset = fset_q;
        state_d  = S_FL_CHECK;
      end

      S_FL_CHECK: begin
        wb_addr = {tag_rd[fway_q], fset_q, OFF'(0)};
        wb_data = WB_W'(data_rd[fway_q]);
        wb_strb = '1;
        if (valid_q[fway_q][fset_q] && dirty_q[fway_q][fset_q]) begin
          stat_o.buf_stall = wb_full;
          wb_push          = !wb_full;
        end
        if (!(valid_q[fway_q][fset_q] && dirty_q[fway_q][fset_q]) || !wb_full) begin
          if (fway_q == WW'(N_WAYS - 1)) begin
            fway_d  = '0;
            fset_d  = fset_q + 1'b1;
            state_d = (fset_q == SW'(WAY_SIZE - 1)) ? S_FL_DRAIN : S_FL_READ;
          end else begin
            fway_d  = fway_q + 1'b1;
          end
        end
      end

      S_FL_DRAIN: if (wb_empty) begin
        done_o       = 1'b1;
        stat_o.flush = 1'b1;
        state_d      = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      way_q   <= '0;
      hit_q   <= 1'b0;
      fset_q  <= '0;
      fway_q  <= '0;
      for (int w = 0; w < N_WAYS; w++) begin
        valid_q[w] <= '0;
        dirty_q[w] <= '0;
      end
    end else begin
      state_q <= state_d;
      way_q   <= way_d;
      hit_q   <= hit_d;
      fset_q  <= fset_d;
      fway_q  <= fway_d;
      for (int w = 0; w < N_WAYS; w++) begin
        if (ram_we[w]) begin
          valid_q[w][ram_wset] <= 1'b1;
          if (WR_POLICY == WP_WB) dirty_q[w][ram_wset] <= q_we_i;
        end
        if (state_q == S_FL_CHECK && wb_push && fway_q == WW'(w))
          dirty_q[w][fset_q] <= 1'b0;
      end
    end
  end

  // ---------------- checks ----------------
  initial begin
    assert (BUS_W >= DATA_W && LINE_W >= BUS_W && LINE_W / BUS_W <= 256)
      else $error("cache_memory: need DATA_W <= BUS_W <= line width <= 256 beats");
    assert (WAY_SIZE >= 2) else $error("cache_memory: WAY_SIZE must be at least 2");
  end

  a_done_in_reply: assert property (@(posedge clk) disable iff (!rst_n)
    done_o |-> state_q != S_IDLE);

endmodule
