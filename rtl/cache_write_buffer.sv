// Write buffer of the cache: a FIFO of pending AXI write transactions.
//
// The cache pushes an entry (byte address, data, byte strobes) and can report
// the write as finished at once; the backend write controller drains the
// buffer. An entry goes through three steps: pushed at the tail, issued on
// the bus from the issue pointer (iss_adv_i), and retired from the head when
// its write response returns (retire_i). Because an entry stays in the buffer
// until its response, several writes can be outstanding on the bus at the
// same time, and a pending write stays visible to match_o: the cache uses it
// to hold back a line fetch that would overlap a write not yet acknowledged.
//
// DEPTH is the maximum number of pending writes (the buffer_size option, a
// power of 2). Entries are DATA_W bits wide: one bus word for a
// write-through cache, one whole line for a write-back cache. match_o
// compares addresses above bit MATCH_LSB (the line offset).
// full_o / empty_o are registered-state outputs; push is ignored when full.
module cache_write_buffer #(
  parameter int unsigned DEPTH     = 2,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned DATA_W    = 64,
  parameter int unsigned MATCH_LSB = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // push side (cache memory)
  input  logic                push_i,
  input  logic [ADDR_W-1:0]   push_addr_i,
  input  logic [DATA_W-1:0]   push_data_i,
  input  logic [DATA_W/8-1:0] push_strb_i,
  output logic                full_o,
  output logic                empty_o,
  // issue side (backend write controller)
  output logic                iss_valid_o,
  output logic [ADDR_W-1:0]   iss_addr_o,
  output logic [DATA_W-1:0]   iss_data_o,
  output logic [DATA_W/8-1:0] iss_strb_o,
  input  logic                iss_adv_i,
  input  logic                retire_i,
  // address match against every pending entry
  input  logic [ADDR_W-1:0]   match_addr_i,
  output logic                match_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0]   addr_q [DEPTH];
  logic [DATA_W-1:0]   data_q [DEPTH];
  logic [DATA_W/8-1:0] strb_q [DEPTH];
  logic [DEPTH-1:0]    pend_q;
  logic [PW-1:0]       tail_q, iss_q, head_q;
  logic [PW:0]         count_q, unissued_q;

  logic do_push;
  assign full_o      = (count_q == (PW+1)'(DEPTH));
  assign empty_o     = (count_q == '0);
  assign do_push     = push_i && !full_o;
  assign iss_valid_o = (unissued_q != '0);
  assign iss_addr_o  = addr_q[iss_q];
  assign iss_data_o  = data_q[iss_q];
  assign iss_strb_o  = strb_q[iss_q];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) begin
      addr_q[tail_q] <= push_addr_i;
      data_q[tail_q] <= push_data_i;
      strb_q[tail_q] <= push_strb_i;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tail_q     <= '0;
      iss_q      <= '0;
      head_q     <= '0;
      count_q    <= '0;
      unissued_q <= '0;
      pend_q     <= '0;
    end else begin
      if (do_push) tail_q <= inc(tail_q);
      if (iss_adv_i && iss_valid_o) iss_q <= inc(iss_q);
      if (retire_i && !empty_o) head_q <= inc(head_q);
      count_q    <= count_q + (PW+1)'(do_push) - (PW+1)'(retire_i && !empty_o);
      unissued_q <= unissued_q + (PW+1)'(do_push) - (PW+1)'(iss_adv_i && iss_valid_o);
      for (int i = 0; i < DEPTH; i++) begin
        if (retire_i && !empty_o && head_q == PW'(i)) pend_q[i] <= 1'b0;
        if (do_push && tail_q == PW'(i))              pend_q[i] <= 1'b1;
      end
    end
  end

  always_comb begin
    match_o = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (pend_q[i] && (addr_q[i] >> MATCH_LSB) == (match_addr_i >> MATCH_LSB))
        match_o = 1'b1;
  end

  a_retire_issued: assert property (@(posedge clk) disable iff (!rst_n)
    retire_i |-> (count_q > unissued_q));

endmodule
