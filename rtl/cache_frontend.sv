// Frontend of the cache: the valid/ready request port seen by the memory
// controller.
//
// The controller raises valid_i with a request (we_i, flush_i, addr_i,
// wdata_i) and holds it until ready_o. The frontend accepts the request in
// the first cycle valid_i is high while no request is in progress (req_o
// pulses, and addr_i goes straight to the cache memory so the RAM read
// starts in that same cycle), registers the request fields for the rest of
// the operation, and stays busy until the cache memory reports done. ready_o
// and rdata_o are that done pulse and its data, so a hit answers in the
// cycle after acceptance.
module cache_frontend #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller side
  input  logic              valid_i,
  input  logic              we_i,
  input  logic              flush_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic              ready_o,
  output logic [DATA_W-1:0] rdata_o,
  // cache memory side
  output logic              req_o,
  output logic [ADDR_W-1:0] req_addr_o,
  output logic              q_we_o,
  output logic              q_flush_o,
  output logic [ADDR_W-1:0] q_addr_o,
  output logic [DATA_W-1:0] q_wdata_o,
  input  logic              mem_done_i,
  input  logic [DATA_W-1:0] mem_rdata_i
);

  logic busy_q;

  assign req_o      = valid_i && !busy_q;
  assign req_addr_o = addr_i;
  assign ready_o    = busy_q && mem_done_i;
  assign rdata_o    = mem_rdata_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      q_we_o    <= 1'b0;
      q_flush_o <= 1'b0;
      q_addr_o  <= '0;
      q_wdata_o <= '0;
    end else if (req_o) begin
      busy_q    <= 1'b1;
      q_we_o    <= we_i || flush_i;
      q_flush_o <= flush_i;
      q_addr_o  <= addr_i;
      q_wdata_o <= wdata_i;
    end else if (mem_done_i) begin
      busy_q    <= 1'b0;
    end
  end

  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n)
    busy_q && !mem_done_i |-> valid_i);

endmodule
