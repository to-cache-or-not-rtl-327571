// Example HLS-style accelerator (finite state machine with datapath) for
//   c[index] = a[index] + b[index]      on 64-bit unsigned elements.
//
// Its schedule has one state per step and one idle state per memory
// operation, because memory latency is unknown at compile time:
//   S_0  t1 = index << 3; form the three addresses; issue load a[index]
//   S_1  wait for the load
//   S_2  issue load b[index]      S_3  wait
//   S_4  t7 = t5 + t6; issue store c[index] = t7     S_5  wait
//   S_6  return
// As in a cached design, the return is preceded by a flush of every memory
// controller: a write of size 0 is sent to all ports (S_FLUSH) and the
// accelerator waits for all of them (S_FLWAIT) before raising done_o.
//
// Ports: start_i pulses with the pointers a_i, b_i, c_i (byte addresses) and
// index_i; done_o pulses when the call is complete. Port 0 carries a, port 1
// b and port 2 c, one memory controller each. Memory ports: start, we, size
// (bits), addr, wdata per port; done and rdata back.
//
// States S_0 to S_6, their operations and the wait-on-done transitions follow
// the published state-transition graph for this kernel. That graph also
// allows skipping a wait state when done arrives in the issuing state; here
// start is registered, so done comes at the earliest one cycle later and the
// wait state is always visited. The mapping of the
// three pointers to three ports and the flush states are this design's own
// composition.
module foo_accel #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  localparam int unsigned SZW   = $clog2(DATA_W) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_i,
  input  logic [ADDR_W-1:0]       a_i,
  input  logic [ADDR_W-1:0]       b_i,
  input  logic [ADDR_W-1:0]       c_i,
  input  logic [ADDR_W-1:0]       index_i,
  output logic                    done_o,
  // memory ports 0 (a), 1 (b), 2 (c)
  output logic [2:0]              m_start_o,
  output logic [2:0]              m_we_o,
  output logic [2:0][SZW-1:0]     m_size_o,
  output logic [2:0][ADDR_W-1:0]  m_addr_o,
  output logic [2:0][DATA_W-1:0]  m_wdata_o,
  input  logic [2:0]              m_done_i,
  input  logic [2:0][DATA_W-1:0]  m_rdata_i
);

  localparam int unsigned SHIFT = $clog2(DATA_W / 8);

  typedef enum logic [3:0] {
    S_IDLE, S_0, S_1, S_2, S_3, S_4, S_5, S_6, S_FLUSH, S_FLWAIT
  } state_e;
  state_e state_q;

  logic [ADDR_W-1:0] t3_q, t4_q;       // addresses of b and c
  logic [DATA_W-1:0] t5_q, t6_q;       // loaded values
  logic [2:0]        fl_done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      t3_q      <= '0;
      t4_q      <= '0;
      t5_q      <= '0;
      t6_q      <= '0;
      fl_done_q <= '0;
      m_start_o <= '0;
      m_we_o    <= '0;
      m_size_o  <= '0;
      m_addr_o  <= '0;
      m_wdata_o <= '0;
      done_o    <= 1'b0;
    end else begin
      m_start_o <= '0;
      done_o    <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) state_q <= S_0;
        S_0: begin
          // t1 = index << 3; t2 = a + t1; t3 = b + t1; t4 = c + t1; t5 = *t2
          t3_q         <= b_i + (index_i << SHIFT);
          t4_q         <= c_i + (index_i << SHIFT);
          m_start_o[0] <= 1'b1;
          m_we_o[0]    <= 1'b0;
          m_size_o[0]  <= SZW'(DATA_W);
          m_addr_o[0]  <= a_i + (index_i << SHIFT);
          state_q      <= S_1;
        end
        S_1: if (m_done_i[0]) begin
          t5_q    <= m_rdata_i[0];
          state_q <= S_2;
        end
        S_2: begin
          m_start_o[1] <= 1'b1;
          m_we_o[1]    <= 1'b0;
          m_size_o[1]  <= SZW'(DATA_W);
          m_addr_o[1]  <= t3_q;
          state_q      <= S_3;
        end
        S_3: if (m_done_i[1]) begin
          t6_q    <= m_rdata_i[1];
          state_q <= S_4;
        end
        S_4: begin
          // t7 = t5 + t6; *t4 = t7
          m_start_o[2] <= 1'b1;
          m_we_o[2]    <= 1'b1;
          m_size_o[2]  <= SZW'(DATA_W);
          m_addr_o[2]  <= t4_q;
          m_wdata_o[2] <= t5_q + t6_q;
          state_q      <= S_5;
        end
        S_5: if (m_done_i[2]) state_q <= S_6;
        S_6: state_q <= S_FLUSH;
        S_FLUSH: begin
          m_start_o <= '1;
          m_we_o    <= '1;
          m_size_o  <= '0;
          fl_done_q <= '0;
          state_q   <= S_FLWAIT;
        end
        S_FLWAIT: begin
          fl_done_q <= fl_done_q | m_done_i;
          if ((fl_done_q | m_done_i) == 3'b111) begin
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
