// Testbench of cache_backend (64-bit bus, 4-beat lines, 4-beat write
// bursts) against a behavioural AXI memory. Fetches random lines and checks
// the assembled line and the burst shape; feeds a queue of write entries
// through the issue port as a write buffer would and checks that each entry
// is issued once, in order, lands in memory, is retired by its response, and
// that several writes are outstanding at the same time; finally runs reads
// and writes together.
`include "axi_ports.svh"
module tb_cache_backend;
  localparam int unsigned AW = 32, BW = 64, LB = 4, WB = 4, LW = BW * LB, MEMB = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fetch_valid, fetch_ready, line_valid, iss_valid, iss_adv, retire;
  logic [AW-1:0] fetch_addr, iss_addr;
  logic [LW-1:0] line, iss_data;
  logic [LW/8-1:0] iss_strb;
  `AXI_WIRES(s, AW, BW);

  cache_backend #(.ADDR_W(AW), .BUS_W(BW), .LINE_BEATS(LB), .WR_BEATS(WB)) dut (
    .clk, .rst_n, .fetch_valid_i(fetch_valid), .fetch_addr_i(fetch_addr),
    .fetch_ready_o(fetch_ready), .line_valid_o(line_valid), .line_o(line),
    .iss_valid_i(iss_valid), .iss_addr_i(iss_addr), .iss_data_i(iss_data),
    .iss_strb_i(iss_strb), .iss_adv_o(iss_adv), .retire_o(retire),
    `AXI_M_CONNECT(m_axi, s));
  axi_mem_model #(.ADDR_W(AW), .BUS_W(BW), .MEM_BYTES(MEMB), .LATENCY(10)) mem (
    .clk, .rst_n,
    .s_araddr, .s_arlen, .s_arsize, .s_arburst, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .s_awaddr, .s_awlen, .s_awsize, .s_awburst, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] ref_mem [MEMB];
  typedef struct { logic [AW-1:0] a; logic [LW-1:0] d; } ent_t;
  ent_t q [$];
  int issued = 0, retired = 0;

  // write buffer stand-in: presents q[issued] until the backend moves on
  assign iss_valid = (issued < q.size());
  assign iss_addr  = iss_valid ? q[issued].a : '0;
  assign iss_data  = iss_valid ? q[issued].d : '0;
  assign iss_strb  = '1;
  always @(posedge clk) begin
    if (iss_adv) issued <= issued + 1;
    if (retire)  retired <= retired + 1;
  end
  a_retire_after_issue: assert property (@(posedge clk) retire |-> retired < issued);

  task automatic fetch_line(input int unsigned ln);
    int ar0 = mem.ar_hs;
    @(negedge clk);
    fetch_valid = 1; fetch_addr = AW'(ln * LW / 8);
    while (!fetch_ready) @(negedge clk);
    @(negedge clk);
    fetch_valid = 0;
    while (!line_valid) @(negedge clk);
    for (int b = 0; b < LW / 8; b++)
      check(line[b*8 +: 8] == ref_mem[ln * LW / 8 + b], $sformatf("line %0d byte %0d", ln, b));
    check(mem.ar_hs == ar0 + 1 && s_arlen == 8'(LB - 1), "one burst of LINE_BEATS beats per line");
  endtask

  task automatic add_write(input int unsigned ln);
    ent_t e;
    e.a = AW'(ln * LW / 8);
    for (int b = 0; b < LW / 8; b++) begin
      e.d[b*8 +: 8] = 8'($urandom);
      ref_mem[ln * LW / 8 + b] = e.d[b*8 +: 8];
    end
    q.push_back(e);
  endtask

  initial begin
    fetch_valid = 0; fetch_addr = 0;
    for (int i = 0; i < MEMB; i++) begin
      ref_mem[i] = 8'($urandom);
      mem.mem[i] = ref_mem[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) fetch_line($urandom_range(MEMB * 8 / LW - 1));
    // eight writes at once: they drain back to back
    for (int i = 0; i < 8; i++) add_write(i * 3);
    while (retired < 8) @(negedge clk);
    check(issued == 8 && mem.aw_hs == 8 && mem.w_hs == 8 * WB, "every entry issued once as one burst");
    check(mem.max_outstanding > 1, "writes outstanding at the same time");
    // reads and writes together
    for (int i = 0; i < 6; i++) add_write(40 + i);
    for (int i = 0; i < 6; i++) fetch_line(20 + i);
    while (retired < 14) @(negedge clk);
    for (int i = 0; i < MEMB; i++)
      if (mem.mem[i] != ref_mem[i]) check(0, $sformatf("memory byte %0d", i));
    check(1, "memory holds every written line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
