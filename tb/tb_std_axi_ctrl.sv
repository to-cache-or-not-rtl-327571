// Testbench of std_axi_ctrl: writes and reads back words through a
// behavioural AXI memory, checks the data, the fixed per-access latency
// (LATENCY + 4 cycles from start to done with this memory model: one cycle to
// raise AR, one for the handshake, LATENCY, one to drive R, one to register
// done), that only one transaction is in flight, and that a size-0 write
// completes without bus traffic.
`include "axi_ports.svh"
module tb_std_axi_ctrl;
  localparam int unsigned AW = 32, DW = 64, LAT = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, we, done;
  logic [$clog2(DW):0] size;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;
  `AXI_WIRES(s, AW, DW);

  std_axi_ctrl #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk, .rst_n, .start_i(start), .we_i(we), .size_i(size), .addr_i(addr),
    .wdata_i(wdata), .done_o(done), .rdata_o(rdata), `AXI_M_CONNECT(m_axi, s));
  axi_mem_model #(.ADDR_W(AW), .BUS_W(DW), .MEM_BYTES(4096), .LATENCY(LAT)) mem (
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

  task automatic access(input bit w, input logic [AW-1:0] a, input logic [DW-1:0] d,
                        input int unsigned sz, output logic [DW-1:0] q, output int cyc);
    @(negedge clk);
    start = 1; we = w; addr = a; wdata = d; size = ($clog2(DW)+1)'(sz);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    q = rdata;
  endtask

  logic [DW-1:0] ref_data [16];
  logic [DW-1:0] q;
  int cyc, hs;

  initial begin
    start = 0; we = 0; addr = 0; wdata = 0; size = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ref_data[i] = {$urandom, $urandom};
      access(1, AW'(i * 8 + 256), ref_data[i], DW, q, cyc);
    end
    for (int i = 0; i < 16; i++) begin
      logic [DW-1:0] m;
      for (int b = 0; b < 8; b++) m[b*8 +: 8] = mem.mem[256 + i*8 + b];
      check(m == ref_data[i], $sformatf("memory word %0d after write", i));
    end
    for (int i = 15; i >= 0; i--) begin
      access(0, AW'(i * 8 + 256), '0, DW, q, cyc);
      check(q == ref_data[i], $sformatf("read %0d: %h vs %h", i, q, ref_data[i]));
      check(cyc == LAT + 4, $sformatf("read latency %0d, expected %0d", cyc, LAT + 4));
    end
    check(mem.ar_hs == 16 && mem.aw_hs == 16 && mem.b_hs == 16, "one AXI transaction per access");
    check(mem.max_outstanding == 1, "never more than one write outstanding");
    hs = mem.aw_hs;
    access(1, AW'(0), '0, 0, q, cyc);
    check(cyc == 2 && mem.aw_hs == hs, "size-0 write completes without traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
