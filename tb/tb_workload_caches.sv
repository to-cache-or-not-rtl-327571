// Runs the memory traffic of three evaluated kernels through axi_cache at
// the cache configurations of their tuning steps, and checks what the
// published step-by-step results show.
//
// Kernels and data sets (the access orders are generic textbook versions,
// not the published accelerators' schedules):
//   FFT: 1024 complex 32-bit values, re[] then im[] (8 KiB); bit reversal,
//     then 10 radix-2 stages with a growing span
//   Gram-Schmidt: three 32 x 32 matrices of 32-bit values (12 KiB); four
//     idle cycles after each request stand in for the floating-point work
//   DigitRec: one sequential pass over ~72000 64-bit words with a few writes
// Configurations (ways x lines per way x elements per line, bus bits, buffer):
//   FFT  s1 1x64x16 b64 buf2 (4 KiB)  s2 4x64x16 b64 buf2 (16 KiB)
//        s3 1x64x128 b64 buf2 (32 KiB) s4 4x64x16 b64 buf16  s5 as s4, b256
//   GS   s1 1x64x16 b64 (4 KiB)  s2 4x64x16 b64 (16 KiB)  s3 1x64x128 b64
//        (32 KiB)  s4 as s2, b256; all with a 2-entry buffer
//   DR   s1 1x64x16 b64 (8 KiB)  s3 as s1, b256
// All are write-through with LRU, as in the published exploration.
//
// Every read is compared with a reference memory, and memory is compared
// after the final flush. When a data set fits in the cache, each line that is
// ever read misses exactly once, so read-miss counts can be worked out:
// FFT 8 KiB / 64 B = 128 lines, or 16 lines of 512 B in s3; Gram-Schmidt
// reads A and Q (64 + 64 lines) and the 48 lines that hold R's upper
// triangle (176), or 24 lines of 512 B in s3; DigitRec reads each 128-byte
// line once (4496). These equal the published miss counts of the same
// configurations where those are not inflated by write-buffer stalls.
// Write-through does not allocate on a write, so written-only lines never
// miss. The published trends are also checked: a larger cache misses less; a
// 16-entry buffer removes the FFT's write stalls that a 2-entry buffer
// causes; a wider bus cuts AXI handshakes without changing misses. For the
// FFT the AXI handshake counts of steps 2 to 5 come out equal to the
// published ones (68544, 68432, 68544, 67776) and are checked as such.
module tb_workload_caches;
  import axi_cache_pkg::*;
  localparam int N = 11;
  localparam int FFT1 = 0, FFT2 = 1, FFT3 = 2, FFT4 = 3, FFT5 = 4;
  localparam int GS1 = 5, GS2 = 6, GS3 = 7, GS4 = 8, DR1 = 9, DR3 = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks, failures;
  int c [N], f [N], hit [N], miss [N], stall [N], fl [N], mo [N], aw [N];
  int rmiss [N], hs [N];
  bit fin [N];

`define WL_CACHE(I, DW, NW, WS, LS, BW, BS, RB, TR, GP) \
  cache_tester #(.DATA_W(DW), .N_WAYS(NW), .WAY_SIZE(WS), .LINE_SIZE(LS), .BUS_W(BW), \
    .BUFFER_SIZE(BS), .WR_POLICY(WP_WT), .REGION_BYTES(RB), .LATENCY(17), .SEED(20 + I), \
    .TRACE(TR), .GAP(GP)) t_``I ( \
    .clk, .rst_n, .checks(c[I]), .failures(f[I]), .finished(fin[I]), .n_hit(hit[I]), \
    .n_miss(miss[I]), .n_stall(stall[I]), .n_flush(fl[I]), .max_outstanding(mo[I]), \
    .aw_count(aw[I])); \
  assign rmiss[I] = t_``I.n_rmiss; \
  assign hs[I] = t_``I.mem.ar_hs + t_``I.mem.r_hs + t_``I.mem.aw_hs + t_``I.mem.w_hs + t_``I.mem.b_hs;

  `WL_CACHE(0,  32, 1, 64,  16,  64,  2,   8192, 1, 0)
  `WL_CACHE(1,  32, 4, 64,  16,  64,  2,   8192, 1, 0)
  `WL_CACHE(2,  32, 1, 64, 128,  64,  2,   8192, 1, 0)
  `WL_CACHE(3,  32, 4, 64,  16,  64, 16,   8192, 1, 0)
  `WL_CACHE(4,  32, 4, 64,  16, 256, 16,   8192, 1, 0)
  `WL_CACHE(5,  32, 1, 64,  16,  64,  2,  12288, 2, 4)
  `WL_CACHE(6,  32, 4, 64,  16,  64,  2,  12288, 2, 4)
  `WL_CACHE(7,  32, 1, 64, 128,  64,  2,  12288, 2, 4)
  `WL_CACHE(8,  32, 4, 64,  16, 256,  2,  12288, 2, 4)
  `WL_CACHE(9,  64, 1, 64,  16,  64,  2, 576000, 3, 0)
  `WL_CACHE(10, 64, 1, 64,  16, 256,  2, 576000, 3, 0)
`undef WL_CACHE

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (!fin[i]) return 0;
    return 1;
  endfunction

  string names [N] = '{"FFT s1", "FFT s2", "FFT s3", "FFT s4", "FFT s5",
                       "GramSchmidt s1", "GramSchmidt s2", "GramSchmidt s3", "GramSchmidt s4",
                       "DigitRec s1", "DigitRec s3"};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += c[i]; failures += f[i];
      $display("%-15s hit/miss %0d/%0d, read misses %0d, buffer stall cycles %0d, AXI handshakes %0d",
               names[i], hit[i], miss[i], rmiss[i], stall[i], hs[i]);
      need(fl[i] == 2, {names[i], ": flushes completed"});
    end
    // read misses worked out from the data-set and line sizes
    need(rmiss[FFT2] == 128 && rmiss[FFT4] == 128 && rmiss[FFT5] == 128, "FFT 16 KiB: 128 read misses");
    need(rmiss[FFT3] == 16, "FFT 32 KiB, 512-byte lines: 16 read misses");
    need(rmiss[GS2] == 176 && rmiss[GS4] == 176, "GramSchmidt 16 KiB: 176 read misses");
    need(rmiss[GS3] == 24, "GramSchmidt 32 KiB, 512-byte lines: 24 read misses");
    need(rmiss[DR1] == 4496 && rmiss[DR3] == 4496, "DigitRec: 4496 read misses");
    need(hs[FFT2] == 68544 && hs[FFT3] == 68432 && hs[FFT4] == 68544 && hs[FFT5] == 67776,
         "FFT: AXI handshakes of steps 2 to 5 as published");
    // published trends
    need(miss[FFT1] > miss[FFT2], "FFT: 16 KiB misses less than 4 KiB");
    need(miss[GS1] > miss[GS2], "GramSchmidt: 16 KiB misses less than 4 KiB");
    need(stall[FFT2] > 0 && stall[FFT4] == 0 && miss[FFT4] == 128,
         "FFT: a 16-entry buffer removes the write stalls of a 2-entry one");
    need(stall[GS2] == 0 && miss[GS2] == 176, "GramSchmidt s2: no write-buffer stalls");
    need(hs[FFT5] < hs[FFT4] && miss[FFT5] == miss[FFT4], "FFT: wider bus, fewer handshakes, same misses");
    need(hs[GS4] < hs[GS2] && miss[GS4] == miss[GS2], "GramSchmidt: wider bus, fewer handshakes, same misses");
    need(hs[DR3] < hs[DR1] && miss[DR3] == miss[DR1], "DigitRec: wider bus, fewer handshakes, same misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("FAIL: watchdog");
    for (int i = 0; i < N; i++) if (!fin[i]) $display("  %s did not finish (%0d hits, %0d misses)", names[i], hit[i], miss[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
