// tb_vs_platform: end-to-end test of the whole platform at its default size
// (32 sockets, 32 local pages of 2 kB).
//
// The testbench plays the host PC and its software: it keeps the user
// virtual memory space (word at byte address a holds a * 5 + 7 until written),
// configures the platform, sets four parameters per module, starts modules
// and then serves interrupts. A WMU miss is served like a page fault: the
// next local page in round-robin order is the victim; if it is mapped and
// dirty its 512 words are copied back to host memory first; then the wanted
// page is copied in and its TLB entry written. A done interrupt ends a
// module's call. After the call the host flushes dirty pages and compares
// every result word with what the reference software would compute.
//
// Behavioural user modules (tb_vs_user_module) sit in sockets 0, 5 and 7.
// Phase 1, virtual mode: module 0 adds 3 to 10240 words (20 pages in, 20
// pages out, so pages are evicted and written back) while module 5 handles a
// short vector that crosses a page boundary; both compete for the socket.
// Phase 2, explicit mode: module 7 works on local-memory addresses that the
// host filled directly. The profiler counters are checked against the work
// done, and the profiler trace is drained and compared with the transfers
// each module made. Each mechanism (miss, eviction with write-back, page
// crossing, contention between modules, explicit mode, done interrupt, trace
// overflow) is counted and must have happened.
module tb_vs_platform;
  import vs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_cs = 0, host_we = 0, host_rvalid, host_irq;
  logic [15:0] host_addr = 0;
  logic [DATA_W-1:0] host_wdata = 0, host_rdata;
  sock_req_t mod_req [NUM_MOD];
  sock_rsp_t mod_rsp [NUM_MOD];
  logic [DATA_W-1:0] param [NUM_MOD][NUM_PARAM];

  vs_platform dut (.*);

  sock_req_t r0, r5, r7;
  tb_vs_user_module #(.ID(0)) u_m0 (.clk, .rsp(mod_rsp[0]), .param(param[0]), .req(r0));
  tb_vs_user_module #(.ID(5)) u_m5 (.clk, .rsp(mod_rsp[5]), .param(param[5]), .req(r5));
  tb_vs_user_module #(.ID(7)) u_m7 (.clk, .rsp(mod_rsp[7]), .param(param[7]), .req(r7));

  always_comb begin
    for (int i = 0; i < NUM_MOD; i++) mod_req[i] = '0;
    mod_req[0] = r0;
    mod_req[5] = r5;
    mod_req[7] = r7;
  end

  // ---------------- host memory ----------------
  logic [31:0] hmem [logic [31:0]];
  function automatic logic [31:0] hread_mem(input logic [31:0] a);
    return hmem.exists(a) ? hmem[a] : a * 5 + 7;
  endfunction

  int checks = 0, failures = 0;
  int n_miss = 0, n_evict = 0, n_wback = 0, n_cross = 0, n_contend = 0, n_explicit = 0, n_done_irq = 0,
      n_trace_lost = 0;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(negedge clk) if ((r0.rd_req || r0.wr_req) && (r5.rd_req || r5.wr_req)) n_contend++;

  // ---------------- host bus ----------------
  task automatic hw(input logic [15:0] a, input logic [31:0] d);
    host_cs = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_cs = 0; host_we = 0;
  endtask

  task automatic hr(input logic [15:0] a, output logic [31:0] d);
    host_cs = 1; host_we = 0; host_addr = a;
    @(negedge clk);
    host_cs = 0;
    if (!host_rvalid) begin failures++; $display("FAIL read not valid"); end
    d = host_rdata;
  endtask

  localparam logic [15:0] R_MODE = 16'h0000, R_START = 16'h0001, R_DONE = 16'h0002,
                          R_ISTAT = 16'h0003, R_IEN = 16'h0004, R_MISS = 16'h0005,
                          R_PCLR = 16'h0006, R_PROF = 16'h0008, R_TLB = 16'h0040,
                          R_TLEV = 16'h0010, R_TADDR = 16'h0011, R_TINFO = 16'h0012;

  function automatic logic [15:0] mem_a(input int page, input int w);
    return 16'h8000 | 16'(page * PAGE_WORDS + w);
  endfunction

  function automatic logic [15:0] par_a(input int m, input int p);
    return 16'h4000 | 16'(m * NUM_PARAM + p);
  endfunction

  int victim = 0;

  task automatic write_back(input int pg);
    logic [31:0] e, d;
    hr(R_TLB + 16'(pg), e);
    if (e[31] && e[30]) begin
      n_wback++;
      for (int w = 0; w < PAGE_WORDS; w++) begin
        hr(mem_a(pg, w), d);
        hmem[{e[VPN_W-1:0], OFS_W'(w * 4)}] = d;
      end
    end
  endtask

  task automatic serve_miss();
    logic [31:0] m, e;
    logic [VPN_W-1:0] vpn;
    hr(R_MISS, m);
    check(m[31], 1, "miss pending when the miss interrupt is raised");
    vpn = m[VPN_W-1:0];
    n_miss++;
    hw(R_ISTAT, 32'h1);
    hr(R_TLB + 16'(victim), e);
    if (e[31]) n_evict++;
    write_back(victim);
    for (int w = 0; w < PAGE_WORDS; w++) hw(mem_a(victim, w), hread_mem({vpn, OFS_W'(w * 4)}));
    hw(R_TLB + 16'(victim), 32'h8000_0000 | 32'(vpn));
    victim = (victim + 1) % NUM_PAGES;
  endtask

  // Start_module(): set parameters, start, serve interrupts until all done.
  task automatic run_modules(input logic [31:0] mask);
    logic [31:0] st, dn, seen;
    seen = 0;
    for (int m = 0; m < NUM_MOD; m++) if (mask[m]) hw(R_START, 32'(m));
    while (seen != mask) begin
      if (!host_irq) @(negedge clk);
      else begin
        hr(R_ISTAT, st);
        if (st[0]) serve_miss();
        if (st[1]) begin
          hr(R_DONE, dn);
          hw(R_DONE, dn);
          hw(R_ISTAT, 32'h2);
          seen |= dn;
          n_done_irq++;
        end
      end
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LEN0 = 10240, LEN5 = 100, LEN7 = 32;
  localparam logic [31:0] SRC0 = 32'h0010_0000, DST0 = 32'h0020_0000;
  localparam logic [31:0] SRC5 = 32'h0030_07F0, DST5 = 32'h0040_0400;

  initial begin
    logic [31:0] d;
    int cyc0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // Platform_Init / VMW_Init: virtual mode, profiler on, interrupts on
    hw(R_MODE, 32'h3);
    hw(R_PCLR, 0);
    hw(R_IEN, 32'h3);
    hr(R_MODE, d); check(d, 3, "mode register");
    // parameters of modules 0 and 5
    hw(par_a(0, 0), SRC0); hw(par_a(0, 1), DST0); hw(par_a(0, 2), LEN0); hw(par_a(0, 3), 3);
    hw(par_a(5, 0), SRC5); hw(par_a(5, 1), DST5); hw(par_a(5, 2), LEN5); hw(par_a(5, 3), 32'h100);
    hr(par_a(5, 3), d); check(d, 32'h100, "parameter read-back");
    check(param[0][2], LEN0, "parameter seen by the module");
    if (((SRC5 + 4 * LEN5 - 1) >> OFS_W) != (SRC5 >> OFS_W)) n_cross++;
    cyc0 = $time;
    run_modules((32'h1 << 0) | (32'h1 << 5));
    $display("virtual-mode call took %0d cycles", ($time - cyc0) / 10);
    // VMW_Stop: write every dirty page back
    for (int p = 0; p < NUM_PAGES; p++) write_back(p);
    for (int i = 0; i < LEN0; i++)
      check(hread_mem(DST0 + 4 * i), hread_mem(SRC0 + 4 * i) + 3, "module 0 result");
    for (int i = 0; i < LEN5; i++)
      check(hread_mem(DST5 + 4 * i), hread_mem(SRC5 + 4 * i) + 32'h100, "module 5 result");
    // profiler: words and misses
    hr(R_PROF + 0, d); check(d, (LEN0 / 64) + 2, "read transfers counted");
    hr(R_PROF + 1, d); check(d, (LEN0 / 64) + 2, "write transfers counted");
    hr(R_PROF + 2, d); check(d, LEN0 + LEN5, "words read counted");
    hr(R_PROF + 3, d); check(d, LEN0 + LEN5, "words written counted");
    hr(R_PROF + 4, d); check(d, n_miss, "misses counted");
    hr(R_PROF + 5, d); checks++; if (d == 0) begin failures++; $display("FAIL no stall cycles"); end
    // trace: the first 64 transfer requests, in each module's own order
    hr(R_TLEV, d); check(d, 64, "trace full");
    hr(R_PROF + 6, d); check(d, 2 * ((LEN0 / 64) + 2) - 64, "lost trace records counted");
    n_trace_lost = d;
    begin
      int k0 = 0, k5 = 0;
      for (int r = 0; r < 64; r++) begin
        logic [31:0] ta, ti;
        hr(R_TADDR, ta); hr(R_TINFO, ti);
        check(ti[31], 1, "trace record valid");
        if (ti[20:16] == 0) begin
          check(ta, (k0 % 2 ? DST0 : SRC0) + 256 * (k0 / 2), "trace address, module 0");
          check(ti[30], k0 % 2, "trace direction, module 0");
          check(ti[15:0], 64, "trace count, module 0");
          k0++;
        end else begin
          check(ti[20:16], 5, "trace id");
          check(ta, (k5 % 2 ? DST5 : SRC5) + 256 * (k5 / 2), "trace address, module 5");
          check(ti[15:0], (k5 < 2) ? 64 : LEN5 - 64, "trace count, module 5");
          k5++;
        end
      end
      check(k5, 4, "all module-5 transfers traced");
      hr(R_TINFO, d); check(d[31], 0, "trace drained");
    end

    // Phase 2: explicit mode, module 7 on local addresses
    hw(R_MODE, 32'h0);
    for (int w = 0; w < LEN7; w++) hw(16'h8000 | 16'(w), 32'h5500 + w);
    hw(par_a(7, 0), 32'h0); hw(par_a(7, 1), 32'h1000); hw(par_a(7, 2), LEN7); hw(par_a(7, 3), 1);
    d = n_miss;
    run_modules(32'h1 << 7);
    n_explicit++;
    check(n_miss, d, "no miss in explicit mode");
    for (int w = 0; w < LEN7; w++) begin
      hr(16'h8000 | 16'(32'h1000 / 4 + w), d);
      check(d, 32'h5500 + w + 1, "explicit-mode result");
    end

    $display("mechanisms: miss=%0d evict=%0d writeback=%0d cross=%0d contention=%0d explicit=%0d done_irq=%0d trace_lost=%0d",
             n_miss, n_evict, n_wback, n_cross, n_contend, n_explicit, n_done_irq, n_trace_lost);
    checks++; if (n_miss == 0)     begin failures++; $display("FAIL no TLB miss"); end
    checks++; if (n_evict == 0)    begin failures++; $display("FAIL no eviction"); end
    checks++; if (n_wback == 0)    begin failures++; $display("FAIL no write-back"); end
    checks++; if (n_cross == 0)    begin failures++; $display("FAIL no page crossing"); end
    checks++; if (n_contend == 0)  begin failures++; $display("FAIL no contention"); end
    checks++; if (n_explicit == 0) begin failures++; $display("FAIL no explicit-mode run"); end
    checks++; if (n_done_irq == 0) begin failures++; $display("FAIL no done interrupt"); end
    checks++; if (n_trace_lost == 0) begin failures++; $display("FAIL no trace overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
