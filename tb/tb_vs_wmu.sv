// tb_vs_wmu: self-checking test of the Window Memory Unit: empty TLB misses,
// one interrupt per miss, the host write that clears the pending miss, hits
// on every filled entry with the right page number, dirty marking and its
// clearing, and invalidation.
module tb_vs_wmu;
  localparam int E = 32, VW = 21, PW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lk_en = 0, mark_dirty = 0, tlb_we = 0, tlb_wvalid = 0;
  logic [VW-1:0] lk_vpn = 0, tlb_wvpn = 0, miss_vpn, tlb_rvpn;
  logic [PW-1:0] lk_ppn, tlb_idx = 0;
  logic lk_hit, miss_pending, miss_irq, tlb_rvalid, tlb_rdirty;
  int checks = 0, failures = 0, irqs = 0;
  logic [VW-1:0] map [E];

  vs_wmu dut (.*);

  always @(negedge clk) if (miss_irq) irqs++;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic host_write(input int idx, input logic v, input logic [VW-1:0] vpn);
    tlb_we = 1; tlb_idx = PW'(idx); tlb_wvalid = v; tlb_wvpn = vpn;
    @(negedge clk); tlb_we = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // a lookup in the empty TLB misses and interrupts once
    lk_en = 1; lk_vpn = 21'h1234A;
    #1 check(lk_hit, 0, "empty TLB misses");
    repeat (4) @(negedge clk);
    check(miss_pending, 1, "miss pending");
    check(miss_vpn, 21'h1234A, "faulting page latched");
    check(irqs, 1, "one interrupt for a waiting miss");
    // the host maps the page into entry 9; the lookup now hits
    host_write(9, 1, 21'h1234A);
    #1 check(lk_hit, 1, "hit after fill");
    check(lk_ppn, 9, "page number of the entry");
    check(miss_pending, 0, "fill clears the miss");
    lk_en = 0;
    // fill all entries with distinct pages and look each up
    for (int i = 0; i < E; i++) begin
      map[i] = VW'(32'h100 + i * 7);
      host_write(i, 1, map[i]);
    end
    for (int i = 0; i < E; i++) begin
      lk_vpn = map[i]; #1;
      check(lk_hit, 1, "hit"); check(32'(lk_ppn), i, "ppn");
      tlb_idx = PW'(i); #1;
      check(tlb_rvalid, 1, "read valid"); check(tlb_rvpn, map[i], "read vpn");
    end
    // a write marks the entry dirty
    @(negedge clk); lk_en = 1; lk_vpn = map[13]; mark_dirty = 1;
    @(negedge clk); mark_dirty = 0; lk_en = 0;
    tlb_idx = 13; #1 check(tlb_rdirty, 1, "dirty after write");
    tlb_idx = 12; #1 check(tlb_rdirty, 0, "other entry clean");
    // invalidation: entry 13 dropped, its page misses again
    @(negedge clk); host_write(13, 0, map[13]);
    tlb_idx = 13; #1 check(tlb_rdirty, 0, "rewrite clears dirty");
    check(tlb_rvalid, 0, "invalidated");
    lk_vpn = map[13]; #1 check(lk_hit, 0, "invalid entry misses");
    lk_en = 1; @(negedge clk); @(negedge clk); lk_en = 0;
    check(irqs, 2, "second miss interrupts");
    check(miss_vpn, map[13], "second faulting page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
