// tb_vs_vmc: self-checking test of the Virtual Memory Controller together
// with a WMU and a local memory. The testbench also plays the host: when the
// WMU interrupts, it copies the faulting page from its own model of the
// host's virtual memory (word at byte address a = a * 3 + 1) into the next
// free local page and writes the TLB entry. Checked: explicit-mode reads at
// one word per cycle, virtual reads and writes that cross page boundaries
// and miss, the data in local memory, dirty bits, and a read-back.
module tb_vs_vmc;
  import vs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic virt_mode = 0, cmd_rd = 0, cmd_wr = 0, busy, in_valid, out_valid = 0, wr_ack;
  logic [VADDR_W-1:0] cmd_addr = 0;
  logic [CNT_W-1:0] cmd_count = 0;
  logic [DATA_W-1:0] rd_data, wr_data = 0;
  logic lk_en, lk_hit, mark_dirty, m_en, m_we;
  logic [VPN_W-1:0] lk_vpn, miss_vpn, tlb_rvpn;
  logic [PPN_W-1:0] lk_ppn;
  logic [MADDR_W-1:0] m_addr;
  logic [DATA_W-1:0] m_wdata, m_q;
  prof_ev_t ev;
  logic miss_pending, miss_irq, tlb_we = 0, tlb_wvalid = 0, tlb_rvalid, tlb_rdirty;
  logic [PPN_W-1:0] tlb_idx = 0;
  logic [VPN_W-1:0] tlb_wvpn = 0;
  logic a_en = 0, a_we = 0;
  logic [MADDR_W-1:0] a_addr = 0;
  logic [DATA_W-1:0] a_wdata = 0, a_q;

  vs_vmc dut (.*);
  vs_wmu u_wmu (.*);
  vs_local_memory u_mem (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_q,
                         .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_q(m_q));

  int checks = 0, failures = 0, misses = 0, stalls = 0;
  int next_page = 0;
  logic [VPN_W-1:0] page_of [NUM_PAGES];

  function automatic logic [31:0] host_word(input logic [31:0] a);
    return a * 3 + 1;
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  always @(negedge clk) if (ev.stall) stalls++;

  // host: serve WMU misses
  initial begin
    forever begin
      @(negedge clk);
      if (miss_pending && !tlb_we) begin
        logic [VPN_W-1:0] vpn;
        vpn = miss_vpn;
        misses++;
        repeat (3) @(negedge clk);      // some host reaction time
        for (int w = 0; w < PAGE_WORDS; w++) begin
          a_en = 1; a_we = 1;
          a_addr = MADDR_W'(next_page * PAGE_WORDS + w);
          a_wdata = host_word({vpn, OFS_W'(w * 4)});
          @(negedge clk);
        end
        a_en = 0; a_we = 0;
        page_of[next_page] = vpn;
        tlb_we = 1; tlb_idx = PPN_W'(next_page); tlb_wvalid = 1; tlb_wvpn = vpn;
        @(negedge clk); tlb_we = 0;
        next_page++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_burst(input logic [31:0] addr, input int n, input bit virt,
                            input bit expect_rate);
    int got = 0, t0, first = -1, last = -1, cyc = 0;
    cmd_rd = 1; cmd_addr = addr; cmd_count = CNT_W'(n);
    @(negedge clk); cmd_rd = 0;
    while (busy) begin
      cyc++;
      if (in_valid) begin
        logic [31:0] a;
        a = addr + 4 * got;
        check(rd_data, virt ? host_word(a) : 32'hC000_0000 | a, $sformatf("read word %0d", got));
        if (first < 0) first = cyc;
        last = cyc;
        got++;
      end
      @(negedge clk);
    end
    check(got, n, "read word count");
    if (expect_rate) begin
      check(first, 2, "first word two cycles after the strobe");
      check(last - first + 1, n, "one word per cycle");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // explicit mode: preload local words 0x40.. with a marker pattern
    for (int w = 0; w < 16; w++) begin
      a_en = 1; a_we = 1; a_addr = MADDR_W'(16'h40 + w); a_wdata = 32'hC000_0000 | ((16'h40 + w) * 4);
      @(negedge clk);
    end
    a_en = 0; a_we = 0;
    virt_mode = 0;
    read_burst(32'h100, 16, 0, 1);
    check(misses, 0, "no miss in explicit mode");
    // virtual mode: 20 words across the page boundary at 0x0001_0800
    virt_mode = 1;
    read_burst(32'h0001_07D8, 20, 1, 0);
    check(misses, 2, "two pages fetched");
    check(stalls > 0, 1, "transfer stalled on the misses");
    // mapped now: same words again at full rate
    read_burst(32'h0001_07D8, 20, 1, 1);
    check(misses, 2, "no new miss");
    // virtual write of 10 words across 0x0002_0800
    cmd_wr = 1; cmd_addr = 32'h0002_07F0; cmd_count = 10;
    @(negedge clk); cmd_wr = 0;
    begin
      int sent = 0;
      while (sent < 10) begin
        out_valid = 1; wr_data = 32'hD000_0000 + sent;
        #1;
        if (wr_ack) sent++;
        @(negedge clk);
      end
      out_valid = 0;
      check(sent, 10, "words written");
    end
    @(negedge clk);
    check(busy, 0, "write finished");
    check(misses, 4, "write pages fetched");
    // the written words sit in pages 2 (first 4) and 3 (next 6)
    for (int k = 0; k < 10; k++) begin
      int pg, wo;
      pg = (k < 4) ? 2 : 3;
      wo = (k < 4) ? (32'h7F0 / 4 + k) : (k - 4);
      a_en = 1; a_addr = MADDR_W'(pg * PAGE_WORDS + wo);
      @(negedge clk); a_en = 0;
      check(a_q, 32'hD000_0000 + k, "word in local memory");
    end
    for (int p = 0; p < 5; p++) begin
      tlb_idx = PPN_W'(p); #1;
      check(tlb_rdirty, (p == 2 || p == 3), $sformatf("dirty bit of page %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
