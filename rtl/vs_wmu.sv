// vs_wmu: Window Memory Unit, the translation part of the Virtual Memory
// Extension.
//
// The original description takes the WMU from earlier work and gives its function: it
// translates the virtual addresses of the HDL modules into local-memory
// addresses (page number + offset) with a TLB, and when it meets an unknown
// virtual address it raises an interrupt so that the host software copies the
// page into local memory. How the TLB is organised is this design's choice:
// one entry per physical page (32 by default), fully associative, so entry i
// maps a virtual page number to local page i. Each entry has a valid bit, the
// virtual page number and a dirty bit that the WMU sets when a module writes
// through the entry, so the host knows which pages to copy back.
//
// Lookup is combinational: lk_vpn in, lk_hit/lk_ppn out in the same cycle.
// When lk_en is high and the page is unknown, the WMU latches the page number
// in miss_vpn, sets miss_pending and pulses miss_irq for one cycle. A miss is
// reported once: further misses wait until the host writes a TLB entry
// (tlb_we), which clears miss_pending; the requester simply retries.
// Host writes set or clear an entry and always clear its dirty bit.
module vs_wmu #(
  parameter int unsigned ENTRIES = vs_pkg::NUM_PAGES,
  parameter int unsigned VPN_W   = vs_pkg::VPN_W,
  localparam int unsigned PPN_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // translation port (VMC)
  input  logic             lk_en,
  input  logic [VPN_W-1:0] lk_vpn,
  output logic             lk_hit,
  output logic [PPN_W-1:0] lk_ppn,
  input  logic             mark_dirty,   // a write went through entry lk_ppn
  // miss report
  output logic             miss_pending,
  output logic [VPN_W-1:0] miss_vpn,
  output logic             miss_irq,
  // host access to the TLB
  input  logic             tlb_we,
  input  logic [PPN_W-1:0] tlb_idx,
  input  logic             tlb_wvalid,
  input  logic [VPN_W-1:0] tlb_wvpn,
  output logic             tlb_rvalid,
  output logic             tlb_rdirty,
  output logic [VPN_W-1:0] tlb_rvpn
);

  logic [ENTRIES-1:0] valid, dirty;
  logic [VPN_W-1:0]   vpn [ENTRIES];

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid[i] && vpn[i] == lk_vpn) begin
        lk_hit = 1'b1;
        lk_ppn = PPN_W'(i);
      end
    end
  end

  assign tlb_rvalid = valid[tlb_idx];
  assign tlb_rdirty = dirty[tlb_idx];
  assign tlb_rvpn   = vpn[tlb_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid        <= '0;
      dirty        <= '0;
      miss_pending <= 1'b0;
      miss_vpn     <= '0;
      miss_irq     <= 1'b0;
      for (int i = 0; i < ENTRIES; i++) vpn[i] <= '0;
    end else begin
      miss_irq <= 1'b0;
      if (mark_dirty && lk_hit) dirty[lk_ppn] <= 1'b1;
      if (tlb_we) begin
        valid[tlb_idx] <= tlb_wvalid;
        vpn[tlb_idx]   <= tlb_wvpn;
        dirty[tlb_idx] <= 1'b0;
        miss_pending   <= 1'b0;
      end else if (lk_en && !lk_hit && !miss_pending) begin
        miss_pending <= 1'b1;
        miss_vpn     <= lk_vpn;
        miss_irq     <= 1'b1;
      end
    end
  end

endmodule
