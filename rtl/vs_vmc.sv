// vs_vmc: Virtual Memory Controller.
//
// The original description says the VMC intercepts the address, the count (number of words
// requested) and the strobe of an HDL module's transfer and has the WMU
// translate the virtual addresses into local-memory addresses. This module is
// the simplest engine that does that. A one-cycle strobe (cmd_rd or cmd_wr)
// with cmd_addr (byte address) and cmd_count (words) starts a transfer; the
// VMC then walks the words one by one, four bytes apart:
//   * virtual mode (virt_mode=1): each word's page number goes to the WMU;
//     on a hit the local address is {page, offset}; on a miss the VMC waits
//     (the WMU interrupts the host, the host fills the page and the TLB) and
//     then carries on by itself, so a transfer may cross any page boundary;
//   * explicit mode (virt_mode=0): the address is already a local-memory byte
//     address and is used as it is (it wraps modulo the local memory size).
// Reads: one word per cycle while pages hit; each word comes back one cycle
// after its access with in_valid=1 on rd_data. Writes: the module offers a
// word with out_valid/wr_data; the cycle in which the word is written wr_ack
// is high (valid/ready style), so one word per cycle is possible too.
// busy stays high until the last read word has been delivered. A strobe
// while a transfer is running is ignored. The word-at-a-time pacing, the retry after a miss and
// the one-cycle read latency are this design's choices. rd_data and m_wdata
// are plain wires (memory output to socket, socket to memory input), and the
// ev.miss field is left zero here because the WMU reports misses itself.
module vs_vmc
  import vs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               virt_mode,
  // transfer command (step 3)
  input  logic               cmd_rd,
  input  logic               cmd_wr,
  input  logic [VADDR_W-1:0] cmd_addr,
  input  logic [CNT_W-1:0]   cmd_count,
  output logic               busy,
  // data (steps 4 and 5)
  output logic               in_valid,
  output logic [DATA_W-1:0]  rd_data,
  input  logic               out_valid,
  input  logic [DATA_W-1:0]  wr_data,
  output logic               wr_ack,
  // WMU
  output logic               lk_en,
  output logic [VPN_W-1:0]   lk_vpn,
  input  logic               lk_hit,
  input  logic [PPN_W-1:0]   lk_ppn,
  output logic               mark_dirty,
  // local memory, port B
  output logic               m_en,
  output logic               m_we,
  output logic [MADDR_W-1:0]     m_addr,
  output logic [DATA_W-1:0]  m_wdata,
  input  logic [DATA_W-1:0]  m_q,
  // profiling
  output prof_ev_t           ev
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_t;

  state_t             state;
  logic [VADDR_W-1:0] va;
  logic [CNT_W-1:0]   remaining;
  logic               rd_pending;
  logic               page_ok, step;

  assign lk_vpn  = va[VADDR_W-1:OFS_W];
  assign lk_en   = virt_mode && (state != S_IDLE);
  assign page_ok = !virt_mode || lk_hit;
  assign m_addr  = virt_mode ? {lk_ppn, va[OFS_W-1:2]} : va[MADDR_W+1:2];
  assign m_wdata = wr_data;

  always_comb begin
    step   = 1'b0;
    m_en   = 1'b0;
    m_we   = 1'b0;
    wr_ack = 1'b0;
    unique case (state)
      S_READ:  step = page_ok;
      S_WRITE: step = page_ok && out_valid;
      default: step = 1'b0;
    endcase
    m_en   = step;
    m_we   = step && (state == S_WRITE);
    wr_ack = m_we;
  end

  assign mark_dirty = m_we && virt_mode;
  assign busy       = (state != S_IDLE) || rd_pending;
  assign in_valid   = rd_pending;
  assign rd_data    = m_q;

  always_comb begin
    ev          = '0;
    ev.rd_burst = (state == S_IDLE) && cmd_rd && (cmd_count != 0);
    ev.wr_burst = (state == S_IDLE) && !cmd_rd && cmd_wr && (cmd_count != 0);
    ev.rd_word  = step && (state == S_READ);
    ev.wr_word  = m_we;
    ev.stall    = lk_en && !lk_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      va         <= '0;
      remaining  <= '0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= step && (state == S_READ);
      unique case (state)
        S_IDLE: begin
          if (ev.rd_burst || ev.wr_burst) begin
            va        <= cmd_addr;
            remaining <= cmd_count;
            state     <= ev.rd_burst ? S_READ : S_WRITE;
          end
        end
        default: begin
          if (step) begin
            va        <= va + VADDR_W'(4);
            remaining <= remaining - 1'b1;
            if (remaining == CNT_W'(1)) state <= S_IDLE;
          end
        end
      endcase
    end
  end

endmodule
