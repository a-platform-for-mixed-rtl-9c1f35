// vs_platform: Virtual Socket platform with its Virtual Memory Extension.
//
// The card hardware that lets HDL modules run as if they were functions of
// the host's reference software. Up to NUM_MOD (32) modules plug into
// sockets (mod_req/mod_rsp/param). Through the socket controller they take
// turns on one memory path, where the Virtual Memory Controller (VMC) and the
// Window Memory Unit (WMU) translate the virtual addresses of the host's user
// memory space into addresses of a local memory of 32 pages of 2 kB. A
// virtual page that is not in local memory makes the WMU interrupt the host;
// the host copies the page in, writes the TLB entry, and the stalled transfer
// carries on by itself. In explicit mode (MODE.virt=0) the modules' addresses
// are local-memory addresses and nothing is translated. A profiler counts the
// transfers and keeps a trace of the transfer requests
// for the designer.
//
// Host side: a simple synchronous word bus standing in for the card's host
// interface (which is not modelled). host_cs+host_we write host_wdata at
// host_addr; host_cs alone reads, and host_rdata is valid with host_rvalid
// one cycle later. Word address map (this design's choice):
//   1xxx_xxxx_xxxx_xxxx  local memory word x (16384 words = 32 pages x 512)
//   01.. mmmm mppp p     parameter p of module m (32 x 16)
//   00.. 0000 0000       MODE: bit0 virtual mode, bit1 profiler enable
//   00.. 0000 0001       START: write a module number to start it
//   00.. 0000 0010       DONE: per-module done bits, write ones to clear
//   00.. 0000 0011       IRQ_STATUS: bit0 WMU miss, bit1 module done; W1C
//   00.. 0000 0100       IRQ_ENABLE
//   00.. 0000 0101       MISS: bit31 miss pending, low bits faulting page
//   00.. 0000 0110       PROF_CLR: write to zero the profiler
//   00.. 0000 0111       STATUS: bit31 a session is active, low bits owner
//   00.. 0000 1ccc       profiler counter c (0..6)
//   00.. 0001 0000       TRACE_LEVEL: records waiting in the profiler trace
//   00.. 0001 0001       TRACE_ADDR: first address of the oldest record
//   00.. 0001 0010       TRACE_INFO: {valid[31], write[30], id[20:16],
//                        count[15:0]} of the oldest record; reading it
//                        removes the record
//   00.. 01pp pppp       TLB entry p: write {valid[31], vpn}; read
//                        {valid[31], dirty[30], vpn}; a write clears the
//                        entry's dirty bit and the pending miss
// MODE resets to virtual mode with the profiler off. Host and modules may
// use local memory at the same time (two ports); a same-word write collision
// is won by the module side.
module vs_platform
  import vs_pkg::*;
#(
  parameter int unsigned N_MOD = vs_pkg::NUM_MOD,
  localparam int unsigned IW   = (N_MOD > 1) ? $clog2(N_MOD) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic               host_cs,
  input  logic               host_we,
  input  logic [15:0]        host_addr,
  input  logic [DATA_W-1:0]  host_wdata,
  output logic [DATA_W-1:0]  host_rdata,
  output logic               host_rvalid,
  output logic               host_irq,
  // HDL module sockets
  input  sock_req_t          mod_req [N_MOD],
  output sock_rsp_t          mod_rsp [N_MOD],
  output logic [DATA_W-1:0]  param   [N_MOD][NUM_PARAM]
);

  localparam int unsigned PW = $clog2(NUM_PARAM);

  // ---------------- host decode ----------------
  logic h_wr, h_rd, sel_mem, sel_par, sel_ctl, sel_tlb, sel_prof;
  logic [7:0] reg_a;

  assign h_wr     = host_cs && host_we;
  assign h_rd     = host_cs && !host_we;
  assign sel_mem  = host_addr[15];
  assign sel_par  = host_addr[15:14] == 2'b01;
  assign sel_ctl  = host_addr[15:14] == 2'b00;
  assign reg_a    = host_addr[7:0];
  assign sel_tlb  = sel_ctl && reg_a[7:6] == 2'b01;
  assign sel_prof = sel_ctl && reg_a[7:3] == 5'b00001;

  logic virt_mode, prof_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      virt_mode <= 1'b1;
      prof_en   <= 1'b0;
    end else if (h_wr && sel_ctl && reg_a == 8'h00) begin
      virt_mode <= host_wdata[0];
      prof_en   <= host_wdata[1];
    end
  end

  // ---------------- blocks ----------------
  logic [N_MOD-1:0] start, done, done_status;
  logic             done_any;
  logic [DATA_W-1:0] p_rdata;

  always_comb for (int i = 0; i < N_MOD; i++) done[i] = mod_req[i].done;

  vs_module_ctrl #(.N(N_MOD), .NP(NUM_PARAM), .DATA_W(DATA_W)) u_modctl (
    .clk, .rst_n,
    .p_we        (h_wr && sel_par),
    .p_mod       (host_addr[PW +: IW]),
    .p_idx       (host_addr[PW-1:0]),
    .p_wdata     (host_wdata),
    .p_rdata     (p_rdata),
    .st_we       (h_wr && sel_ctl && reg_a == 8'h01),
    .st_mod      (host_wdata[IW-1:0]),
    .done_clr_we (h_wr && sel_ctl && reg_a == 8'h02),
    .done_clr    (host_wdata[N_MOD-1:0]),
    .done_status (done_status),
    .done_any    (done_any),
    .param       (param),
    .start       (start),
    .done        (done)
  );

  logic               cmd_rd, cmd_wr, s_out_valid, vmc_busy, in_valid, wr_ack;
  logic [VADDR_W-1:0] cmd_addr;
  logic [CNT_W-1:0]   cmd_count;
  logic [MID_W-1:0]   cmd_id;
  logic [DATA_W-1:0]  s_wr_data, rd_data;
  logic               active;
  logic [IW-1:0]      owner;

  vs_socket_ctrl #(.N(N_MOD)) u_sock (
    .clk, .rst_n,
    .mod_req, .mod_rsp, .start,
    .cmd_rd, .cmd_wr, .cmd_addr, .cmd_count, .cmd_id,
    .out_valid (s_out_valid),
    .wr_data   (s_wr_data),
    .vmc_busy, .in_valid, .rd_data, .wr_ack,
    .active, .owner
  );

  logic               lk_en, lk_hit, mark_dirty;
  logic [VPN_W-1:0]   lk_vpn, miss_vpn;
  logic [PPN_W-1:0]   lk_ppn;
  logic               m_en, m_we;
  logic [MADDR_W-1:0] m_addr;
  logic [DATA_W-1:0]  m_wdata, m_q;
  prof_ev_t           ev_vmc, ev;

  vs_vmc u_vmc (
    .clk, .rst_n, .virt_mode,
    .cmd_rd, .cmd_wr, .cmd_addr, .cmd_count,
    .busy      (vmc_busy),
    .in_valid, .rd_data,
    .out_valid (s_out_valid),
    .wr_data   (s_wr_data),
    .wr_ack,
    .lk_en, .lk_vpn, .lk_hit, .lk_ppn, .mark_dirty,
    .m_en, .m_we, .m_addr, .m_wdata, .m_q,
    .ev        (ev_vmc)
  );

  logic             miss_pending, miss_irq;
  logic             tlb_rvalid, tlb_rdirty;
  logic [VPN_W-1:0] tlb_rvpn;

  vs_wmu u_wmu (
    .clk, .rst_n,
    .lk_en, .lk_vpn, .lk_hit, .lk_ppn, .mark_dirty,
    .miss_pending, .miss_vpn, .miss_irq,
    .tlb_we     (h_wr && sel_tlb),
    .tlb_idx    (reg_a[PPN_W-1:0]),
    .tlb_wvalid (host_wdata[31]),
    .tlb_wvpn   (host_wdata[VPN_W-1:0]),
    .tlb_rvalid, .tlb_rdirty, .tlb_rvpn
  );

  logic [DATA_W-1:0] a_q;

  vs_local_memory u_mem (
    .clk,
    .a_en    (host_cs && sel_mem),
    .a_we    (host_we),
    .a_addr  (host_addr[MADDR_W-1:0]),
    .a_wdata (host_wdata),
    .a_q     (a_q),
    .b_en    (m_en),
    .b_we    (m_we),
    .b_addr  (m_addr),
    .b_wdata (m_wdata),
    .b_q     (m_q)
  );

  logic [1:0] irq_status, irq_enable;

  vs_irq_ctrl #(.NSRC(2)) u_irq (
    .clk, .rst_n,
    .src      ({done_any, miss_irq}),
    .en_we    (h_wr && sel_ctl && reg_a == 8'h04),
    .en_wdata (host_wdata[1:0]),
    .clr_we   (h_wr && sel_ctl && reg_a == 8'h03),
    .clr      (host_wdata[1:0]),
    .status   (irq_status),
    .enable   (irq_enable),
    .irq      (host_irq)
  );

  always_comb begin
    ev      = ev_vmc;
    ev.miss = miss_irq;
  end

  logic [DATA_W-1:0] prof_rdata;
  trace_rec_t        rec, tr_head;
  logic              tr_empty, tr_pop;
  logic [6:0]        tr_level;

  always_comb begin
    rec.is_write = ev_vmc.wr_burst;
    rec.id       = cmd_id;
    rec.count    = cmd_count;
    rec.addr     = cmd_addr;
  end

  assign tr_pop = h_rd && sel_ctl && reg_a == 8'h12;

  vs_profiler #(.CW(DATA_W), .DEPTH(64)) u_prof (
    .clk, .rst_n,
    .enable    (prof_en),
    .clr       (h_wr && sel_ctl && reg_a == 8'h06),
    .ev,
    .sel       (reg_a[2:0]),
    .rdata     (prof_rdata),
    .rec_valid (ev_vmc.rd_burst || ev_vmc.wr_burst),
    .rec, .tr_pop, .tr_head, .tr_empty, .tr_level
  );

  // ---------------- host read-back ----------------
  logic [DATA_W-1:0] reg_q;
  logic              rd_mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid <= 1'b0;
      rd_mem_q    <= 1'b0;
      reg_q       <= '0;
    end else begin
      host_rvalid <= h_rd;
      rd_mem_q    <= sel_mem;
      if (h_rd) begin
        reg_q <= '0;
        if (sel_par) reg_q <= p_rdata;
        else if (sel_tlb) reg_q <= DATA_W'({tlb_rvalid, tlb_rdirty, 30'(tlb_rvpn)});
        else if (sel_prof) reg_q <= prof_rdata;
        else if (sel_ctl) begin
          unique case (reg_a)
            8'h00: reg_q <= DATA_W'({prof_en, virt_mode});
            8'h02: reg_q <= DATA_W'(done_status);
            8'h03: reg_q <= DATA_W'(irq_status);
            8'h04: reg_q <= DATA_W'(irq_enable);
            8'h05: reg_q <= DATA_W'({miss_pending, 31'(miss_vpn)});
            8'h07: reg_q <= DATA_W'({active, 15'd0, 16'(owner)});
            8'h10: reg_q <= DATA_W'(tr_level);
            8'h11: reg_q <= DATA_W'(tr_head.addr);
            8'h12: reg_q <= DATA_W'({!tr_empty, tr_head.is_write, 9'd0, tr_head.id, tr_head.count});
            default: reg_q <= '0;
          endcase
        end
      end
    end
  end

  assign host_rdata = rd_mem_q ? a_q : reg_q;

endmodule
