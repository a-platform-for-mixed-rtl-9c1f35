// vs_socket_ctrl: the HDL-module side of the Virtual Socket platform.
//
// It runs the seven-step communication protocol of the original description for up to
// NUM_MOD modules that share one memory path:
//   1. a module raises rd_req (or wr_req) and holds it;
//   2. the controller picks one requester (round robin) and pulses its
//      req_ack; the session is now that module's;
//   3. the module pulses mem_rd (mem_wr) with id, addr and count;
//   4./5. the VMC moves the words: in_valid + rd_data for reads,
//      out_valid + wr_data answered by wr_ack for writes;
//      steps 3 to 5 may repeat within one session;
//   6. the module raises rel_req and holds it;
//   7. once the last word has gone, the controller pulses rel_ack and
//      serves the next requester.
// The original acknowledgement of step 2 comes before the address is known
// (step 3), so here it only grants the session; waiting for a page that is not
// yet in local memory happens during step 4, inside the VMC. A read session
// passes only mem_rd strobes on, a write session only mem_wr strobes. The
// level/pulse conventions, the arbitration and the one-cycle gaps between the
// steps are this design's choices. The module's id, sent with the transfer
// parameters, goes to the profiler trace (cmd_id); routing uses the socket. The start pulses of the host are merged
// into mod_rsp here so each module sees one response bundle.
module vs_socket_ctrl
  import vs_pkg::*;
#(
  parameter int unsigned N = vs_pkg::NUM_MOD,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  sock_req_t           mod_req [N],
  output sock_rsp_t           mod_rsp [N],
  input  logic [N-1:0]        start,
  // to / from the VMC
  output logic                cmd_rd,
  output logic                cmd_wr,
  output logic [VADDR_W-1:0]  cmd_addr,
  output logic [CNT_W-1:0]    cmd_count,
  output logic [MID_W-1:0]    cmd_id,
  output logic                out_valid,
  output logic [DATA_W-1:0]   wr_data,
  input  logic                vmc_busy,
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   rd_data,
  input  logic                wr_ack,
  // status
  output logic                active,
  output logic [IW-1:0]       owner
);

  typedef enum logic [1:0] {S_IDLE, S_GRANT, S_BUSY, S_RELEASE} state_t;

  state_t        state;
  logic          is_write;
  logic [N-1:0]  req_vec;
  logic          gnt_valid;
  logic [IW-1:0] gnt_idx;
  sock_req_t     cur;

  always_comb
    for (int i = 0; i < N; i++) req_vec[i] = mod_req[i].rd_req || mod_req[i].wr_req;

  vs_rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req       (req_vec),
    .take      (state == S_IDLE),
    .gnt_valid (gnt_valid),
    .gnt_idx   (gnt_idx)
  );

  assign cur    = mod_req[owner];
  assign active = (state != S_IDLE);

  assign cmd_rd    = (state == S_BUSY) && !is_write && cur.mem_rd;
  assign cmd_wr    = (state == S_BUSY) &&  is_write && cur.mem_wr;
  assign cmd_addr  = cur.addr;
  assign cmd_count = cur.count;
  assign cmd_id    = cur.id;
  assign out_valid = (state == S_BUSY) && is_write && cur.out_valid;
  assign wr_data   = cur.wr_data;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      mod_rsp[i]         = '0;
      mod_rsp[i].start   = start[i];
      mod_rsp[i].rd_data = rd_data;
    end
    mod_rsp[owner].req_ack  = (state == S_GRANT);
    mod_rsp[owner].in_valid = (state == S_BUSY) && in_valid;
    mod_rsp[owner].wr_ack   = (state == S_BUSY) && wr_ack;
    mod_rsp[owner].rel_ack  = (state == S_RELEASE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      owner    <= '0;
      is_write <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (gnt_valid) begin
          owner    <= gnt_idx;
          is_write <= !mod_req[gnt_idx].rd_req;
          state    <= S_GRANT;
        end
        S_GRANT: state <= S_BUSY;
        S_BUSY:  if (cur.rel_req && !vmc_busy && !cur.mem_rd && !cur.mem_wr) state <= S_RELEASE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A module strobes only the transfer type its session was granted for.
  always_ff @(posedge clk)
    if (state == S_BUSY)
      a_strobe_matches_session: assert (!(is_write ? cur.mem_rd : cur.mem_wr))
        else $error("module %0d strobed the wrong transfer type", owner);

endmodule
