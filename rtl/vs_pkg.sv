// vs_pkg: constants and types shared by the Virtual Socket platform.
//
// The platform lets up to 32 user HDL modules reach the host's virtual memory
// through a card-local memory of 32 pages of 2 kB (both numbers follow the
// original platform). Addresses are byte addresses; data moves in 32-bit words, so a
// page holds 512 words. The word width, the 32-bit virtual address and the
// 16-bit transfer count are this design's choices.
//
// The socket bundle is split into two structs: sock_req_t is driven by an HDL
// module, sock_rsp_t by the platform. Their use follows the seven steps of the
// communication protocol (see vs_socket_ctrl). prof_ev_t and trace_rec_t
// carry what the profiler records.
package vs_pkg;

  localparam int unsigned DATA_W     = 32;   // word width (assumed)
  localparam int unsigned VADDR_W    = 32;   // virtual byte address width (assumed)
  localparam int unsigned CNT_W      = 16;   // transfer length in words (assumed)
  localparam int unsigned NUM_MOD    = 32;   // HDL modules 0..31 (Fig. 1)
  localparam int unsigned NUM_PARAM  = 16;   // parameters per module (Sec. 4.2)
  localparam int unsigned NUM_PAGES  = 32;   // local-memory pages (Sec. 4.1)
  localparam int unsigned PAGE_BYTES = 2048; // page size (Sec. 4.1)

  localparam int unsigned OFS_W      = $clog2(PAGE_BYTES);      // 11
  localparam int unsigned VPN_W      = VADDR_W - OFS_W;         // 21
  localparam int unsigned PPN_W      = $clog2(NUM_PAGES);       // 5
  localparam int unsigned PAGE_WORDS = PAGE_BYTES / (DATA_W/8); // 512
  localparam int unsigned MEM_WORDS  = NUM_PAGES * PAGE_WORDS;  // 16384
  localparam int unsigned MADDR_W    = $clog2(MEM_WORDS);       // 14
  localparam int unsigned MID_W      = $clog2(NUM_MOD);         // 5

  // Signals an HDL module drives into its socket.
  typedef struct packed {
    logic                 rd_req;    // step 1: ask for a read session
    logic                 wr_req;    // step 1: ask for a write session
    logic                 mem_rd;    // step 3: "memory read" strobe, one cycle
    logic                 mem_wr;    // step 3: write-transfer strobe, one cycle
    logic [MID_W-1:0]     id;        // step 3: identification number of the module
    logic [VADDR_W-1:0]   addr;      // step 3: first (virtual or local) byte address
    logic [CNT_W-1:0]     count;     // step 3: number of words to move
    logic                 out_valid; // step 4/5: a write word is offered on wr_data
    logic [DATA_W-1:0]    wr_data;   // step 5: write word
    logic                 rel_req;   // step 6: release the session
    logic                 done;      // module finished its task (one-cycle pulse)
  } sock_req_t;

  // Signals the platform drives back to an HDL module.
  typedef struct packed {
    logic                 start;     // host started this module (one-cycle pulse)
    logic                 req_ack;   // step 2: session granted (one-cycle pulse)
    logic                 in_valid;  // step 4: rd_data holds the next read word
    logic [DATA_W-1:0]    rd_data;   // step 4/5: read word
    logic                 wr_ack;    // step 4: the offered write word was written
    logic                 rel_ack;   // step 7: session released (one-cycle pulse)
  } sock_rsp_t;

  // Profiling events reported by the VMC and the WMU, one cycle each.
  typedef struct packed {
    logic rd_burst;   // a read transfer started
    logic wr_burst;   // a write transfer started
    logic rd_word;    // one word read from local memory
    logic wr_word;    // one word written to local memory
    logic miss;       // the WMU met an unknown virtual page
    logic stall;      // a cycle spent waiting for a page to be filled
  } prof_ev_t;

  // One profiling trace record: a transfer an HDL module asked for.
  typedef struct packed {
    logic                 is_write;
    logic [MID_W-1:0]     id;
    logic [CNT_W-1:0]     count;
    logic [VADDR_W-1:0]   addr;
  } trace_rec_t;

endpackage
