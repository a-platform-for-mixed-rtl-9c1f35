// vs_profiler: data-transfer profiling.
//
// The platform gives the designer feedback on the data an HDL module requests,
// so that its transfers can be studied and reduced before a memory
// architecture is designed for it. This block does that in two ways, both
// active only while enable is high:
//   * counters: read transfers, write transfers, words read, words written,
//     WMU misses (pages the host had to fetch), cycles spent waiting for such
//     pages, and trace records lost because the trace was full. Counter c is
//     read combinationally on rdata when sel=c (0..6 in that order). Counters
//     are CW bits wide and saturate;
//   * a trace: every transfer request (rec_valid with rec = direction, module
//     id, word count, first address) is queued in a DEPTH-entry FIFO that the
//     host drains: tr_head/tr_empty show the oldest record, tr_pop drops it,
//     tr_level is the number of records held. A record that finds the FIFO
//     full is lost and counted.
// clr zeroes the counters and empties the trace; it wins over a same-cycle
// event. Which events are counted, the trace format and its depth are this
// design's choices; the original description names the profiling but not
// its contents.
module vs_profiler
  import vs_pkg::*;
#(
  parameter int unsigned CW    = 32,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned LW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          clr,
  input  prof_ev_t      ev,
  input  logic [2:0]    sel,
  output logic [CW-1:0] rdata,
  // trace
  input  logic          rec_valid,
  input  trace_rec_t    rec,
  input  logic          tr_pop,
  output trace_rec_t    tr_head,
  output logic          tr_empty,
  output logic [LW-1:0] tr_level
);

  localparam int unsigned NC = 7;

  logic [CW-1:0] cnt [NC];
  logic [NC-1:0] hit;
  logic          push, lost, pop;

  trace_rec_t    fifo [DEPTH];
  logic [PW-1:0] wp, rp;

  assign tr_empty = (tr_level == '0);
  assign tr_head  = fifo[rp];
  assign pop      = tr_pop && !tr_empty;
  assign push     = enable && rec_valid && (tr_level != LW'(DEPTH) || pop);
  assign lost     = enable && rec_valid && !push;

  assign hit   = {lost, ev.stall, ev.miss, ev.wr_word, ev.rd_word, ev.wr_burst, ev.rd_burst};
  assign rdata = (sel < 3'(NC)) ? cnt[sel] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) cnt[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < NC; i++) cnt[i] <= '0;
    end else if (enable) begin
      for (int i = 0; i < NC; i++)
        if (hit[i] && cnt[i] != '1) cnt[i] <= cnt[i] + 1'b1;
    end
  end

  always_ff @(posedge clk) if (push && !clr) fifo[wp] <= rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      tr_level <= '0;
    end else if (clr) begin
      wp       <= '0;
      rp       <= '0;
      tr_level <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      tr_level <= tr_level + LW'(push) - LW'(pop);
    end
  end

endmodule
