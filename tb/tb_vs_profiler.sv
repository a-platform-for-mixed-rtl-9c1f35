// tb_vs_profiler: self-checking test of the profiling counters and trace.
// Random event patterns are applied while enabled and disabled; each counter
// is compared with counts kept by the testbench, then cleared. The trace is
// filled past its depth, drained and compared record by record, including
// the count of lost records and a push and pop in the same cycle.
module tb_vs_profiler;
  import vs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, clr = 0;
  prof_ev_t ev = '0;
  logic [2:0] sel = 0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  int exp [7];
  logic rec_valid = 0, tr_pop = 0, tr_empty;
  trace_rec_t rec = '0, tr_head;
  logic [6:0] tr_level;
  trace_rec_t sent [$];

  vs_profiler dut (.*);

  function automatic trace_rec_t mk(input int k);
    trace_rec_t r;
    r.is_write = k[0];
    r.id       = MID_W'(k * 3);
    r.count    = CNT_W'(k + 1);
    r.addr     = 32'h1000_0000 + 32'(k * 256);
    return r;
  endfunction

  task automatic check(input logic [31:0] got, exp_v, input string what);
    checks++;
    if (got !== exp_v) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp_v); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (exp[i]) exp[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      logic [5:0] r;
      r = 6'($urandom);
      enable = (c % 7) != 0;
      ev = {r[0], r[1], r[2], r[3], r[4], r[5]};  // rd_burst is the MSB field
      if (enable) for (int i = 0; i < 6; i++) if (r[i]) exp[i]++;
      @(negedge clk);
    end
    ev = '0;
    for (int i = 0; i < 7; i++) begin
      sel = 3'(i); #1 check(rdata, exp[i], $sformatf("counter %0d", i));
    end
    sel = 3'd7; #1 check(rdata, 0, "unused selector");
    @(negedge clk);
    clr = 1; ev = '1; @(negedge clk); clr = 0; ev = '0;
    for (int i = 0; i < 7; i++) begin
      sel = 3'(i); #1 check(rdata, 0, $sformatf("counter %0d cleared", i));
    end
    @(negedge clk);
    // trace: 70 records offered while enabled, 64 fit, 6 are lost
    enable = 1;
    check(tr_empty, 1, "trace empty after clear");
    for (int k = 0; k < 70; k++) begin
      rec_valid = 1; rec = mk(k);
      if (k < 64) sent.push_back(rec);
      @(negedge clk);
    end
    // disabled: not recorded
    enable = 0; rec = mk(99); @(negedge clk); rec_valid = 0;
    check(tr_level, 64, "trace full");
    sel = 3'd6; #1 check(rdata, 6, "lost records counted");
    // full: a push together with a pop is kept
    enable = 1; rec_valid = 1; rec = mk(70); tr_pop = 1;
    check(tr_head, sent.pop_front(), "oldest record");
    sent.push_back(mk(70));
    @(negedge clk); rec_valid = 0; tr_pop = 0;
    sel = 3'd6; #1 check(rdata, 6, "push with pop not lost");
    check(tr_level, 64, "still full");
    while (!tr_empty) begin
      check(tr_head, sent.pop_front(), "trace record");
      tr_pop = 1; @(negedge clk); tr_pop = 0;
    end
    check(sent.size(), 0, "all records drained");
    tr_pop = 1; @(negedge clk); tr_pop = 0;
    check(tr_level, 0, "pop on empty ignored");
    rec_valid = 1; rec = mk(1); @(negedge clk); rec_valid = 0;
    clr = 1; @(negedge clk); clr = 0;
    check(tr_empty, 1, "clear empties the trace");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
