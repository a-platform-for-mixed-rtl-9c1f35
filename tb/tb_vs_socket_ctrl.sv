// tb_vs_socket_ctrl: self-checking test of the seven-step socket protocol
// with four modules. A behavioural memory path stands in for the VMC: a read
// of n words at address a returns a, a+4, ... one per cycle; a write accepts
// one word per cycle. Checked: one session at a time, round-robin order,
// acknowledge/release pulses only to the owner, read data and write data
// reaching the right side, no release before the last word, start pulses.
module tb_vs_socket_ctrl;
  import vs_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sock_req_t mod_req [N];
  sock_rsp_t mod_rsp [N];
  logic [N-1:0] start = 0;
  logic cmd_rd, cmd_wr, out_valid, vmc_busy, in_valid, wr_ack, active;
  logic [VADDR_W-1:0] cmd_addr;
  logic [CNT_W-1:0] cmd_count;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic [1:0] owner;
  logic [MID_W-1:0] cmd_id;
  int ids [$];

  vs_socket_ctrl #(.N(N)) dut (.*);

  // behavioural memory path
  // (busy stays high two cycles after the last word, like a memory path
  // that is still draining)
  int rem = 0, tail = 0; bit wr_mode = 0; logic [31:0] ra = 0;
  logic [31:0] written [$];
  assign vmc_busy = rem != 0 || tail != 0;
  assign wr_ack   = wr_mode && rem != 0 && out_valid;
  always @(posedge clk) begin
    in_valid <= 0;
    if (tail != 0) tail <= tail - 1;
    if (rem == 1 && (!wr_mode || out_valid)) tail <= 2;
    if (rem == 0 && (cmd_rd || cmd_wr)) begin
      rem <= int'(cmd_count); wr_mode <= cmd_wr; ra <= cmd_addr;
      ids.push_back(int'(cmd_id));
    end else if (rem != 0) begin
      if (!wr_mode) begin
        in_valid <= 1; rd_data <= ra; ra <= ra + 4; rem <= rem - 1;
      end else if (out_valid) begin
        written.push_back(wr_data); rem <= rem - 1;
      end
    end
  end

  int checks = 0, failures = 0, holder = -1;
  int order [$];

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // acknowledge pulses must only reach the current owner
  always @(negedge clk)
    for (int i = 0; i < N; i++)
      if ((mod_rsp[i].req_ack || mod_rsp[i].rel_ack || mod_rsp[i].in_valid) && (!active || owner != 2'(i))) begin
        failures++; $display("FAIL response to module %0d that does not own the socket", i);
      end

  task automatic session(input int m, input bit wr, input logic [31:0] addr, input int n);
    int got = 0;
    mod_req[m].rd_req = !wr; mod_req[m].wr_req = wr;
    do @(negedge clk); while (!mod_rsp[m].req_ack);
    mod_req[m].rd_req = 0; mod_req[m].wr_req = 0;
    checks++;
    if (holder != -1) begin failures++; $display("FAIL two sessions at once"); end
    holder = m; order.push_back(m);
    @(negedge clk);  // step 3 follows the acknowledge
    mod_req[m].mem_rd = !wr; mod_req[m].mem_wr = wr;
    mod_req[m].addr = addr; mod_req[m].count = CNT_W'(n); mod_req[m].id = MID_W'(m);
    @(negedge clk);
    mod_req[m].mem_rd = 0; mod_req[m].mem_wr = 0;
    while (got < n) begin
      if (wr) begin
        mod_req[m].out_valid = 1; mod_req[m].wr_data = 32'(m << 24) + 32'(got);
        #1 if (mod_rsp[m].wr_ack) got++;
      end else if (mod_rsp[m].in_valid) begin
        check(mod_rsp[m].rd_data, addr + 4 * got, $sformatf("module %0d read data", m));
        got++;
      end
      @(negedge clk);
    end
    mod_req[m].out_valid = 0;
    mod_req[m].rel_req = 1;
    holder = -1;
    do @(negedge clk); while (!mod_rsp[m].rel_ack);
    check(vmc_busy, 0, "release only after the last word");
    mod_req[m].rel_req = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) mod_req[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // four modules ask at once: served 0,1,2,3
    fork
      session(0, 0, 32'h1000, 5);
      session(1, 1, 32'h2000, 3);
      session(2, 0, 32'h3000, 4);
      session(3, 1, 32'h4000, 2);
    join
    check(order.size(), 4, "sessions");
    for (int i = 0; i < 4; i++) check(order[i], i, "round-robin order");
    for (int i = 0; i < 4; i++) check(ids[i], i, "module id passed with the transfer");
    check(written.size(), 5, "words written");
    if (written.size() == 5) begin
      check(written[0], 32'h0100_0000, "write 1.0"); check(written[2], 32'h0100_0002, "write 1.2");
      check(written[3], 32'h0300_0000, "write 3.0"); check(written[4], 32'h0300_0001, "write 3.1");
    end
    // pointer is back at 0: modules 3 and 1 ask, 1 goes first
    order.delete();
    fork
      session(3, 0, 32'h5000, 2);
      session(1, 0, 32'h6000, 2);
    join
    check(order[0], 1, "rotating priority, first"); check(order[1], 3, "rotating priority, second");
    // start pulses are passed to the module they belong to
    @(negedge clk); start = 4'b0100; #1;
    check(mod_rsp[2].start, 1, "start to module 2"); check(mod_rsp[0].start, 0, "no start to module 0");
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
