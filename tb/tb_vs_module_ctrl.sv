// tb_vs_module_ctrl: self-checking test of the parameter registers, the
// start pulse and the done bookkeeping, with the full 32 x 16 register file.
module tb_vs_module_ctrl;
  localparam int N = 32, NP = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic p_we = 0, st_we = 0, done_clr_we = 0, done_any;
  logic [4:0] p_mod = 0, st_mod = 0;
  logic [3:0] p_idx = 0;
  logic [31:0] p_wdata = 0, p_rdata;
  logic [N-1:0] done_clr = 0, done_status, start, done = 0;
  logic [31:0] param [N][NP];
  logic [31:0] model [N][NP];
  int checks = 0, failures = 0;

  vs_module_ctrl dut (.*);

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < N; m++) for (int p = 0; p < NP; p++) model[m][p] = 0;
    for (int k = 0; k < 600; k++) begin
      p_we = 1; p_mod = 5'($urandom); p_idx = 4'($urandom); p_wdata = $urandom;
      model[p_mod][p_idx] = p_wdata;
      @(negedge clk);
    end
    p_we = 0;
    for (int m = 0; m < N; m++) for (int p = 0; p < NP; p++) begin
      p_mod = 5'(m); p_idx = 4'(p);
      #1 check(p_rdata, model[m][p], "host read-back");
      check(param[m][p], model[m][p], "module view");
    end
    // start pulse: one cycle, one module
    st_we = 1; st_mod = 5'd17; @(negedge clk); st_we = 0;
    check(start, 32'h1 << 17, "start pulse");
    @(negedge clk); check(start, 0, "start is one cycle");
    // done bookkeeping
    check(done_any, 0, "nothing done");
    done[3] = 1; @(negedge clk); done = 0; done[30] = 1; @(negedge clk); done = 0;
    check(done_status, (32'h1 << 3) | (32'h1 << 30), "done latched");
    check(done_any, 1, "done_any");
    done_clr_we = 1; done_clr = 32'h1 << 3; @(negedge clk); done_clr_we = 0;
    check(done_status, 32'h1 << 30, "done W1C");
    done_clr_we = 1; done_clr = '1; @(negedge clk); done_clr_we = 0;
    check(done_any, 0, "all cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
