// tb_vs_irq_ctrl: self-checking test of the interrupt controller: event
// pulses latch, the enable mask gates the line, write-one-to-clear, and an
// event in the same cycle as its clear stays set.
module tb_vs_irq_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] src = 0, en_wdata = 0, clr = 0, status, enable;
  logic en_we = 0, clr_we = 0, irq;
  int checks = 0, failures = 0;

  vs_irq_ctrl #(.NSRC(2)) dut (.*);

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(status, 0, "reset status"); check(irq, 0, "reset irq");
    src = 2'b01; @(negedge clk); src = 0;
    check(status, 2'b01, "miss latched"); check(irq, 0, "masked");
    en_we = 1; en_wdata = 2'b01; @(negedge clk); en_we = 0;
    check(enable, 2'b01, "enable"); check(irq, 1, "irq raised");
    src = 2'b10; @(negedge clk); src = 0;
    check(status, 2'b11, "both latched");
    clr_we = 1; clr = 2'b01; @(negedge clk); clr_we = 0;
    check(status, 2'b10, "W1C bit0"); check(irq, 0, "irq low, bit1 masked");
    en_we = 1; en_wdata = 2'b10; @(negedge clk); en_we = 0;
    check(irq, 1, "bit1 enabled");
    clr_we = 1; clr = 2'b10; src = 2'b10; @(negedge clk); clr_we = 0; src = 0;
    check(status, 2'b10, "event beats clear");
    clr_we = 1; clr = 2'b11; @(negedge clk); clr_we = 0;
    check(status, 0, "all cleared"); check(irq, 0, "irq low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
