// tb_vs_local_memory: self-checking test of the dual-port local memory.
// Writes random words through both ports (reference model: a plain array in
// the testbench), reads them back through the other port, checks the
// one-cycle read latency and the port-B-wins rule on a same-word collision.
module tb_vs_local_memory;
  localparam int unsigned WORDS = 16384;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_q, b_q;
  int checks = 0, failures = 0;
  logic [31:0] model [logic [AW-1:0]];

  vs_local_memory dut (.*);

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] adr [64];
    @(posedge clk);
    // port A writes 32 words, port B writes 32 others
    for (int i = 0; i < 64; i++) begin
      logic [AW-1:0] x;
      do x = AW'($urandom); while (model.exists(x));
      adr[i] = x;
      model[x] = $urandom;
    end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = adr[i]; a_wdata = model[adr[i]];
      b_en = 1; b_we = 1; b_addr = adr[32+i]; b_wdata = model[adr[32+i]];
    end
    @(negedge clk); a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    // read everything back crosswise: A reads B's words and vice versa
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      a_en = 1; a_addr = adr[32+i];
      b_en = 1; b_addr = adr[i];
      @(posedge clk); #1;
      check(a_q, model[adr[32+i]], "port A read");
      check(b_q, model[adr[i]], "port B read");
    end
    // latency: data changes only at the clock edge after the address
    @(negedge clk); a_en = 1; a_we = 0; a_addr = adr[0];
    @(posedge clk); #1;
    @(negedge clk); a_addr = adr[1];
    #1 check(a_q, model[adr[0]], "q holds until the next edge");
    @(posedge clk); #1 check(a_q, model[adr[1]], "q after one edge");
    // collision: both ports write the same word, port B wins
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = adr[5]; a_wdata = 32'hAAAA_0001;
    b_en = 1; b_we = 1; b_addr = adr[5]; b_wdata = 32'hBBBB_0002;
    @(negedge clk); a_we = 0; b_en = 0; b_we = 0;
    @(posedge clk); #1 check(a_q, 32'hBBBB_0002, "collision won by port B");
    // disabled port keeps its output
    @(negedge clk); a_en = 0; a_addr = adr[7];
    @(posedge clk); #1 check(a_q, 32'hBBBB_0002, "q kept while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
