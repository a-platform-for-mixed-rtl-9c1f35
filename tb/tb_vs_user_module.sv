// tb_vs_user_module: behavioural model of a user HDL module for the platform
// testbench. It does what a hardware function called from the reference
// software would do with four parameters: on start it reads P2 words from
// virtual (or local) address P0, adds P3 to each and writes the results to
// address P1, moving CH words per session, then pulses done. Each chunk is a
// read session followed by a write session, following the seven protocol
// steps: request, acknowledge, transfer parameters, data, release, release
// acknowledge.
module tb_vs_user_module
  import vs_pkg::*;
#(
  parameter int ID = 0,
  parameter int CH = 64
) (
  input  logic              clk,
  input  sock_rsp_t         rsp,
  input  logic [DATA_W-1:0] param [NUM_PARAM],
  output sock_req_t         req
);

  logic [DATA_W-1:0] buf_q [CH];
  int sessions = 0;

  task automatic session(input bit wr, input logic [31:0] addr, input int n);
    int got = 0;
    req.rd_req = !wr; req.wr_req = wr;
    do @(negedge clk); while (!rsp.req_ack);
    req.rd_req = 0; req.wr_req = 0;
    @(negedge clk);
    req.mem_rd = !wr; req.mem_wr = wr; req.id = MID_W'(ID);
    req.addr = addr; req.count = CNT_W'(n);
    @(negedge clk);
    req.mem_rd = 0; req.mem_wr = 0;
    while (got < n) begin
      if (wr) begin
        req.out_valid = 1; req.wr_data = buf_q[got];
        #1 if (rsp.wr_ack) got++;
      end else if (rsp.in_valid) begin
        buf_q[got] = rsp.rd_data + param[3];
        got++;
      end
      @(negedge clk);
    end
    req.out_valid = 0;
    req.rel_req = 1;
    do @(negedge clk); while (!rsp.rel_ack);
    req.rel_req = 0;
    sessions++;
  endtask

  initial begin
    req = '0;
    forever begin
      @(negedge clk);
      if (rsp.start) begin
        int len, done_w;
        len = int'(param[2]);
        done_w = 0;
        while (done_w < len) begin
          int n;
          n = (len - done_w < CH) ? len - done_w : CH;
          session(0, param[0] + 32'(4 * done_w), n);
          session(1, param[1] + 32'(4 * done_w), n);
          done_w += n;
        end
        req.done = 1;
        @(negedge clk);
        req.done = 0;
      end
    end
  end

endmodule
