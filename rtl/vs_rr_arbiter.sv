// vs_rr_arbiter: round-robin arbiter used by the socket controller to choose
// which of the HDL modules that ask for the platform gets it next.
//
// The search starts at the requester after the one granted last, so every
// requester is served within N grants. gnt_valid/gnt_idx are combinational
// from req; the pointer moves only when the caller takes the grant (take=1).
// Round robin is this design's choice; the original description does not say how the
// 32 modules share the platform.
module vs_rr_arbiter #(
  parameter int unsigned N = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          take,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx
);

  logic [IW-1:0] ptr;

  always_comb begin
    int unsigned k;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned i = 0; i < N; i++) begin
      k = (int'(ptr) + i) % N;
      if (!gnt_valid && req[k]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (take && gnt_valid) ptr <= (gnt_idx == IW'(N-1)) ? '0 : gnt_idx + 1'b1;
  end

endmodule
