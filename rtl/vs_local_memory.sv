// vs_local_memory: the card-local memory of the Virtual Socket platform.
//
// The original description gives its size, 32 pages of 2 kB, and says the host fills its
// pages while the HDL modules read and write them. Here it is a true
// dual-port RAM of 32-bit words (16384 words by default): port A belongs to
// the host side, port B to the Virtual Memory Controller. Both ports are
// synchronous: an address presented with en=1 returns its word on q one clock
// later; with we=1 the word is written instead (q then shows the old word).
// If both ports write the same word in the same cycle, port B wins. Word
// width and port structure are this design's choices.
module vs_local_memory #(
  parameter int unsigned WORDS  = vs_pkg::MEM_WORDS,
  parameter int unsigned DATA_W = vs_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  // port A: host
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_q,
  // port B: HDL modules through the VMC
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_q
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_q <= mem[a_addr];
      if (a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_q <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
