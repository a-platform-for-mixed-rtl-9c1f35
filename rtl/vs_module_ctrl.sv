// vs_module_ctrl: parameters, start and completion of the HDL modules.
//
// The host software configures a module through a parameter structure before
// starting it; the original description gives each module sixteen parameters. This block
// holds them as NUM_MOD x NUM_PARAM registers of 32 bits that the host writes
// and reads (p_we/p_mod/p_idx, read data p_rdata is combinational) and that
// every module sees on its own param output at all times. Writing a module
// number to the start port (st_we/st_mod) pulses that module's start line one
// cycle later. A module reports the end of its task with a one-cycle done
// pulse; the block keeps it in done_status until the host clears it by
// writing ones (done_clr), and done_any flags that some module is done.
// Register widths, the start pulse and the done bookkeeping are this design's
// choices; only the software side (Start_module) is given.
module vs_module_ctrl #(
  parameter int unsigned N      = vs_pkg::NUM_MOD,
  parameter int unsigned NP     = vs_pkg::NUM_PARAM,
  parameter int unsigned DATA_W = vs_pkg::DATA_W,
  localparam int unsigned IW    = (N > 1)  ? $clog2(N)  : 1,
  localparam int unsigned PW    = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host: parameters
  input  logic              p_we,
  input  logic [IW-1:0]     p_mod,
  input  logic [PW-1:0]     p_idx,
  input  logic [DATA_W-1:0] p_wdata,
  output logic [DATA_W-1:0] p_rdata,
  // host: start and done
  input  logic              st_we,
  input  logic [IW-1:0]     st_mod,
  input  logic              done_clr_we,
  input  logic [N-1:0]      done_clr,
  output logic [N-1:0]      done_status,
  output logic              done_any,
  // modules
  output logic [DATA_W-1:0] param [N][NP],
  output logic [N-1:0]      start,
  input  logic [N-1:0]      done
);

  assign p_rdata  = param[p_mod][p_idx];
  assign done_any = |done_status;

  for (genvar m = 0; m < N; m++) begin : g_mod
    for (genvar p = 0; p < NP; p++) begin : g_par
      logic [DATA_W-1:0] r;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) r <= '0;
        else if (p_we && p_mod == IW'(m) && p_idx == PW'(p)) r <= p_wdata;
      end
      assign param[m][p] = r;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start       <= '0;
      done_status <= '0;
    end else begin
      start <= '0;
      if (st_we) start[st_mod] <= 1'b1;
      done_status <= (done_status & ~(done_clr_we ? done_clr : '0)) | done;
    end
  end

endmodule
