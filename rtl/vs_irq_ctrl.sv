// vs_irq_ctrl: interrupt controller of the card.
//
// The original description says the WMU raises an interrupt through the card's interrupt
// controller when it meets an unknown virtual address, and that the host
// software then fills the page. This block latches one-cycle event pulses from
// NSRC sources into a status register, masks them with an enable register and
// drives one level-sensitive interrupt line to the host. The host clears
// status bits by writing ones (W1C); an event arriving in the same cycle as
// its clear wins. In this platform source 0 is the WMU miss and source 1 is
// "a module has finished". Register layout and W1C clearing are this design's
// choices.
module vs_irq_ctrl #(
  parameter int unsigned NSRC = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src,
  input  logic            en_we,
  input  logic [NSRC-1:0] en_wdata,
  input  logic            clr_we,
  input  logic [NSRC-1:0] clr,
  output logic [NSRC-1:0] status,
  output logic [NSRC-1:0] enable,
  output logic            irq
);

  assign irq = |(status & enable);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
      enable <= '0;
    end else begin
      if (en_we) enable <= en_wdata;
      status <= (status & ~(clr_we ? clr : '0)) | src;
    end
  end

endmodule
