// int_ctrl: interrupt control logic - channel enable unit and INTFLAG.
//
// Each raw channel interrupt is gated by its INTENA bit, and the result is
// registered as INTFLAG, which drives the 12 IRQ outputs to the processor.
// INTFLAG follows the enabled raw interrupts: it falls one clock after the
// event flag behind it is cleared or masked or the channel is disabled; it
// is not sticky.  Registering the output (one clock of latency) is this
// implementation's choice.  Reset (synchronous, active high) clears it.
module int_ctrl #(
  parameter int unsigned NCH = intc_pkg::N_CHAN
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NCH-1:0] rawint,   // RAWINT from channel mapping
  input  logic [NCH-1:0] intena,   // INTENA
  output logic [NCH-1:0] intflag,  // INTFLAG, read back over the bus
  output logic [NCH-1:0] irq       // INT[11:0] to the processor
);

  always_ff @(posedge clk) begin
    if (rst) intflag <= '0;
    else     intflag <= rawint & intena;
  end

  assign irq = intflag;

endmodule
