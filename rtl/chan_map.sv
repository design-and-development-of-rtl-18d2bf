// chan_map: channel mapping unit (the configuration logic).
//
// Routes any of the 64 interrupt sources to any of the 12 interrupt
// channels.  Channel c takes source number chmap[8c +: 6]: each CHMAP
// register holds the source numbers of four channels, one per byte, with
// channel 4r in the low byte of register r (CHMAP1 = channels 3..0).
// Bits 7:6 of each byte are ignored.  Because channel numbers stand for
// priority at the processor, rewriting CHMAP changes the priority of an
// interrupt at run time.  Several channels may take the same source.
//
// The byte-per-channel layout is read from the CHMAP register widths
// (3 x 32 bits for 12 channels); the rest is this implementation's choice.
// Purely combinational: rawint[c] = mevtflag[chmap byte c].
module chan_map #(
  parameter int unsigned NSRC = intc_pkg::N_SRC,
  parameter int unsigned NCH  = intc_pkg::N_CHAN
) (
  input  logic [NSRC-1:0]                mevtflag,  // masked sources
  input  logic [((NCH+3)/4)*32-1:0]      chmap,     // CHMAP registers
  output logic [NCH-1:0]                 rawint     // RAWINT
);

  localparam int unsigned SW = $clog2(NSRC);

  initial assert (SW <= 8) else $error("source number must fit a byte");

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      logic [SW-1:0] sel;
      sel = chmap[c*8 +: SW];
      rawint[c] = (32'(sel) < NSRC) ? mevtflag[sel] : 1'b0;
    end
  end

endmodule
