// evt_combine: event masking and combination unit.
//
// The 60 event flags are split into 4 groups of 15 consecutive flags
// (group g = flags 15g .. 15g+14).  Each flag is masked by its EVTMASK bit
// (1 = masked), and each group's masked flags are ORed into one combination
// interrupt, comb_flag[g], so that one service routine can answer several
// events at once.  The combination interrupts become sources 60..63 and are
// masked in turn by EVTMASK[63:60].  The result, mevtflag[63:0], is the set
// of 64 interrupt sources offered to the channel mapping unit.
//
// The grouping (4 groups over 60 inputs, 64 sources) follows the design
// description; the choice of consecutive inputs per group and of
// "1 = masked" is this implementation's.  Purely combinational.
module evt_combine #(
  parameter int unsigned NIN  = intc_pkg::N_IN,
  parameter int unsigned NGRP = intc_pkg::N_GRP
) (
  input  logic [NIN-1:0]      evtflag,    // event flags [59:0]
  input  logic [NIN+NGRP-1:0] evtmask,    // EVTMASK, 1 = masked
  output logic [NGRP-1:0]     comb_flag,  // unmasked combination flags
  output logic [NIN+NGRP-1:0] mevtflag    // masked sources (MEVTFLAG)
);

  localparam int unsigned GSZ = NIN / NGRP;

  initial assert (GSZ * NGRP == NIN) else $error("NIN must divide into NGRP groups");

  logic [NIN-1:0] masked;
  assign masked = evtflag & ~evtmask[NIN-1:0];

  always_comb begin
    for (int g = 0; g < NGRP; g++) comb_flag[g] = |masked[g*GSZ +: GSZ];
  end

  assign mevtflag = {comb_flag & ~evtmask[NIN+NGRP-1:NIN], masked};

endmodule
