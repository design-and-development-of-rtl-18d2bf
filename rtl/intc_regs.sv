// intc_regs: register file of the interrupt controller.
//
// Holds the registers named in the design description - EVTFLAG, EVTMASK,
// CHMAP1..3, INTENA - and reads back INTFLAG, which lives in int_ctrl.
// The offsets are listed in intc_pkg.
//
// Event flags [59:0] are set by the interrupt inputs (level sensitive: a
// flag is set in every cycle its input is high) and by software writing 1s
// to EVTFLAG_LO/HI, and cleared by software writing 1s to EVTCLR_LO/HI.
// A set wins over a clear in the same cycle, so a flag whose input is still
// high cannot be cleared.  Flags [63:60] are the group combination
// interrupts computed in evt_combine (comb_flag) and are read-only here.
// The set/clear scheme, level sensitivity and the priority of set over clear
// are this implementation's choices.
//
// Timing: a write (reg_wr.en, one cycle) takes effect at the next clock
// edge; an input raises its flag one clock after it is sampled high.
// Reads are combinational in rd_addr.  All registers reset to 0
// (synchronous, active-high reset).  Byte strobes are honoured on every
// write.
module intc_regs
  import intc_pkg::*;
#(
  parameter int unsigned NIN  = intc_pkg::N_IN,
  parameter int unsigned NGRP = intc_pkg::N_GRP,
  parameter int unsigned NCH  = intc_pkg::N_CHAN
) (
  input  logic                 clk,
  input  logic                 rst,
  input  reg_wr_t              reg_wr,
  input  logic [ADDR_W-1:0]    rd_addr,
  output logic [DATA_W-1:0]    rd_data,
  input  logic [NIN-1:0]       intr_in,     // peripheral interrupt lines
  input  logic [NGRP-1:0]      comb_flag,   // combination interrupts
  input  logic [NCH-1:0]       intflag,     // channel flags (INTFLAG)
  output logic [NIN-1:0]       evtflag,     // event flags [59:0]
  output logic [NIN+NGRP-1:0]  evtmask,     // EVTMASK
  output logic [N_CHMAP*32-1:0] chmap,      // CHMAP3,CHMAP2,CHMAP1
  output logic [NCH-1:0]       intena       // INTENA
);

  localparam int unsigned NSRC = NIN + NGRP;

  initial begin
    assert (NSRC <= 64) else $error("register map holds at most 64 sources");
    assert (NCH <= 4 * N_CHMAP && NCH <= 32) else $error("too many channels");
  end

  logic [63:0]          set_bits, clr_bits;
  logic [63:0]          mask_q;
  logic [DATA_W-1:0]    wmask;
  logic [N_CHMAP*32-1:0] chmap_q;
  logic [31:0]          intena_q;
  logic [NIN-1:0]       flag_q;
  logic [7:0]           wa;

  assign wmask = strb_mask(reg_wr.strb);
  assign wa    = reg_wr.addr[7:0];

  // Write-1-to-set and write-1-to-clear pulses for the 64 flag positions.
  always_comb begin
    set_bits = '0;
    clr_bits = '0;
    if (reg_wr.en) begin
      unique case (wa)
        A_EVTFLAG_LO: set_bits[31:0]  = reg_wr.data & wmask;
        A_EVTFLAG_HI: set_bits[63:32] = reg_wr.data & wmask;
        A_EVTCLR_LO:  clr_bits[31:0]  = reg_wr.data & wmask;
        A_EVTCLR_HI:  clr_bits[63:32] = reg_wr.data & wmask;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flag_q <= '0;
    end else begin
      flag_q <= (flag_q & ~clr_bits[NIN-1:0]) | set_bits[NIN-1:0] | intr_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mask_q   <= '0;
      chmap_q  <= '0;
      intena_q <= '0;
    end else if (reg_wr.en) begin
      unique case (wa)
        A_EVTMASK_LO: mask_q[31:0]  <= (mask_q[31:0]  & ~wmask) | (reg_wr.data & wmask);
        A_EVTMASK_HI: mask_q[63:32] <= (mask_q[63:32] & ~wmask) | (reg_wr.data & wmask);
        A_INTENA:     intena_q      <= (intena_q      & ~wmask) | (reg_wr.data & wmask);
        default: begin
          for (int r = 0; r < N_CHMAP; r++)
            if (wa == 8'(A_CHMAP1 + 4 * r))
              chmap_q[r*32 +: 32] <= (chmap_q[r*32 +: 32] & ~wmask) | (reg_wr.data & wmask);
        end
      endcase
    end
  end

  assign evtflag = flag_q;
  assign evtmask = mask_q[NSRC-1:0];
  assign chmap   = chmap_q;
  assign intena  = intena_q[NCH-1:0];

  // Read-back.  Unused high bits read as 0.
  logic [63:0] flag_all, mask_all;
  logic [31:0] intena_rd, intflag_rd;
  always_comb begin
    flag_all   = 64'({comb_flag, flag_q});
    mask_all   = 64'(mask_q[NSRC-1:0]);
    intena_rd  = 32'(intena_q[NCH-1:0]);
    intflag_rd = 32'(intflag);
    rd_data    = '0;
    unique case (rd_addr[7:0])
      A_EVTFLAG_LO, A_EVTCLR_LO: rd_data = flag_all[31:0];
      A_EVTFLAG_HI, A_EVTCLR_HI: rd_data = flag_all[63:32];
      A_EVTMASK_LO: rd_data = mask_all[31:0];
      A_EVTMASK_HI: rd_data = mask_all[63:32];
      A_INTENA:     rd_data = intena_rd;
      A_INTFLAG:    rd_data = intflag_rd;
      default: begin
        for (int r = 0; r < N_CHMAP; r++)
          if (rd_addr[7:0] == 8'(A_CHMAP1 + 4 * r)) rd_data = chmap_q[r*32 +: 32];
      end
    endcase
  end

endmodule
