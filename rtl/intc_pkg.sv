// intc_pkg: sizes, register map and shared types of the multi-channel
// interrupt controller.
//
// The controller takes 60 interrupt inputs, splits them into 4 groups of 15
// and forms one combination interrupt per group, which gives 64 interrupt
// sources.  Any source can be routed to any of 12 output channels.  These
// counts follow the design description; the register map (byte offsets
// below) and the register-bus struct are this implementation's own choice,
// since only the register names and widths are given.
//
// Register map (32-bit registers, byte addresses on the AXI4-Lite port):
//   0x00 EVTFLAG_LO  R: event flags [31:0]        W: write 1 to set
//   0x04 EVTFLAG_HI  R: event flags [63:32]       W: write 1 to set (59:32)
//   0x08 EVTCLR_LO   R: event flags [31:0]        W: write 1 to clear
//   0x0C EVTCLR_HI   R: event flags [63:32]       W: write 1 to clear (59:32)
//   0x10 EVTMASK_LO  RW event mask [31:0]  (1 = source masked)
//   0x14 EVTMASK_HI  RW event mask [63:32]
//   0x18 CHMAP1      RW source number of channels 3..0, one byte each
//   0x1C CHMAP2      RW source number of channels 7..4
//   0x20 CHMAP3      RW source number of channels 11..8
//   0x24 INTENA      RW channel enable [11:0]
//   0x28 INTFLAG     R  channel interrupt flags [11:0] (= IRQ outputs)
// Event flag bits 63:60 are the four combination interrupts; they are
// computed from bits 59:0 and cannot be set or cleared directly.
package intc_pkg;

  localparam int unsigned N_IN     = 60;   // interrupt inputs
  localparam int unsigned N_GRP    = 4;    // combination groups
  localparam int unsigned N_SRC    = N_IN + N_GRP;  // 64 interrupt sources
  localparam int unsigned N_CHAN   = 12;   // interrupt output channels
  localparam int unsigned N_CHMAP  = (N_CHAN + 3) / 4; // CHMAP registers

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;

  // Byte offsets of the registers.
  typedef enum logic [7:0] {
    A_EVTFLAG_LO = 8'h00,
    A_EVTFLAG_HI = 8'h04,
    A_EVTCLR_LO  = 8'h08,
    A_EVTCLR_HI  = 8'h0C,
    A_EVTMASK_LO = 8'h10,
    A_EVTMASK_HI = 8'h14,
    A_CHMAP1     = 8'h18,
    A_CHMAP2     = 8'h1C,
    A_CHMAP3     = 8'h20,
    A_INTENA     = 8'h24,
    A_INTFLAG    = 8'h28
  } reg_addr_e;

  // AXI response codes.
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  // One register write, as issued by the AXI slave to the register file.
  typedef struct packed {
    logic                en;
    logic [ADDR_W-1:0]   addr;
    logic [DATA_W-1:0]   data;
    logic [DATA_W/8-1:0] strb;
  } reg_wr_t;

  // True when a byte address selects one of the registers above.
  function automatic logic reg_addr_valid(input logic [ADDR_W-1:0] addr);
    logic [ADDR_W-1:0] top_bits;
    top_bits = addr >> 8;
    if (top_bits != '0 || addr[1:0] != 2'b00) return 1'b0;
    return addr[7:0] <= A_INTFLAG;
  endfunction

  // Expands byte strobes into a bit mask.
  function automatic logic [DATA_W-1:0] strb_mask(input logic [DATA_W/8-1:0] strb);
    logic [DATA_W-1:0] m;
    for (int b = 0; b < DATA_W/8; b++) m[b*8 +: 8] = {8{strb[b]}};
    return m;
  endfunction

endpackage
