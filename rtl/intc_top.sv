// intc_top: AXI4-Lite multi-channel interrupt controller.
//
// Collects 60 peripheral interrupt lines into event flags, masks them,
// forms one combination interrupt for each of 4 groups of 15 lines (64
// sources in all), routes any source to any of 12 interrupt channels, gates
// each channel with its enable bit and drives the 12 IRQ lines to the
// processor.  All configuration is done through registers on a 32-bit
// AXI4-Lite slave port (offsets in intc_pkg).
//
//   intr_in -> intc_regs (EVTFLAG) -> evt_combine (EVTMASK, groups)
//           -> chan_map (CHMAP) -> int_ctrl (INTENA, INTFLAG) -> irq
//
// Latency: an input sampled high at clock edge k sets its flag at k; the
// enabled channel it is mapped to raises irq at edge k+1, i.e. irq is high
// two clock edges after the input is first presented.  A register write
// takes effect at the clock edge after its address and data handshakes,
// the same edge at which BVALID rises; so a configuration change reaches
// irq one edge after BVALID.  Single clock domain,
// synchronous active-high reset.  The block structure and counts follow
// the design description; the register map, set/clear scheme and timing
// are this implementation's choices.
module intc_top
  import intc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [N_IN-1:0]   intr_in,
  output logic [N_CHAN-1:0] irq,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic [2:0]        s_axi_awprot,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [DATA_W-1:0] s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic [2:0]        s_axi_arprot,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [DATA_W-1:0] s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready
);

  reg_wr_t                reg_wr;
  logic [ADDR_W-1:0]      rd_addr;
  logic [DATA_W-1:0]      rd_data;
  logic [N_IN-1:0]        evtflag;
  logic [N_SRC-1:0]       evtmask;
  logic [N_SRC-1:0]       mevtflag;
  logic [N_GRP-1:0]       comb_flag;
  logic [N_CHMAP*32-1:0]  chmap;
  logic [N_CHAN-1:0]      intena;
  logic [N_CHAN-1:0]      rawint;
  logic [N_CHAN-1:0]      intflag;

  axi_slave_if u_axi (
    .clk, .rst,
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .reg_wr, .rd_addr, .rd_data
  );

  intc_regs u_regs (
    .clk, .rst, .reg_wr, .rd_addr, .rd_data,
    .intr_in, .comb_flag, .intflag,
    .evtflag, .evtmask, .chmap, .intena
  );

  evt_combine u_comb (
    .evtflag, .evtmask, .comb_flag, .mevtflag
  );

  chan_map u_map (
    .mevtflag, .chmap, .rawint
  );

  int_ctrl u_ctrl (
    .clk, .rst, .rawint, .intena, .intflag, .irq
  );

endmodule
