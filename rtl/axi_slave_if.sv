// axi_slave_if: AXI4-Lite slave port of the interrupt controller.
//
// Turns AXI4-Lite transfers into single-cycle register writes (reg_wr) and
// combinational register reads (rd_addr -> rd_data).  Address and data are
// 32 bits wide, as described for this controller.
//
// The write side is the five-state machine of the design description:
//   IDLE          AWREADY and WREADY high.  AWVALID=1,WVALID=1 -> WRITING;
//                 AWVALID=1,WVALID=0 -> WRITE_ADDRESS; AWVALID=0,WVALID=1
//                 -> WRITE_VALID.  Whatever is valid is captured.
//   WRITE_ADDRESS address held, WREADY high, waits for WVALID -> WRITING.
//   WRITE_VALID   data held, AWREADY high, waits for AWVALID -> WRITING.
//   WRITING       issues the one-cycle register write -> RESPONSE.
//   RESPONSE      BVALID high with BRESP until BREADY -> IDLE.
// Timing: if the last of the two handshakes (AW, W) completes at clock edge
// k, the register is written at edge k+1 and BVALID rises at that same
// edge; a read handshake at edge k gives RVALID from edge k+1.
// The five states and the IDLE exits on AWVALID follow the design
// description.  The data-first exit of IDLE, the exits of WRITE_ADDRESS and
// WRITE_VALID and the whole read side are this implementation's choice.
// The read channel is a two-state machine (ARREADY in R_IDLE; the register value is
// captured on the address handshake and shown with RVALID in R_DATA until
// RREADY).  Unmapped or unaligned addresses answer SLVERR and write nothing.
// READY signals depend only on the state, never on VALID in the same cycle.
// rd_addr is ARADDR itself: the register file decodes it combinationally and
// the value is captured on the read-address handshake.
// Reset is synchronous and active high.
module axi_slave_if
  import intc_pkg::*;
#(
  parameter int unsigned AW = intc_pkg::ADDR_W,
  parameter int unsigned DW = intc_pkg::DATA_W
) (
  input  logic          clk,
  input  logic          rst,
  // write address channel
  input  logic [AW-1:0] s_axi_awaddr,
  input  logic [2:0]    s_axi_awprot,
  input  logic          s_axi_awvalid,
  output logic          s_axi_awready,
  // write data channel
  input  logic [DW-1:0] s_axi_wdata,
  input  logic [DW/8-1:0] s_axi_wstrb,
  input  logic          s_axi_wvalid,
  output logic          s_axi_wready,
  // write response channel
  output logic [1:0]    s_axi_bresp,
  output logic          s_axi_bvalid,
  input  logic          s_axi_bready,
  // read address channel
  input  logic [AW-1:0] s_axi_araddr,
  input  logic [2:0]    s_axi_arprot,
  input  logic          s_axi_arvalid,
  output logic          s_axi_arready,
  // read data channel
  output logic [DW-1:0] s_axi_rdata,
  output logic [1:0]    s_axi_rresp,
  output logic          s_axi_rvalid,
  input  logic          s_axi_rready,
  // register file side
  output reg_wr_t       reg_wr,
  output logic [AW-1:0] rd_addr,
  input  logic [DW-1:0] rd_data
);

  typedef enum logic [2:0] {
    W_IDLE, W_WRITE_ADDRESS, W_WRITE_VALID, W_WRITING, W_RESPONSE
  } wstate_e;

  typedef enum logic {R_IDLE, R_DATA} rstate_e;

  wstate_e           wstate;
  rstate_e           rstate;
  logic [AW-1:0]     awaddr_q;
  logic [DW-1:0]     wdata_q;
  logic [DW/8-1:0]   wstrb_q;
  logic [1:0]        bresp_q;
  logic [DW-1:0]     rdata_q;
  logic [1:0]        rresp_q;

  // Protection bits carry no meaning for this slave.
  logic unused_prot;
  assign unused_prot = ^{s_axi_awprot, s_axi_arprot};

  assign s_axi_awready = (wstate == W_IDLE) || (wstate == W_WRITE_VALID);
  assign s_axi_wready  = (wstate == W_IDLE) || (wstate == W_WRITE_ADDRESS);
  assign s_axi_bvalid  = (wstate == W_RESPONSE);
  assign s_axi_bresp   = bresp_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wstate   <= W_IDLE;
      awaddr_q <= '0;
      wdata_q  <= '0;
      wstrb_q  <= '0;
      bresp_q  <= RESP_OKAY;
    end else begin
      if (s_axi_awvalid && s_axi_awready) awaddr_q <= s_axi_awaddr;
      if (s_axi_wvalid && s_axi_wready) begin
        wdata_q <= s_axi_wdata;
        wstrb_q <= s_axi_wstrb;
      end
      unique case (wstate)
        W_IDLE: begin
          if (s_axi_awvalid && s_axi_wvalid)  wstate <= W_WRITING;
          else if (s_axi_awvalid)             wstate <= W_WRITE_ADDRESS;
          else if (s_axi_wvalid)              wstate <= W_WRITE_VALID;
        end
        W_WRITE_ADDRESS: if (s_axi_wvalid)  wstate <= W_WRITING;
        W_WRITE_VALID:   if (s_axi_awvalid) wstate <= W_WRITING;
        W_WRITING: begin
          bresp_q <= reg_addr_valid(awaddr_q) ? RESP_OKAY : RESP_SLVERR;
          wstate  <= W_RESPONSE;
        end
        W_RESPONSE: if (s_axi_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  always_comb begin
    reg_wr.en   = (wstate == W_WRITING) && reg_addr_valid(awaddr_q);
    reg_wr.addr = awaddr_q;
    reg_wr.data = wdata_q;
    reg_wr.strb = wstrb_q;
  end

  // Read channel.
  assign s_axi_arready = (rstate == R_IDLE);
  assign s_axi_rvalid  = (rstate == R_DATA);
  assign s_axi_rdata   = rdata_q;
  assign s_axi_rresp   = rresp_q;
  assign rd_addr       = s_axi_araddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      rstate  <= R_IDLE;
      rdata_q <= '0;
      rresp_q <= RESP_OKAY;
    end else begin
      unique case (rstate)
        R_IDLE: if (s_axi_arvalid) begin
          rdata_q <= reg_addr_valid(s_axi_araddr) ? rd_data : '0;
          rresp_q <= reg_addr_valid(s_axi_araddr) ? RESP_OKAY : RESP_SLVERR;
          rstate  <= R_DATA;
        end
        R_DATA: if (s_axi_rready) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // Handshake rules: a response, once offered, stays until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  a_one_write: assert property (@(posedge clk) disable iff (rst)
    reg_wr.en |=> !reg_wr.en);

endmodule
