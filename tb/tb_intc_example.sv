// tb_intc_example: replays a typical configuration of the controller at full
// size and checks the IRQ vector after each step against values worked out
// by hand.
//
//   CHMAP1 = 0x04030201  channels 0..3  <- sources 1, 2, 3, 4
//   CHMAP2 = 0x090a0b0c  channels 4..7  <- sources 12, 11, 10, 9
//   CHMAP3 = 0x00000000  channels 8..11 <- source 0
//   inputs 13..0 pulse once, so flags 0..13 are set
//   INTENA = 0xfff  -> irq = 0xfff (every mapped source is pending)
//   INTENA = 0xffc  -> irq = 0xffc (channels 0, 1 off)
//   clear all but flags 4 and 12 -> irq = 0x018 (ch3 <- 4, ch4 <- 12)
//   clear flag 12   -> irq = 0x008
//   clear flag 4    -> irq = 0x000
//   INTENA = 0x000
// It also checks that each change reaches irq exactly one clock edge after
// BVALID rises, and that INTFLAG reads back the same vector.
module tb_intc_example;
  import intc_pkg::*;

  logic clk = 0, rst;
  logic [59:0] intr_in;
  logic [11:0] irq;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [3:0]  wstrb;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  logic [1:0] bresp, rresp;
  int checks = 0, failures = 0;

  intc_top dut (
    .clk, .rst, .intr_in, .irq,
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Write a register; then check that irq changes to 'exp' exactly one edge
  // after BVALID (it must still show the old value while BVALID is up).
  task automatic step(logic [31:0] a, logic [31:0] d, logic [11:0] exp, string tag);
    logic [11:0] old;
    logic [31:0] rd;
    old = irq;
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hf; wvalid = 1;
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    expect_true(bresp == RESP_OKAY, {tag, ": OKAY"});
    expect_true(irq == old, {tag, ": irq unchanged while BVALID rises"});
    bready = 1;
    @(negedge clk); bready = 0;
    expect_true(irq == exp, $sformatf("%s: irq %h exp %h", tag, irq, exp));
    // INTFLAG read-back
    araddr = 32'h28; arvalid = 1;
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    rd = rdata; rready = 1;
    @(negedge clk); rready = 0;
    expect_true(rd == 32'(exp), $sformatf("%s: INTFLAG %h exp %h", tag, rd, exp));
  endtask

  initial begin
    intr_in = '0;
    awaddr = 0; wdata = 0; wstrb = 0; awvalid = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    step(32'h18, 32'h04030201, 12'h000, "CHMAP1");
    step(32'h1C, 32'h090a0b0c, 12'h000, "CHMAP2");
    step(32'h20, 32'h00000000, 12'h000, "CHMAP3");
    @(negedge clk); intr_in = 60'h3fff;
    @(negedge clk); intr_in = '0;
    repeat (2) @(negedge clk);
    expect_true(irq == 12'h000, "inputs flagged, channels still disabled");
    step(32'h24, 32'h00000fff, 12'hfff, "INTENA all");
    step(32'h24, 32'h00000ffc, 12'hffc, "INTENA ch0,1 off");
    step(32'h08, 32'h00002fef, 12'h018, "clear all but 4 and 12");
    step(32'h08, 32'h00001000, 12'h008, "clear 12");
    step(32'h08, 32'h00000010, 12'h000, "clear 4");
    step(32'h24, 32'h00000000, 12'h000, "INTENA off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
