// tb_int_ctrl: self-checking test of the channel enable unit and INTFLAG
// register.  Drives random raw interrupts and enables and checks that irq
// and intflag equal the AND of the previous cycle's inputs (one clock of
// latency), that reset clears them, and that a disabled channel never fires.
module tb_int_ctrl;
  localparam int NCH = 12;

  logic clk = 0, rst;
  logic [NCH-1:0] rawint, intena, intflag, irq;
  logic [NCH-1:0] exp;
  int checks = 0, failures = 0;

  int_ctrl dut (.clk, .rst, .rawint, .intena, .intflag, .irq);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rawint = '1; intena = '1;
    @(posedge clk); #1;
    checks++;
    if (irq != '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    // latency: enabled raw interrupt appears one clock later
    rawint = 12'h001; intena = 12'hfff; #1;
    checks++;
    if (irq != '0) begin failures++; $display("FAIL irq before the clock"); end
    @(posedge clk); #1;
    checks++;
    if (irq != 12'h001) begin failures++; $display("FAIL latency irq=%h", irq); end
    // disabled channel never fires
    rawint = 12'hfff; intena = 12'hffc;
    @(posedge clk); #1;
    checks++;
    if (irq != 12'hffc) begin failures++; $display("FAIL enable irq=%h", irq); end
    // random
    for (int n = 0; n < 2000; n++) begin
      rawint = NCH'($urandom); intena = NCH'($urandom);
      exp = rawint & intena;
      @(posedge clk); #1;
      checks++;
      if (irq !== exp || intflag !== exp) begin
        failures++; $display("FAIL irq=%h intflag=%h exp=%h", irq, intflag, exp);
      end
    end
    rst = 1; @(posedge clk); #1;
    checks++;
    if (irq != '0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
