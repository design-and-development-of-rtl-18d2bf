// tb_chan_map: self-checking test of the channel mapping unit (64 sources,
// 12 channels).  Maps one-hot sources through each channel, checks that the
// upper two bits of each CHMAP byte are ignored, that several channels can
// share a source, and compares random maps against a reference lookup.
module tb_chan_map;
  localparam int NSRC = 64, NCH = 12;

  logic [NSRC-1:0] mevtflag;
  logic [95:0]     chmap;
  logic [NCH-1:0]  rawint;
  int checks = 0, failures = 0;

  chan_map dut (.mevtflag, .chmap, .rawint);

  task automatic check_now(string tag);
    logic [NCH-1:0] exp;
    #1;
    for (int c = 0; c < NCH; c++) exp[c] = mevtflag[chmap[c*8 +: 6]];
    checks++;
    if (rawint !== exp) begin
      failures++;
      $display("FAIL %s map=%h src=%h raw=%b exp=%b", tag, chmap, mevtflag, rawint, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // every source through every channel
    for (int c = 0; c < NCH; c++) begin
      for (int s = 0; s < NSRC; s++) begin
        chmap = '0;
        for (int k = 0; k < NCH; k++) chmap[k*8 +: 8] = 8'(k == c ? s : (s + 1) % NSRC);
        mevtflag = '0; mevtflag[s] = 1'b1;
        check_now("onehot");
        checks++;
        if (rawint != NCH'(1 << c)) begin
          failures++; $display("FAIL ch %0d src %0d raw=%b", c, s, rawint);
        end
      end
    end
    // upper bits of a map byte are ignored
    chmap = '0; chmap[7:0] = 8'hC5; mevtflag = '0; mevtflag[5] = 1'b1;
    check_now("upper bits");
    checks++;
    if (!rawint[0]) begin failures++; $display("FAIL upper bits not ignored"); end
    // map of the example configuration: channels 0..3 <- 1,2,3,4; 4..7 <- 12,11,10,9
    chmap = {32'h0, 32'h090a0b0c, 32'h04030201};
    mevtflag = '0; mevtflag[1] = 1; mevtflag[9] = 1;
    check_now("example map");
    checks++;
    if (rawint != 12'b0000_1000_0001) begin failures++; $display("FAIL example %b", rawint); end
    for (int n = 0; n < 3000; n++) begin
      chmap = {$urandom, $urandom, $urandom};
      mevtflag = {$urandom, $urandom};
      check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
