// tb_evt_combine: self-checking test of the event masking and combination
// unit at its full size (60 flags, 4 groups of 15).  Applies directed
// patterns (one flag per group edge, masked and unmasked, combination masks)
// and random flag/mask pairs, and compares every output bit with a
// reference computed bit by bit in the testbench.
module tb_evt_combine;
  localparam int NIN = 60, NGRP = 4, GSZ = 15;

  logic [NIN-1:0]      evtflag;
  logic [NIN+NGRP-1:0] evtmask;
  logic [NGRP-1:0]     comb_flag;
  logic [NIN+NGRP-1:0] mevtflag;
  int checks = 0, failures = 0;
  int comb_seen = 0;

  evt_combine dut (.evtflag, .evtmask, .comb_flag, .mevtflag);

  task automatic check_now(string tag);
    logic [NGRP-1:0]     exp_comb;
    logic [NIN+NGRP-1:0] exp_m;
    #1;
    exp_comb = '0;
    for (int i = 0; i < NIN; i++) begin
      exp_m[i] = evtflag[i] && !evtmask[i];
      if (exp_m[i]) exp_comb[i / GSZ] = 1'b1;
    end
    for (int g = 0; g < NGRP; g++) exp_m[NIN+g] = exp_comb[g] && !evtmask[NIN+g];
    checks++;
    if (comb_flag !== exp_comb || mevtflag !== exp_m) begin
      failures++;
      $display("FAIL %s flag=%h mask=%h comb=%b exp=%b m=%h exp=%h",
               tag, evtflag, evtmask, comb_flag, exp_comb, mevtflag, exp_m);
    end
    if (|comb_flag) comb_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // nothing pending
    evtflag = '0; evtmask = '0; check_now("idle");
    if (comb_flag != 0) begin failures++; $display("FAIL idle comb"); end
    // each single flag, unmasked then masked
    for (int i = 0; i < NIN; i++) begin
      evtflag = '0; evtflag[i] = 1'b1; evtmask = '0;
      check_now("single");
      checks++;
      if (comb_flag != NGRP'(1 << (i / GSZ)) || mevtflag[NIN + i/GSZ] != 1'b1) begin
        failures++; $display("FAIL flag %0d lands in wrong group: %b", i, comb_flag);
      end
      evtmask[i] = 1'b1;
      check_now("single masked");
      checks++;
      if (mevtflag != '0) begin failures++; $display("FAIL masked flag %0d leaks", i); end
    end
    // combination mask bits 63:60 block only the combined source
    evtflag = '1; evtmask = '0; evtmask[NIN+2] = 1'b1;
    check_now("comb mask");
    checks++;
    if (mevtflag[NIN+2] || !comb_flag[2] || !mevtflag[NIN+1]) begin
      failures++; $display("FAIL combination mask");
    end
    // random
    for (int n = 0; n < 2000; n++) begin
      evtflag = 60'({$urandom, $urandom});
      evtmask = 64'({$urandom, $urandom}) | 64'({$urandom, $urandom});
      check_now("random");
    end
    checks++;
    if (comb_seen == 0) begin failures++; $display("FAIL no combination seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
