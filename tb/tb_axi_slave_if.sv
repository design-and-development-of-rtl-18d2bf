// tb_axi_slave_if: self-checking test of the AXI4-Lite slave.
//
// A bus-master task writes with address and data together, address first
// and data first (with random gaps), and with random BREADY/RREADY
// back-pressure.  For every write the testbench checks the READY signals
// of each intermediate state, that exactly one register write carries the
// right address, data and strobes, the BRESP (SLVERR for unmapped or
// unaligned addresses, which must not write), and that BVALID rises one
// clock edge after both handshakes are done.  Reads are checked against
// a register-file stand-in whose data is a fixed function of the address,
// with RVALID one edge after the address handshake.
module tb_axi_slave_if;
  import intc_pkg::*;

  logic clk = 0, rst;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [3:0]  wstrb;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  logic [1:0] bresp, rresp;
  reg_wr_t reg_wr;
  logic [31:0] rd_addr, rd_data;
  int checks = 0, failures = 0;
  int n_together = 0, n_addr_first = 0, n_data_first = 0, n_slverr = 0, n_bp = 0;

  // register-file stand-in
  assign rd_data = {rd_addr[15:0] ^ 16'h5a5a, ~rd_addr[15:0]};

  axi_slave_if dut (
    .clk, .rst,
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .reg_wr, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;

  // record every register write strobe
  int          n_wr;
  logic [31:0] last_addr, last_data;
  logic [3:0]  last_strb;
  always @(posedge clk) if (!rst && reg_wr.en) begin
    n_wr++; last_addr = reg_wr.addr; last_data = reg_wr.data; last_strb = reg_wr.strb;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic addr_ok(logic [31:0] a);
    return a[1:0] == 2'b00 && a <= 32'h28;
  endfunction

  task automatic expect_true(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // mode 0: together, 1: address first, 2: data first
  task automatic axi_write(logic [31:0] a, logic [31:0] d, logic [3:0] s, int mode, int gap, int bdelay);
    int wr_before, edges;
    wr_before = n_wr;
    @(negedge clk);
    expect_true(awready && wready, "both READY in IDLE");
    if (mode == 0) begin
      awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
      @(negedge clk); awvalid = 0; wvalid = 0;
      n_together++;
    end else if (mode == 1) begin
      awaddr = a; awvalid = 1;
      @(negedge clk); awvalid = 0; awaddr = '1;
      repeat (gap) begin
        expect_true(!awready && wready && !bvalid, "WRITE_ADDRESS readys");
        @(negedge clk);
      end
      expect_true(!awready && wready, "WRITE_ADDRESS readys");
      wdata = d; wstrb = s; wvalid = 1;
      @(negedge clk); wvalid = 0; wdata = '1;
      n_addr_first++;
    end else begin
      wdata = d; wstrb = s; wvalid = 1;
      @(negedge clk); wvalid = 0; wdata = '1;
      repeat (gap) begin
        expect_true(awready && !wready && !bvalid, "WRITE_VALID readys");
        @(negedge clk);
      end
      expect_true(awready && !wready, "WRITE_VALID readys");
      awaddr = a; awvalid = 1;
      @(negedge clk); awvalid = 0; awaddr = '1;
      n_data_first++;
    end
    // one edge after the last handshake: WRITING, no response yet
    expect_true(!bvalid && !awready && !wready, "WRITING state");
    edges = 0;
    while (!bvalid && edges < 10) begin @(negedge clk); edges++; end
    expect_true(edges == 1, $sformatf("BVALID latency %0d edges", edges));
    if (bdelay > 0) n_bp++;
    repeat (bdelay) begin
      @(negedge clk);
      expect_true(bvalid, "BVALID held under back-pressure");
    end
    bready = 1;
    expect_true(bresp == (addr_ok(a) ? RESP_OKAY : RESP_SLVERR), $sformatf("BRESP %b for %h", bresp, a));
    if (!addr_ok(a)) n_slverr++;
    @(negedge clk); bready = 0;
    expect_true(!bvalid, "BVALID drops after BREADY");
    if (addr_ok(a))
      expect_true(n_wr == wr_before + 1 && last_addr == a && last_data == d && last_strb == s,
                  $sformatf("register write %h %h", last_addr, last_data));
    else
      expect_true(n_wr == wr_before, "no register write for bad address");
  endtask

  task automatic axi_read(logic [31:0] a, int rdelay);
    logic [31:0] exp;
    exp = addr_ok(a) ? {a[15:0] ^ 16'h5a5a, ~a[15:0]} : 32'h0;
    @(negedge clk);
    expect_true(arready && !rvalid, "ARREADY in idle");
    araddr = a; arvalid = 1;
    @(negedge clk); arvalid = 0; araddr = '1;
    expect_true(rvalid && !arready, "RVALID one edge after AR handshake");
    repeat (rdelay) begin
      @(negedge clk);
      expect_true(rvalid && rdata == exp, "RVALID held");
    end
    rready = 1;
    expect_true(rdata == exp && rresp == (addr_ok(a) ? RESP_OKAY : RESP_SLVERR),
                $sformatf("read %h got %h exp %h", a, rdata, exp));
    @(negedge clk); rready = 0;
    expect_true(!rvalid, "RVALID drops after RREADY");
  endtask

  initial begin
    n_wr = 0;
    awaddr = 0; wdata = 0; wstrb = 0; awvalid = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    expect_true(!bvalid && !rvalid, "idle after reset");

    axi_write(32'h10, 32'h0000_0fff, 4'hf, 0, 0, 0);
    axi_write(32'h14, 32'h1234_5678, 4'h3, 1, 2, 1);
    axi_write(32'h18, 32'h0403_0201, 4'hf, 2, 3, 0);
    axi_write(32'h40, 32'hdead_beef, 4'hf, 0, 0, 0);   // unmapped
    axi_write(32'h06, 32'hdead_beef, 4'hf, 1, 0, 0);   // unaligned
    axi_read(32'h24, 0);
    axi_read(32'h28, 2);
    axi_read(32'h100, 0);                              // unmapped
    for (int n = 0; n < 400; n++) begin
      logic [31:0] a;
      a = ($urandom % 8 == 0) ? $urandom : 32'(($urandom % 11) * 4);
      if ($urandom % 2 == 1) axi_write(a, $urandom, 4'($urandom), $urandom % 3, $urandom % 4, $urandom % 3);
      else              axi_read(a, $urandom % 3);
    end
    expect_true(n_together > 0 && n_addr_first > 0 && n_data_first > 0 && n_slverr > 0 && n_bp > 0,
                "every write ordering, error response and back-pressure exercised");
    $display("writes: together %0d, address first %0d, data first %0d, slverr %0d, back-pressure %0d",
             n_together, n_addr_first, n_data_first, n_slverr, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
