// tb_intc_top: end-to-end test of the interrupt controller at its full size
// (60 inputs, 4 combination groups, 64 sources, 12 channels).
//
// A bus-master task programs the controller over AXI4-Lite; interrupt lines
// are pulsed directly.  The testbench keeps its own model of the registers
// and computes the expected IRQ vector from it (mask, group OR, channel
// lookup, enable).  A directed phase replays a typical bring-up - the
// example map (channels 0..3 <- sources 1..4, channels 4..7 <- 12..9),
// all channels enabled, then channels 0 and 1 disabled, then flags cleared -
// and checks the two-edge latency from an input to its IRQ.  A random phase
// mixes register writes in all three AXI orderings, reads, and input
// pulses, comparing IRQ and read data with the model after every step.
// Each mechanism (hardware set, software set, clear, mask, combination,
// combination mask, remap, channel disable, error response, each write
// ordering) is counted and must occur at least once.
module tb_intc_top;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model ----------------
  logic [59:0] m_flag;
  logic [63:0] m_mask;
  logic [95:0] m_chmap;
  logic [11:0] m_intena;

  // mechanism counters
  int c_hw_set, c_sw_set, c_clear, c_mask, c_comb, c_comb_mask, c_remap, c_disable;
  int c_slverr, c_together, c_addr_first, c_data_first;

  function automatic logic [63:0] model_src(output logic [3:0] comb_raw);
    logic [59:0] masked;
    masked = m_flag & ~m_mask[59:0];
    for (int g = 0; g < 4; g++) comb_raw[g] = |masked[g*15 +: 15];
    return {comb_raw & ~m_mask[63:60], masked};
  endfunction

  function automatic logic [11:0] model_irq();
    logic [63:0] src;
    logic [3:0]  cr;
    logic [11:0] r;
    src = model_src(cr);
    for (int c = 0; c < 12; c++) r[c] = src[m_chmap[c*8 +: 6]] & m_intena[c];
    return r;
  endfunction

  function automatic logic [31:0] model_read(logic [31:0] a);
    logic [3:0]  cr;
    logic [63:0] src, f;
    src = model_src(cr);
    f = {cr, m_flag};
    if (a[1:0] != 0 || a > 32'h28) return 32'h0;
    case (a[7:0])
      8'h00, 8'h08: return f[31:0];
      8'h04, 8'h0C: return f[63:32];
      8'h10: return m_mask[31:0];
      8'h14: return m_mask[63:32];
      8'h18: return m_chmap[31:0];
      8'h1C: return m_chmap[63:32];
      8'h20: return m_chmap[95:64];
      8'h24: return 32'(m_intena);
      8'h28: return 32'(model_irq());
      default: return 32'h0;
    endcase
  endfunction

  function automatic logic [31:0] bytemask(logic [3:0] s);
    return {{8{s[3]}}, {8{s[2]}}, {8{s[1]}}, {8{s[0]}}};
  endfunction

  // Bookkeeping of which mechanisms a write exercises, then the model update.
  task automatic model_write(logic [31:0] a, logic [31:0] d, logic [3:0] s);
    logic [31:0] bm, v;
    logic [11:0] irq_prev;
    irq_prev = model_irq();
    bm = bytemask(s);
    v  = d & bm;
    if (a[1:0] != 0 || a > 32'h28) return;
    case (a[7:0])
      8'h00: begin if ((v & ~m_flag[31:0]) != 0) c_sw_set++; m_flag[31:0] |= v; end
      8'h04: begin if ((v[27:0] & ~m_flag[59:32]) != 0) c_sw_set++; m_flag[59:32] |= v[27:0]; end
      8'h08: begin if ((v & m_flag[31:0]) != 0) c_clear++; m_flag[31:0] &= ~v; end
      8'h0C: begin if ((v[27:0] & m_flag[59:32]) != 0) c_clear++; m_flag[59:32] &= ~v[27:0]; end
      8'h10: m_mask[31:0]  = (m_mask[31:0]  & ~bm) | v;
      8'h14: begin
        if ((v[31:28] & ~m_mask[63:60]) != 0) c_comb_mask++;
        m_mask[63:32] = (m_mask[63:32] & ~bm) | v;
      end
      8'h18, 8'h1C, 8'h20: begin
        int r;
        r = (int'(a[7:0]) - 32'h18) / 4;
        m_chmap[r*32 +: 32] = (m_chmap[r*32 +: 32] & ~bm) | v;
        if (model_irq() != irq_prev) c_remap++;
      end
      8'h24: begin
        if ((irq_prev & ~(12'((m_intena & ~12'(bm)) | 12'(v)))) != 0) c_disable++;
        m_intena = (m_intena & ~12'(bm)) | 12'(v);
      end
      default: ;
    endcase
  endtask

  task automatic expect_true(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- bus master ----------------
  task automatic axi_write(logic [31:0] a, logic [31:0] d, logic [3:0] s = 4'hf, int mode = 0);
    @(negedge clk);
    if (mode == 0) begin
      awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
      @(negedge clk); awvalid = 0; wvalid = 0;
      c_together++;
    end else if (mode == 1) begin
      awaddr = a; awvalid = 1;
      @(negedge clk); awvalid = 0;
      @(negedge clk); wdata = d; wstrb = s; wvalid = 1;
      @(negedge clk); wvalid = 0;
      c_addr_first++;
    end else begin
      wdata = d; wstrb = s; wvalid = 1;
      @(negedge clk); wvalid = 0;
      @(negedge clk); awaddr = a; awvalid = 1;
      @(negedge clk); awvalid = 0;
    c_data_first++;
    end
    while (!bvalid) @(negedge clk);
    bready = 1;
    if (a[1:0] != 0 || a > 32'h28) begin
      expect_true(bresp == RESP_SLVERR, "SLVERR for unmapped write");
      c_slverr++;
    end else expect_true(bresp == RESP_OKAY, "OKAY for register write");
    @(negedge clk); bready = 0;
    model_write(a, d, s);
  endtask

  task automatic axi_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata; rready = 1;
    @(negedge clk); rready = 0;
  endtask

  task automatic check_read(logic [31:0] a);
    logic [31:0] d, e;
    e = model_read(a);
    axi_read(a, d);
    expect_true(d == e, $sformatf("read %h got %h exp %h", a, d, e));
  endtask

  // Compare irq with the model once everything has settled.
  task automatic check_irq(string tag);
    logic [63:0] src;
    logic [3:0]  cr;
    logic [11:0] e;
    repeat (2) @(negedge clk);
    e = model_irq();
    src = model_src(cr);
    expect_true(irq == e, $sformatf("%s irq %h exp %h", tag, irq, e));
    for (int c = 0; c < 12; c++) begin
      if (e[c] && m_chmap[c*8 +: 6] >= 60) c_comb++;
      if (m_intena[c] && m_flag[m_chmap[c*8 +: 6] % 60] && m_chmap[c*8 +: 6] < 60
          && m_mask[m_chmap[c*8 +: 6]] && !e[c]) c_mask++;
    end
  endtask

  // Pulse interrupt lines for one clock; flags latch them.
  task automatic pulse(logic [59:0] lines);
    @(negedge clk);
    intr_in = lines;
    @(negedge clk);
    intr_in = '0;
    if ((lines & ~m_flag) != 0) c_hw_set++;
    m_flag |= lines;
  endtask

  initial begin
    logic [31:0] d;
    int edges;
    intr_in = '0;
    awaddr = 0; wdata = 0; wstrb = 0; awvalid = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    m_flag = '0; m_mask = '0; m_chmap = '0; m_intena = '0;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    expect_true(irq == 0, "no IRQ after reset");
    for (int a = 0; a <= 32'h28; a += 4) check_read(32'(a));

    // ---- directed bring-up ----
    axi_write(32'h18, 32'h04030201);           // ch0..3 <- sources 1..4
    axi_write(32'h1C, 32'h090a0b0c, 4'hf, 1);  // ch4..7 <- 12,11,10,9
    axi_write(32'h20, 32'h3f3e3d3c, 4'hf, 2);  // ch8..11 <- 60..63 (group combinations)
    axi_write(32'h24, 32'h00000fff);           // all channels on
    check_irq("configured, idle");
    expect_true(irq == 0, "nothing pending yet");

    // latency: input presented before edge k -> irq high after edge k+1
    @(negedge clk);
    intr_in[3] = 1'b1;            // source 3 -> channel 2
    @(posedge clk); #1;           // edge k: flag set
    expect_true(irq[2] == 0, "IRQ not yet after one edge");
    intr_in[3] = 1'b0;
    @(posedge clk); #1;           // edge k+1
    expect_true(irq[2] == 1, "IRQ after two edges");
    m_flag[3] = 1'b1; c_hw_set++;
    check_irq("hw set");

    // a group member raises its combination channel
    pulse(60'(1) << 40);          // group 2 -> source 62 -> channel 10
    check_irq("combination");
    expect_true(irq[10] && irq[8] && !irq[9] && !irq[11], "groups 0 (source 3) and 2 combined, 1 and 3 quiet");

    // software set of sources 1, 2, 4, 9..12
    axi_write(32'h00, 32'h0000_1e16);
    check_irq("sw set");
    check_read(32'h00); check_read(32'h04); check_read(32'h28);

    // disable channels 0 and 1
    axi_write(32'h24, 32'h00000ffc);
    check_irq("disable");
    expect_true(irq[1:0] == 2'b00, "disabled channels quiet");

    // mask source 9 (channel 7) and group 2's combination
    axi_write(32'h10, 32'h0000_0200);
    axi_write(32'h14, 32'h4000_0000);
    check_irq("mask");
    expect_true(!irq[7] && !irq[10], "masked sources quiet");

    // remap: channel 7 now takes source 3 (priority change)
    axi_write(32'h1C, 32'h030a0b0c);
    check_irq("remap");
    expect_true(irq[7], "remapped channel fires");

    // clear all flags; the IRQs fall
    axi_write(32'h08, 32'hffff_ffff);
    axi_write(32'h0C, 32'hffff_ffff);
    check_irq("clear");
    expect_true(irq == 0, "all clear");

    // unmapped address
    axi_write(32'h80, 32'h1234_5678);
    check_read(32'h80);

    // ---- random phase ----
    for (int n = 0; n < 3000; n++) begin
      int act;
      act = $urandom % 10;
      if (act < 3) begin
        logic [59:0] l;
        l = '0;
        repeat ($urandom % 3 + 1) l[$urandom % 60] = 1'b1;
        pulse(l);
      end else if (act < 8) begin
        logic [31:0] a, v;
        a = ($urandom % 20 == 0) ? 32'h30 + 4 * ($urandom % 8) : 32'(($urandom % 10) * 4);
        case (a)
          32'h08, 32'h0C: v = $urandom & $urandom;
          32'h10, 32'h14: v = $urandom & $urandom & $urandom;
          32'h18, 32'h1C, 32'h20: v = $urandom & 32'h3f3f3f3f;
          default: v = $urandom;
        endcase
        axi_write(a, v, ($urandom % 4 == 0) ? 4'($urandom) : 4'hf, $urandom % 3);
      end else begin
        check_read(32'(($urandom % 12) * 4));
      end
      check_irq("random");
    end

    $display("mechanisms: hw_set %0d sw_set %0d clear %0d mask %0d combination %0d comb_mask %0d",
             c_hw_set, c_sw_set, c_clear, c_mask, c_comb, c_comb_mask);
    $display("            remap %0d disable %0d slverr %0d writes together/addr-first/data-first %0d/%0d/%0d",
             c_remap, c_disable, c_slverr, c_together, c_addr_first, c_data_first);
    expect_true(c_hw_set > 0, "hardware flag set happened");
    expect_true(c_sw_set > 0, "software flag set happened");
    expect_true(c_clear > 0, "flag clear happened");
    expect_true(c_mask > 0, "masking happened");
    expect_true(c_comb > 0, "combination interrupt happened");
    expect_true(c_comb_mask > 0, "combination mask happened");
    expect_true(c_remap > 0, "channel remap happened");
    expect_true(c_disable > 0, "channel disable happened");
    expect_true(c_slverr > 0, "error response happened");
    expect_true(c_together > 0 && c_addr_first > 0 && c_data_first > 0, "all write orderings happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
