// tb_intc_regs: self-checking test of the register file.  Writes registers
// through the one-cycle reg_wr port and reads them back combinationally,
// checking: reset values, read/write of EVTMASK, CHMAP1..3 and INTENA with
// byte strobes, write-1-to-set and write-1-to-clear of the event flags,
// hardware setting of flags from the interrupt inputs one clock after they
// are sampled, set winning over clear, the read-only combination flags and
// INTFLAG, and random traffic against a register model kept in the
// testbench.
module tb_intc_regs;
  import intc_pkg::*;

  logic clk = 0, rst;
  reg_wr_t            reg_wr;
  logic [31:0]        rd_addr, rd_data;
  logic [59:0]        intr_in;
  logic [3:0]         comb_flag;
  logic [11:0]        intflag;
  logic [59:0]        evtflag;
  logic [63:0]        evtmask;
  logic [95:0]        chmap;
  logic [11:0]        intena;
  int checks = 0, failures = 0;

  // reference model
  logic [59:0] m_flag;
  logic [63:0] m_mask;
  logic [95:0] m_chmap;
  logic [11:0] m_intena;

  intc_regs dut (.clk, .rst, .reg_wr, .rd_addr, .rd_data, .intr_in, .comb_flag,
                 .intflag, .evtflag, .evtmask, .chmap, .intena);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] bytemask(logic [3:0] s);
    return {{8{s[3]}}, {8{s[2]}}, {8{s[1]}}, {8{s[0]}}};
  endfunction

  // one register write, with the model updated alongside
  task automatic wr(logic [7:0] a, logic [31:0] d, logic [3:0] s = 4'hf);
    logic [31:0] bm;
    bm = bytemask(s);
    @(negedge clk);
    reg_wr = '{en: 1'b1, addr: 32'(a), data: d, strb: s};
    @(negedge clk);
    reg_wr.en = 1'b0;
    case (a)
      8'h00: m_flag[31:0]  = m_flag[31:0]  | (d & bm);
      8'h04: m_flag[59:32] = m_flag[59:32] | 28'(d & bm);
      8'h08: m_flag[31:0]  = m_flag[31:0]  & ~(d & bm);
      8'h0C: m_flag[59:32] = m_flag[59:32] & ~28'(d & bm);
      8'h10: m_mask[31:0]  = (m_mask[31:0]  & ~bm) | (d & bm);
      8'h14: m_mask[63:32] = (m_mask[63:32] & ~bm) | (d & bm);
      8'h18: m_chmap[31:0]  = (m_chmap[31:0]  & ~bm) | (d & bm);
      8'h1C: m_chmap[63:32] = (m_chmap[63:32] & ~bm) | (d & bm);
      8'h20: m_chmap[95:64] = (m_chmap[95:64] & ~bm) | (d & bm);
      8'h24: m_intena = (m_intena & ~12'(bm)) | 12'(d & bm);
      default: ;
    endcase
  endtask

  function automatic logic [31:0] model_read(logic [7:0] a);
    logic [63:0] f;
    f = {comb_flag, m_flag};
    case (a)
      8'h00, 8'h08: return f[31:0];
      8'h04, 8'h0C: return f[63:32];
      8'h10: return m_mask[31:0];
      8'h14: return m_mask[63:32];
      8'h18: return m_chmap[31:0];
      8'h1C: return m_chmap[63:32];
      8'h20: return m_chmap[95:64];
      8'h24: return 32'(m_intena);
      8'h28: return 32'(intflag);
      default: return 32'h0;
    endcase
  endfunction

  task automatic check_all(string tag);
    for (int a = 0; a <= 8'h28; a += 4) begin
      rd_addr = 32'(a); #1;
      checks++;
      if (rd_data !== model_read(8'(a))) begin
        failures++;
        $display("FAIL %s addr %h read %h exp %h", tag, a, rd_data, model_read(8'(a)));
      end
    end
    checks++;
    if (evtflag !== m_flag || evtmask !== m_mask || chmap !== m_chmap || intena !== m_intena) begin
      failures++; $display("FAIL %s outputs differ from model", tag);
    end
  endtask

  initial begin
    reg_wr = '0; rd_addr = '0; intr_in = '0; comb_flag = 4'b1010; intflag = 12'h5a5;
    m_flag = '0; m_mask = '0; m_chmap = '0; m_intena = '0;
    rst = 1;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    check_all("reset");

    // plain read/write registers
    wr(8'h10, 32'hdeadbeef); wr(8'h14, 32'h12345678);
    wr(8'h18, 32'h04030201); wr(8'h1C, 32'h090a0b0c); wr(8'h20, 32'h3f3e3d3c);
    wr(8'h24, 32'hffff_ffff);
    check_all("rw");
    // byte strobes
    wr(8'h18, 32'haabbccdd, 4'b0101); wr(8'h10, 32'h0, 4'b1000);
    check_all("strobe");
    // write to the read-only INTFLAG changes nothing
    wr(8'h28, 32'hffffffff);
    check_all("ro");

    // software set and clear of the flags
    wr(8'h00, 32'h8000_0011); wr(8'h04, 32'hffff_ffff);
    check_all("w1s");
    wr(8'h08, 32'h0000_0010); wr(8'h0C, 32'hf000_0001);
    check_all("w1c");

    // hardware set: input sampled at a clock edge shows after it
    @(negedge clk);
    intr_in = '0; intr_in[5] = 1'b1; intr_in[47] = 1'b1;
    #1;
    checks++;
    if (evtflag[5] && !m_flag[5]) begin failures++; $display("FAIL flag set before the clock"); end
    @(negedge clk);
    intr_in = '0;
    m_flag[5] = 1'b1; m_flag[47] = 1'b1;
    check_all("hw set");
    // a flag whose input is still high survives a clear
    @(negedge clk); intr_in[5] = 1'b1;
    wr(8'h08, 32'h20);
    m_flag[5] = 1'b1;
    check_all("set over clear");
    intr_in = '0;
    wr(8'h08, 32'h20);
    check_all("clear after input falls");

    // random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] a;
      a = 8'(($urandom % 12) * 4);
      comb_flag = 4'($urandom); intflag = 12'($urandom);
      wr(a, $urandom, 4'($urandom));
      if (n % 16 == 0) check_all("random");
    end
    check_all("final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
