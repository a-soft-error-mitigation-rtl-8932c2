// tb_si_top - end-to-end test of the whole design at its default sizes.
//
// Part 1 drives the encode/decode demonstrator with narrow and wide values
// and checks that each comes out unchanged two clock edges later.
//
// Part 2 is a single-bit fault-injection campaign on the register file.
// Each experiment resets the register file, writes every register once and
// then runs a synthetic register trace: every cycle, with some probability, one register is written (about
// 88 % of values fit in 26 bits) and both read ports read random registers.
// At one random cycle one random bit of one random register is flipped.  Every
// read is compared with the value the trace wrote (the fault-free answer):
//   wrong        some read returned a wrong value
//   latent       all reads were right but the upset is still in a register
//   effect-less  all reads were right and a write removed the upset
// Latent and effect-less together give the fault coverage.
// The same trace is also judged for an unprotected register file (the flip is
// wrong as soon as the upset register is read before being rewritten), so the
// two outcome counts can be compared.  The protected file must be wrong
// exactly when the upset hit an unprotected (over-26-bit) value
// that was read before a rewrite.
//
// Every mechanism must be seen at least once: protected and plain writes,
// corrections on each read port, a corrected check-bit upset, an ignored
// spare-bit upset, a plain-word upset reaching a reader, an upset removed by a
// write, and both value kinds through the demonstrator.
module tb_si_top;
  import si_tb_ref_pkg::*;

  localparam int EXPERIMENTS = 600;
  localparam int TRACE_LEN   = 64;

  logic        clk = 0, rst;
  logic        we, inj_en;
  logic [4:0]  waddr, inj_addr, inj_bit;
  logic [31:0] wdata;
  logic [4:0]  raddr [2];
  logic [31:0] rdata [2];
  logic        rcorr [2];
  logic        rpi   [2];
  logic        reset;
  logic [31:0] input_data, output_data;

  si_top dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
              .raddr(raddr), .rdata(rdata), .rcorr(rcorr), .rpi(rpi),
              .inj_en(inj_en), .inj_addr(inj_addr), .inj_bit(inj_bit),
              .clock(clk), .reset(reset), .input_data(input_data),
              .output_data(output_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_prot_write = 0, m_plain_write = 0, m_corr_p0 = 0, m_corr_p1 = 0;
  int m_check_bit_fix = 0, m_spare_bit = 0, m_plain_upset = 0, m_scrubbed = 0;
  int m_chain_narrow = 0, m_chain_wide = 0;
  // campaign outcomes
  int si_wrong = 0, si_ok = 0, base_wrong = 0, base_ok = 0;
  int si_latent = 0, base_latent = 0;

  initial begin
    repeat (EXPERIMENTS * (TRACE_LEN + 40) + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] value [32];
  logic        prot  [32];
  int          upset [32];

  task automatic check_read(int p, int a, ref bit si_bad, ref bit base_bad);
    logic [31:0] exp;
    logic        exp_corr;
    exp = value[a];
    exp_corr = 1'b0;
    if (upset[a] >= 0) begin
      base_bad = 1'b1;
      if (!prot[a]) begin
        exp[upset[a]] = ~exp[upset[a]];
        si_bad = 1'b1;
        m_plain_upset++;
      end else if (upset[a] < 31) begin
        exp_corr = 1'b1;
        if (upset[a] >= 26) m_check_bit_fix++;
      end else m_spare_bit++;
    end
    checks += 2;
    if (rdata[p] !== exp) begin
      failures++;
      $display("FAIL port%0d reg%0d rdata=%h expected=%h", p, a, rdata[p], exp);
    end
    if (rcorr[p] !== exp_corr) begin
      failures++;
      $display("FAIL port%0d reg%0d rcorr=%b", p, a, rcorr[p]);
    end
    if (exp_corr && p == 0) m_corr_p0++;
    if (exp_corr && p == 1) m_corr_p1++;
  endtask

  initial begin
    logic [31:0] hist [$];
    rst = 1; reset = 1; we = 0; inj_en = 0; waddr = 0; wdata = 0;
    inj_addr = 0; inj_bit = 0; raddr[0] = 0; raddr[1] = 0; input_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;

    // ---- part 1: encode/decode demonstrator ----
    for (int n = 0; n < 200; n++) begin
      logic [31:0] v;
      v = $urandom;
      if (n % 3 != 0) v[31:26] = 6'd0;
      input_data = v;
      hist.push_back(v);
      @(posedge clk);
      #1;
      if (hist.size() > 2) void'(hist.pop_front());
      if (hist.size() == 2) begin
        checks++;
        if (output_data !== hist[0]) begin
          failures++;
          $display("FAIL chain output %h expected %h", output_data, hist[0]);
        end else if (hist[0][31:26] == 0) m_chain_narrow++;
        else m_chain_wide++;
      end
      @(negedge clk);
    end

    // ---- part 2: fault-injection campaign ----
    for (int e = 0; e < EXPERIMENTS; e++) begin
      int  inj_cycle;
      bit  si_bad, base_bad;
      si_bad = 0; base_bad = 0;
      @(negedge clk) rst = 1;
      @(negedge clk) rst = 0;
      for (int a = 0; a < 32; a++) begin value[a] = 0; prot[a] = 0; upset[a] = -1; end
      // the trace starts by giving every register a value
      for (int a = 0; a < 32; a++) begin
        we = 1'b1;
        waddr = 5'(a);
        wdata = $urandom;
        if ($urandom_range(0, 99) < 88) wdata[31:26] = 6'd0;
        @(posedge clk);
        value[a] = wdata;
        prot[a]  = (wdata[31:26] == 6'd0);
        if (prot[a]) m_prot_write++; else m_plain_write++;
        @(negedge clk);
      end
      we = 1'b0;
      inj_cycle = $urandom_range(0, TRACE_LEN - 8);
      for (int c = 0; c < TRACE_LEN; c++) begin
        we = ($urandom_range(0, 2) != 0);
        waddr = 5'($urandom);
        wdata = $urandom;
        if ($urandom_range(0, 99) < 88) wdata[31:26] = 6'd0;
        inj_en = (c == inj_cycle);
        inj_addr = 5'($urandom);
        inj_bit = 5'($urandom);
        if (inj_en && we && waddr == inj_addr) waddr = waddr + 5'd1;
        raddr[0] = 5'($urandom);
        raddr[1] = 5'($urandom);
        #1;
        check_read(0, int'(raddr[0]), si_bad, base_bad);
        check_read(1, int'(raddr[1]), si_bad, base_bad);
        @(posedge clk);
        if (inj_en) upset[inj_addr] = int'(inj_bit);
        if (we) begin
          if (upset[waddr] >= 0) m_scrubbed++;
          value[waddr] = wdata;
          prot[waddr]  = (wdata[31:26] == 6'd0);
          upset[waddr] = -1;
          if (prot[waddr]) m_prot_write++; else m_plain_write++;
        end
        @(negedge clk);
        we = 0; inj_en = 0;
      end
      // an upset still in a register at the end is latent if nothing read it wrong
      begin
        bit left;
        left = 0;
        for (int a = 0; a < 32; a++) if (upset[a] >= 0) left = 1;
        if (si_bad) si_wrong++; else if (left) si_latent++; else si_ok++;
        if (base_bad) base_wrong++; else if (left) base_latent++; else base_ok++;
      end
    end

    $display("campaign: %0d single-bit upsets", EXPERIMENTS);
    $display("  unprotected file: wrong=%0d latent=%0d effect-less=%0d", base_wrong, base_latent, base_ok);
    $display("  Self-Immunity   : wrong=%0d latent=%0d effect-less=%0d", si_wrong, si_latent, si_ok);
    $display("  fault coverage (latent + effect-less): unprotected %0d %%, Self-Immunity %0d %%",
             100 * (base_latent + base_ok) / EXPERIMENTS, 100 * (si_latent + si_ok) / EXPERIMENTS);
    if (base_wrong > 0)
      $display("  upsets that reached a reader and were masked: %0d %%",
               100 * (base_wrong - si_wrong) / base_wrong);
    $display("mechanisms: prot_write=%0d plain_write=%0d corr_p0=%0d corr_p1=%0d check_bit_fix=%0d",
             m_prot_write, m_plain_write, m_corr_p0, m_corr_p1, m_check_bit_fix);
    $display("            spare_bit=%0d plain_upset=%0d scrubbed=%0d chain_narrow=%0d chain_wide=%0d",
             m_spare_bit, m_plain_upset, m_scrubbed, m_chain_narrow, m_chain_wide);
    checks += 11;
    if (m_prot_write == 0)    begin failures++; $display("FAIL no protected write"); end
    if (m_plain_write == 0)   begin failures++; $display("FAIL no plain write"); end
    if (m_corr_p0 == 0)       begin failures++; $display("FAIL no correction on port 0"); end
    if (m_corr_p1 == 0)       begin failures++; $display("FAIL no correction on port 1"); end
    if (m_check_bit_fix == 0) begin failures++; $display("FAIL no check-bit upset"); end
    if (m_spare_bit == 0)     begin failures++; $display("FAIL no spare-bit upset"); end
    if (m_plain_upset == 0)   begin failures++; $display("FAIL no plain-word upset read"); end
    if (m_scrubbed == 0)      begin failures++; $display("FAIL no upset removed by a write"); end
    if (m_chain_narrow == 0)  begin failures++; $display("FAIL no narrow value through chain"); end
    if (m_chain_wide == 0)    begin failures++; $display("FAIL no wide value through chain"); end
    if (si_wrong >= base_wrong) begin failures++; $display("FAIL protection masked nothing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
