// tb_si_regfile - checks the protected register file against a model that
// keeps the values written.  Random writes (mostly 26-bit values), reads on
// both ports and single-bit upsets are mixed.  A register is upset at most
// once between writes, so each upset is a single-bit error:
//  * protected value, upset in bits 30:0  -> read returns the value, rcorr=1
//  * protected value, upset in bit 31     -> read returns the value, rcorr=0
//  * unprotected value, any upset         -> read returns the corrupted word
// After reset every register holds an unprotected zero (self-pi clear).
module tb_si_regfile;
  logic        clk = 0, rst;
  logic        we, inj_en;
  logic [4:0]  waddr, inj_addr, inj_bit;
  logic [31:0] wdata;
  logic [4:0]  raddr [2];
  logic [31:0] rdata [2];
  logic        rcorr [2];
  logic        rpi   [2];

  logic [31:0] value [32];   // last value written
  int          upset [32];   // bit upset since the last write, -1 for none
  logic        prot  [32];   // self-pi expected: cleared by reset, set by narrow writes
  int checks = 0, failures = 0;
  int n_corrected = 0, n_spare = 0, n_plain_upset = 0, n_protected_w = 0, n_plain_w = 0;

  si_regfile dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                  .raddr(raddr), .rdata(rdata), .rcorr(rcorr), .rpi(rpi),
                  .inj_en(inj_en), .inj_addr(inj_addr), .inj_bit(inj_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic dut_prot(int a);
    return prot[a];
  endfunction

  task automatic check_port(int p, int a);
    logic        prot;
    logic [31:0] exp;
    logic        exp_corr;
    prot = dut_prot(a);
    exp = value[a];
    exp_corr = 1'b0;
    if (upset[a] >= 0) begin
      if (!prot) exp[upset[a]] = ~exp[upset[a]];
      else if (upset[a] < 31) exp_corr = 1'b1;
    end
    checks += 3;
    if (rdata[p] !== exp) begin
      failures++;
      $display("FAIL port%0d reg%0d rdata=%h expected=%h upset=%0d", p, a, rdata[p], exp, upset[a]);
    end
    if (rcorr[p] !== exp_corr) begin
      failures++;
      $display("FAIL port%0d reg%0d rcorr=%b", p, a, rcorr[p]);
    end
    if (rpi[p] !== prot) begin
      failures++;
      $display("FAIL port%0d reg%0d rpi=%b", p, a, rpi[p]);
    end
    if (p == 0 && upset[a] >= 0) begin
      if (prot && exp_corr) n_corrected++;
      else if (prot) n_spare++;
      else n_plain_upset++;
    end
  endtask

  initial begin
    rst = 1; we = 0; inj_en = 0; waddr = 0; wdata = 0; inj_addr = 0; inj_bit = 0;
    raddr[0] = 0; raddr[1] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 32; a++) begin value[a] = 0; upset[a] = -1; prot[a] = 1'b0; end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0);
      waddr = 5'($urandom);
      wdata = $urandom;
      if ($urandom_range(0, 99) < 80) wdata[31:26] = 6'd0;
      inj_addr = 5'($urandom);
      inj_bit = 5'($urandom);
      inj_en = ($urandom_range(0, 3) == 0) && upset[inj_addr] < 0 && !(we && waddr == inj_addr);
      raddr[0] = 5'($urandom);
      raddr[1] = 5'($urandom);
      #1;
      check_port(0, int'(raddr[0]));
      check_port(1, int'(raddr[1]));
      @(posedge clk);
      if (inj_en) upset[inj_addr] = int'(inj_bit);
      if (we) begin
        value[waddr] = wdata;
        upset[waddr] = -1;
        prot[waddr] = (wdata[31:26] == 6'd0);
        if (wdata[31:26] == 0) n_protected_w++; else n_plain_w++;
      end
    end
    $display("writes protected=%0d plain=%0d; reads corrected=%0d spare-bit=%0d plain-upset=%0d",
             n_protected_w, n_plain_w, n_corrected, n_spare, n_plain_upset);
    checks++;
    if (n_corrected == 0 || n_spare == 0 || n_plain_upset == 0 || n_plain_w == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
