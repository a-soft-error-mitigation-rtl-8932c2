// tb_si_regfile_array - checks the storage: reset clears words and self-pi
// flags, a write stores word and flag together and is visible on both read
// ports from the next cycle, an injected upset flips exactly one stored bit,
// and a write in the same cycle as an upset to that register wins.
module tb_si_regfile_array;
  logic        clk = 0, rst;
  logic        we, wpi, inj_en;
  logic [4:0]  waddr, inj_addr;
  logic [4:0]  inj_bit;
  logic [31:0] wword;
  logic [4:0]  raddr [2];
  logic [31:0] rword [2];
  logic        rpi   [2];
  logic [31:0] model_w [32];
  logic        model_p [32];
  int checks = 0, failures = 0;

  si_regfile_array dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wword(wword),
                        .wpi(wpi), .raddr(raddr), .rword(rword), .rpi(rpi),
                        .inj_en(inj_en), .inj_addr(inj_addr), .inj_bit(inj_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      raddr[0] = 5'(a);
      raddr[1] = 5'(31 - a);
      #1;
      checks += 2;
      if (rword[0] !== model_w[a] || rpi[0] !== model_p[a]) begin
        failures++;
        $display("FAIL port0 reg%0d %h/%b expected %h/%b", a, rword[0], rpi[0], model_w[a], model_p[a]);
      end
      if (rword[1] !== model_w[31-a] || rpi[1] !== model_p[31-a]) begin
        failures++;
        $display("FAIL port1 reg%0d", 31 - a);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; inj_en = 0; waddr = 0; wword = 0; wpi = 0; inj_addr = 0; inj_bit = 0;
    raddr[0] = 0; raddr[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < 32; a++) begin model_w[a] = '0; model_p[a] = 1'b0; end
    check_all();
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      waddr = 5'($urandom);
      wword = $urandom;
      wpi = 1'($urandom);
      inj_en = ($urandom_range(0, 3) == 0);
      inj_addr = (n % 7 == 0) ? waddr : 5'($urandom);
      inj_bit = 5'($urandom);
      // the value must not be visible before the clock edge
      raddr[0] = waddr;
      #1;
      checks++;
      if (rword[0] !== model_w[waddr]) begin
        failures++;
        $display("FAIL write visible early");
      end
      @(posedge clk);
      if (inj_en) model_w[inj_addr][inj_bit] = ~model_w[inj_addr][inj_bit];
      if (we) begin model_w[waddr] = wword; model_p[waddr] = wpi; end
      @(negedge clk);
      we = 0; inj_en = 0;
      if (n % 50 == 0) check_all();
      else begin
        raddr[0] = waddr;
        raddr[1] = inj_addr;
        #1;
        checks += 2;
        if (rword[0] !== model_w[waddr] || rpi[0] !== model_p[waddr]) begin
          failures++;
          $display("FAIL read-back reg%0d %h expected %h", waddr, rword[0], model_w[waddr]);
        end
        if (rword[1] !== model_w[inj_addr]) begin
          failures++;
          $display("FAIL upset reg%0d %h expected %h", inj_addr, rword[1], model_w[inj_addr]);
        end
      end
    end
    // reset clears everything again
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int a = 0; a < 32; a++) begin model_w[a] = '0; model_p[a] = 1'b0; end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
