// tb_si_write_path - checks the write-side classification and encoding:
// values below 2**26 are stored as {0, check, value} with self-pi set, all
// other values unchanged with self-pi clear.  Boundary values around 2**26
// and each single upper bit are covered.
module tb_si_write_path;
  import si_tb_ref_pkg::*;

  logic [31:0] wdata, word;
  logic        self_pi;
  int checks = 0, failures = 0;
  int n_si = 0, n_plain = 0;

  si_write_path dut (.wdata(wdata), .word(word), .self_pi(self_pi));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_value(logic [31:0] v);
    logic [31:0] exp_word;
    logic        exp_pi;
    exp_word = ref_store(v, exp_pi);
    wdata = v;
    #1;
    checks += 2;
    if (self_pi !== exp_pi) begin
      failures++;
      $display("FAIL v=%h self_pi=%b", v, self_pi);
    end
    if (word !== exp_word) begin
      failures++;
      $display("FAIL v=%h word=%h expected=%h", v, word, exp_word);
    end
    if (exp_pi) n_si++; else n_plain++;
  endtask

  initial begin
    try_value(32'd154);
    checks++;
    if (word !== 32'b0001_1100_0000_0000_0000_0000_1001_1010) begin
      failures++;
      $display("FAIL 154 stored as %b", word);
    end
    try_value(32'h03FF_FFFF);
    try_value(32'h0400_0000);
    try_value(32'hFFFF_FFFF);
    try_value(32'h8000_0000);
    try_value(32'h0);
    for (int b = 26; b < 32; b++) try_value(32'h0155_5555 | (32'(1) << b));
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] v;
      v = $urandom;
      if ($urandom_range(0, 99) < 88) v[31:26] = 6'd0;   // mostly narrow values
      try_value(v);
    end
    checks++;
    if (n_si == 0 || n_plain == 0) failures++;
    $display("protected=%0d unprotected=%0d", n_si, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
