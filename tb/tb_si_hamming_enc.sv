// tb_si_hamming_enc - checks the (31,26) check-bit generator against fixed
// vectors worked out by hand from the position rule and against the
// reference model for walking-one and random data.
module tb_si_hamming_enc;
  import si_tb_ref_pkg::*;

  logic [25:0] data;
  logic [4:0]  check;
  int checks = 0, failures = 0;

  si_hamming_enc dut (.data(data), .check(check));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_check(logic [25:0] d, logic [4:0] exp);
    data = d;
    #1;
    checks++;
    if (check !== exp) begin
      failures++;
      $display("FAIL data=%h check=%b expected=%b", d, check, exp);
    end
  endtask

  initial begin
    // fixed vectors
    expect_check(26'd154,      5'b00111);
    expect_check(26'h3FFFFFF,  5'b11111);
    expect_check(26'h0000001,  5'b00011);
    expect_check(26'h2AAAAAA,  5'b01010);
    expect_check(26'h1555555,  5'b10101);
    expect_check(26'h00D2993,  5'b11011);
    expect_check(26'h002802A,  5'b01010);
    expect_check(26'h0153264,  5'b11100);
    expect_check(26'h0,        5'b00000);
    // walking one: each data bit's column of the parity-check matrix
    for (int i = 0; i < 26; i++) expect_check(26'(1) << i, ref_check(26'(1) << i));
    // random
    for (int n = 0; n < 3000; n++) begin
      logic [25:0] d;
      d = 26'($urandom);
      expect_check(d, ref_check(d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
