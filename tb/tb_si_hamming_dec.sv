// tb_si_hamming_dec - checks the SEC decoder: clean words pass unchanged with
// a zero syndrome, every single-bit error (data or check bit) is corrected
// and its position is reported as the syndrome.
module tb_si_hamming_dec;
  import si_tb_ref_pkg::*;

  logic [25:0] data_in, data_out;
  logic [4:0]  check_in, syndrome;
  logic        corrected;
  int checks = 0, failures = 0;

  si_hamming_dec dut (.data_in(data_in), .check_in(check_in), .data_out(data_out),
                      .syndrome(syndrome), .corrected(corrected));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code position of register bit b of the word {check, data}
  function automatic int pos_of_bit(int b);
    if (b < 26) return data_pos(b);
    return 1 << (b - 26);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [25:0] d;
      logic [30:0] w;
      int flip;
      d = 26'($urandom);
      if (n < 26) d = 26'(1) << n;
      w = {ref_check(d), d};
      flip = (n % 4 == 0) ? -1 : int'($urandom_range(0, 30));
      if (flip >= 0) w[flip] = ~w[flip];
      {check_in, data_in} = w;
      #1;
      checks++;
      if (data_out !== d) begin
        failures++;
        $display("FAIL d=%h flip=%0d out=%h", d, flip, data_out);
      end
      checks++;
      if (corrected !== (flip >= 0)) begin
        failures++;
        $display("FAIL corrected=%b flip=%0d", corrected, flip);
      end
      checks++;
      if (int'(syndrome) !== ((flip >= 0) ? pos_of_bit(flip) : 0)) begin
        failures++;
        $display("FAIL syndrome=%0d flip=%0d", syndrome, flip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
