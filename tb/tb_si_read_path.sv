// tb_si_read_path - checks the read side: protected words are decoded to the
// zero-extended 26-bit value (single flips in bits 30:0 corrected, a flip of
// the spare bit 31 ignored), unprotected words pass through untouched, also
// when they carry a flipped bit.
module tb_si_read_path;
  import si_tb_ref_pkg::*;

  logic [31:0] word, rdata;
  logic        self_pi, corrected;
  int checks = 0, failures = 0;

  si_read_path dut (.word(word), .self_pi(self_pi), .rdata(rdata), .corrected(corrected));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] v, stored;
      logic        pi;
      int          flip;
      v = $urandom;
      if (n % 2 == 0) v[31:26] = 6'd0;
      stored = ref_store(v, pi);
      flip = (n % 5 == 0) ? -1 : int'($urandom_range(0, 31));
      if (flip >= 0) stored[flip] = ~stored[flip];
      word = stored;
      self_pi = pi;
      #1;
      checks += 2;
      if (pi) begin
        if (rdata !== v) begin
          failures++;
          $display("FAIL protected v=%h flip=%0d rdata=%h", v, flip, rdata);
        end
        if (corrected !== (flip >= 0 && flip < 31)) begin
          failures++;
          $display("FAIL corrected=%b flip=%0d", corrected, flip);
        end
      end else begin
        if (rdata !== stored) begin
          failures++;
          $display("FAIL plain word=%h rdata=%h", stored, rdata);
        end
        if (corrected !== 1'b0) begin
          failures++;
          $display("FAIL corrected on plain word");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
