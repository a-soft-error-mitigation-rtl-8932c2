// tb_si_codec_chain - checks the encode/decode demonstrator: output_data
// equals input_data exactly two clock edges later for narrow and wide
// values, and the word held between the two stages is the Self-Immunity
// encoding of the input (checked through the stage register).
module tb_si_codec_chain;
  import si_tb_ref_pkg::*;

  logic        clock = 0, reset;
  logic [31:0] input_data, output_data;
  logic [31:0] hist [$];
  int checks = 0, failures = 0;
  int n_si = 0, n_plain = 0;

  si_codec_chain dut (.clock(clock), .reset(reset), .input_data(input_data),
                      .output_data(output_data));

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; input_data = 0;
    repeat (2) @(posedge clock);
    @(negedge clock);
    checks++;
    if (output_data !== 0) begin failures++; $display("FAIL reset output"); end
    reset = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] v, exp_word;
      logic        pi;
      v = $urandom;
      if (n == 0) v = 32'd154;
      else if ($urandom_range(0, 99) < 88) v[31:26] = 6'd0;
      input_data = v;
      hist.push_back(v);
      @(posedge clock);
      #1;
      // stage register now holds the encoded input
      exp_word = ref_store(v, pi);
      checks++;
      if (dut.stored_word !== exp_word || dut.stored_pi !== pi) begin
        failures++;
        $display("FAIL stage word %h expected %h", dut.stored_word, exp_word);
      end
      if (pi) n_si++; else n_plain++;
      // output shows the input of two edges ago
      if (hist.size() > 2) void'(hist.pop_front());
      if (hist.size() == 2) begin
        checks++;
        if (output_data !== hist[0]) begin
          failures++;
          $display("FAIL output %h expected %h", output_data, hist[0]);
        end
      end
      @(negedge clock);
    end
    $display("protected=%0d unprotected=%0d", n_si, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
