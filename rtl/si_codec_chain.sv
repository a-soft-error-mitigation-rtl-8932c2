// si_codec_chain - two-stage encode/decode demonstrator.
//
// The design was shown on an FPGA as a "Top_Level" block with ports clock,
// reset, input_data[31:0] and output_data[31:0], built from an encoder block
// followed by a decoder block.  Here the encoder stage is si_write_path
// feeding a clocked register that holds the stored word (together with its
// self-pi flag), i.e. one register of the Self-Immunity register file; the
// decoder stage is si_read_path feeding a clocked output register.
//
// Port names and the encoder-then-decoder structure follow the design.  The
// self-pi flag travelling from the first stage to the second beside the
// 32-bit word, the synchronous active-high reset that clears both stages, and
// the latency of exactly two clock edges from input_data to output_data are
// this implementation's choices.  The decoder's corrected flag has no port in
// the demonstrator's interface and is left unused.
module si_codec_chain #(
  parameter int unsigned W = si_pkg::REG_W
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [W-1:0] input_data,
  output logic [W-1:0] output_data
);

  logic [W-1:0] enc_word;
  logic         enc_pi;
  logic [W-1:0] stored_word;   // encoder stage register
  logic         stored_pi;
  logic [W-1:0] dec_data;
  logic         dec_corrected;

  si_write_path #(.W(W)) u_enc (
    .wdata   (input_data),
    .word    (enc_word),
    .self_pi (enc_pi)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      stored_word <= '0;
      stored_pi   <= 1'b0;
    end else begin
      stored_word <= enc_word;
      stored_pi   <= enc_pi;
    end
  end

  si_read_path #(.W(W)) u_dec (
    .word      (stored_word),
    .self_pi   (stored_pi),
    .rdata     (dec_data),
    .corrected (dec_corrected)
  );

  always_ff @(posedge clock) begin
    if (reset) output_data <= '0;
    else       output_data <= dec_data;
  end

endmodule
