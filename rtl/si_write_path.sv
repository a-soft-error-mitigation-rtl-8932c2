// si_write_path - Self-Immunity handling of a register write.
//
// A value whose upper W-K bits (six, for a 32-bit register) are all zero is a
// "26-bit value": the self-pi flag is set and the word written is
// {1'b0, check, value[K-1:0]}, the Hamming check bits taking the place of
// the unused upper bits.  Any other value is written unchanged with self-pi
// cleared.  This is the width check, encoder and multiplexer of the write
// side of the design.
//
// The encoder is only meant to work for 26-bit values.  Here its input is
// forced to zero when self-pi is clear, so it does not toggle on values that
// are stored unprotected; that operand isolation is this implementation's
// way of "activating" the encoder only when needed.  The spare top bit of a
// protected word is written as 0, as the design's word layout shows.
//
// Combinational: word and self_pi follow wdata in the same cycle.
module si_write_path #(
  parameter int unsigned W = si_pkg::REG_W,
  parameter int unsigned K = si_pkg::value_bits(W),
  parameter int unsigned P = si_pkg::check_bits(K)
) (
  input  logic [W-1:0] wdata,     // value produced by the instruction
  output logic [W-1:0] word,      // what is stored in the register
  output logic         self_pi    // 1: word holds value plus check bits
);

  logic [K-1:0] enc_in;
  logic [P-1:0] check;

  assign self_pi = (wdata[W-1:K] == '0);
  assign enc_in  = self_pi ? wdata[K-1:0] : '0;

  si_hamming_enc #(.K(K), .P(P)) u_enc (
    .data  (enc_in),
    .check (check)
  );

  always_comb begin
    if (self_pi) begin
      word          = '0;
      word[K-1:0]   = wdata[K-1:0];
      word[K+P-1:K] = check;
    end else begin
      word = wdata;
    end
  end

endmodule
