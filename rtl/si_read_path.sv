// si_read_path - Self-Immunity handling of a register read.
//
// When the register's self-pi flag is set, bits K+P-1:0 of the stored word
// (30:0 for a 32-bit register) are a Hamming code word: they are checked,
// a single flipped bit is corrected, and the value returned is the K
// corrected data bits with the upper bits forced to zero.  When self-pi is
// clear the stored word is returned as it is, unchecked.  This is the decoder
// and multiplexer of the read side of the design.
//
// The decoder's inputs are forced to zero for unprotected words, so it only
// switches for protected ones (this implementation's choice).  The corrected
// output, which reports that a bit was repaired, is also an addition; the
// syndrome itself is not needed here and is left unused.
//
// Combinational: rdata follows word and self_pi in the same cycle.
module si_read_path #(
  parameter int unsigned W = si_pkg::REG_W,
  parameter int unsigned K = si_pkg::value_bits(W),
  parameter int unsigned P = si_pkg::check_bits(K)
) (
  input  logic [W-1:0] word,       // stored register word
  input  logic         self_pi,    // stored self-pi flag
  output logic [W-1:0] rdata,      // value delivered to the consumer
  output logic         corrected   // a single-bit error was repaired
);

  logic [K-1:0] dec_data_in;
  logic [P-1:0] dec_check_in;
  logic [K-1:0] dec_data_out;
  logic [P-1:0] syndrome;
  logic         dec_corrected;

  assign dec_data_in  = self_pi ? word[K-1:0]   : '0;
  assign dec_check_in = self_pi ? word[K+P-1:K] : '0;

  si_hamming_dec #(.K(K), .P(P)) u_dec (
    .data_in   (dec_data_in),
    .check_in  (dec_check_in),
    .data_out  (dec_data_out),
    .syndrome  (syndrome),
    .corrected (dec_corrected)
  );

  always_comb begin
    if (self_pi) begin
      rdata        = '0;
      rdata[K-1:0] = dec_data_out;
    end else begin
      rdata = word;
    end
  end

  assign corrected = self_pi && dec_corrected;

endmodule
