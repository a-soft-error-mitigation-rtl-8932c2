// si_hamming_dec - single-error-correcting Hamming checker and corrector.
//
// Recomputes the P check bits over the K received data bits (same position
// map as si_hamming_enc) and XORs them with the received check bits.  The
// result, the syndrome, is the code-word position (1..K+P) of a single
// flipped bit, or zero when the word is clean.  A syndrome that names a data
// position flips that data bit back; one that names a power of two points at
// a check bit, and the data is already right.
//
// With the defaults the input is the 31-bit word {check[4:0], data[25:0]}
// held in bits 30:0 of a protected register.  Only single-bit errors are
// corrected, as the design intends; a double error is mis-corrected.
//
// The corrected flag is this implementation's addition: the design only says
// that the decoder returns the corrected value.  Combinational.
module si_hamming_dec #(
  parameter int unsigned K = si_pkg::DATA_K,
  parameter int unsigned P = si_pkg::ECC_P
) (
  input  logic [K-1:0] data_in,
  input  logic [P-1:0] check_in,
  output logic [K-1:0] data_out,
  output logic [P-1:0] syndrome,
  output logic         corrected   // syndrome non-zero: one bit was repaired
);

  logic [P-1:0] check_calc;

  si_hamming_enc #(.K(K), .P(P)) u_recalc (
    .data  (data_in),
    .check (check_calc)
  );

  assign syndrome  = check_calc ^ check_in;
  assign corrected = |syndrome;

  always_comb begin
    int unsigned pos;
    int unsigned idx;
    data_out = data_in;
    idx      = 0;
    for (pos = 1; pos <= K + P; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        if (32'(syndrome) == pos) data_out[idx] = ~data_in[idx];
        idx++;
      end
    end
  end

endmodule
