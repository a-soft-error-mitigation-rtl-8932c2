// si_hamming_enc - single-error-correcting Hamming check-bit generator.
//
// K data bits are placed, lowest index first, on the positions 1..K+P of a
// Hamming code word that are not powers of two (3, 5, 6, 7, 9, ...).  Check
// bit j is the even parity of every data bit whose position has bit j set, so
// it belongs on position 2**j.  With the defaults (K = 26, P = 5) this is the
// (31,26) code whose 5 check bits fit in the upper bits of a 32-bit register
// next to a 26-bit value.
//
// The choice of SEC Hamming code and of 26 data / 5 check bits follows the
// design; the order in which data bits map to code positions and the use of
// even parity are this implementation's own choice.
//
// Purely combinational: check follows data in the same cycle.
module si_hamming_enc #(
  parameter int unsigned K = si_pkg::DATA_K,
  parameter int unsigned P = si_pkg::ECC_P
) (
  input  logic [K-1:0] data,
  output logic [P-1:0] check
);

  always_comb begin
    int unsigned pos;
    int unsigned idx;
    check = '0;
    idx   = 0;
    for (pos = 1; pos <= K + P; pos++) begin
      if ((pos & (pos - 1)) != 0) begin   // data position
        for (int unsigned j = 0; j < P; j++)
          if (pos[j]) check[j] ^= data[idx];
        idx++;
      end
    end
  end

endmodule
