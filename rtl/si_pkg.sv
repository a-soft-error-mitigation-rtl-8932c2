// si_pkg - shared sizes of the Self-Immunity register file.
//
// Self-Immunity stores a single-error-correcting Hamming code inside the
// unused upper bits of a register whenever the value is narrow enough.  For a
// register of width W the value width K is the largest K with
// K + P + 1 <= W, where P is the number of Hamming check bits for K data bits
// (2**P >= K + P + 1).  For W = 32 that gives K = 26 and P = 5, so a protected
// word is laid out as {1'b0, check[4:0], data[25:0]}.  For W = 64 the same
// rule gives K = 57, P = 6.
//
// The register count (32), the two read ports and the single write port are
// the configuration the design was synthesised in; they are the defaults here.
// The helper functions compute K and P from W so the modules can be
// re-parameterised for other register widths.
package si_pkg;

  localparam int unsigned REG_W    = 32;  // register width w
  localparam int unsigned NREGS    = 32;  // number of architectural registers
  localparam int unsigned NREAD    = 2;   // read ports


  // Number of Hamming check bits needed for k data bits.
  function automatic int unsigned check_bits(int unsigned k);
    int unsigned p;
    p = 0;
    while ((1 << p) < k + p + 1) p++;
    return p;
  endfunction

  // Largest value width k whose Hamming code word k + p still leaves one
  // spare bit in a w-bit register (k + p + 1 <= w).
  function automatic int unsigned value_bits(int unsigned w);
    int unsigned k;
    k = 1;
    while ((k + 1) + check_bits(k + 1) + 1 <= w) k++;
    return k;
  endfunction

  localparam int unsigned DATA_K = value_bits(REG_W);   // 26
  localparam int unsigned ECC_P  = check_bits(DATA_K);  // 5

endpackage
