// si_tb_ref_pkg - reference model used by the Self-Immunity testbenches.
//
// Builds the (31,26) Hamming code word explicitly as a vector indexed by
// code position (data bit i on the i-th position that is not a power of two,
// check bit j on position 2**j) and derives every check bit as the parity of
// the masked code word.  Decoding is done by brute force: try the received
// word and each of its 31 single-bit variants and keep the one whose check
// bits are consistent.  Neither method shares code with the RTL.
package si_tb_ref_pkg;

  localparam int K = 26;
  localparam int P = 5;
  localparam int N = K + P;   // 31

  // code position (1..31) of data bit i
  function automatic int data_pos(int i);
    int pos, seen;
    seen = -1;
    for (pos = 1; pos <= N; pos++) begin
      if (pos != 1 && pos != 2 && pos != 4 && pos != 8 && pos != 16) seen++;
      if (seen == i) return pos;
    end
    return -1;
  endfunction

  function automatic logic [P-1:0] ref_check(logic [K-1:0] d);
    logic [N:0] cw;   // index 0 unused
    logic [N:0] mask;
    logic [P-1:0] c;
    cw = '0;
    for (int i = 0; i < K; i++) cw[data_pos(i)] = d[i];
    for (int j = 0; j < P; j++) begin
      mask = '0;
      for (int pos = 1; pos <= N; pos++) mask[pos] = ((pos >> j) & 1) == 1;
      c[j] = ^(cw & mask);
    end
    return c;
  endfunction

  // Register word a correct Self-Immunity write produces.
  function automatic logic [31:0] ref_store(logic [31:0] v, output logic pi);
    pi = (v[31:26] == 6'd0);
    if (pi) return {1'b0, ref_check(v[25:0]), v[25:0]};
    return v;
  endfunction

  // Brute-force SEC decode of a 31-bit word {check, data}: returns the data
  // of the unique word within distance 1 that is a valid code word.
  function automatic logic [K-1:0] ref_decode(logic [N-1:0] rx, output bit fixed);
    logic [N-1:0] t;
    fixed = 1'b0;
    if (ref_check(rx[K-1:0]) == rx[N-1:K]) return rx[K-1:0];
    for (int b = 0; b < N; b++) begin
      t = rx;
      t[b] = ~t[b];
      if (ref_check(t[K-1:0]) == t[N-1:K]) begin
        fixed = 1'b1;
        return t[K-1:0];
      end
    end
    return rx[K-1:0];
  endfunction

endpackage
