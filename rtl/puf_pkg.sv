// puf_pkg: constants and elaboration-time functions shared by the PUF-based
// checkers.
//
// The "chip identity" of every PUF instance and the secret permutations are
// fixed at elaboration from integer seeds, so a design is reproducible from its
// parameters. mix32 is a 32-bit avalanche mixer (xor-shift/multiply rounds);
// delay_weight turns it into an approximately normal stage delay difference
// (sum of four bytes, centred), perm_index runs a Fisher-Yates shuffle driven
// by mix32, and hadamard_bit gives an entry of the Sylvester-Hadamard matrix
// in 0/1 form. None of these functions is meant to be synthesized into gates;
// they only produce constants.
package puf_pkg;

  // Largest permutation width supported by perm_index.
  localparam int unsigned PERM_MAX = 256;

  // Width of one signed stage delay difference (range -510..510).
  localparam int unsigned DELAY_W = 11;

  // States of the known-path exponentiation controller (Idle S0 .. Result S5).
  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_INIT   = 3'd1,
    S_LOAD   = 3'd2,
    S_SQUARE = 3'd3,
    S_MULT   = 3'd4,
    S_RESULT = 3'd5
  } exp_state_e;

  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay difference y_idx of a PUF with the given seed; idx = N is the
  // arbiter term y_{n+1}.
  function automatic int delay_weight(input int unsigned seed, input int unsigned idx);
    int unsigned h;
    h = mix32(seed * 32'h9e3779b9 + idx * 32'h85ebca6b + 32'h1234567);
    return int'(h & 255) + int'((h >> 8) & 255) + int'((h >> 16) & 255)
         + int'((h >> 24) & 255) - 510;
  endfunction

  // Output bit pos of permutation j (0-based) of width n: dout[pos] = din[perm_index].
  function automatic int unsigned perm_index(input int unsigned seed, input int unsigned j,
                                             input int unsigned pos, input int unsigned n);
    int unsigned a [PERM_MAX];
    int unsigned r;
    int unsigned tmp;
    for (int unsigned i = 0; i < PERM_MAX; i++) a[i] = i;
    for (int unsigned i = n - 1; i >= 1; i--) begin
      r = mix32(seed * 32'h2545f491 ^ (j * 32'h9e3779b9 + i)) % (i + 1);
      tmp  = a[i];
      a[i] = a[r];
      a[r] = tmp;
    end
    return a[pos];
  endfunction

  // Entry (row, col) of the Sylvester-Hadamard matrix, 1 meaning -1.
  function automatic logic hadamard_bit(input int unsigned row, input int unsigned col);
    return ^(row & col);
  endfunction

endpackage
