// grain_pkg: sizes and the Boolean functions shared by the Grain-80 (Grain v1)
// datapath.
//
// The cipher state is two 80-bit vectors, the LFSR `l` and the NFSR `n`. Bit
// index k of a vector is the state bit l_{i+k} (n_{i+k}) of the current clock
// i, so index 0 is the oldest bit, the one shifted out next, and index 79 the
// most recent feedback bit. Every function below takes an offset `j` and
// evaluates its term on the state as it will be j steps later. Copy j of an
// unrolled datapath needs exactly that, and it is valid as long as the highest
// tap plus j stays inside the 80 bits, which holds for j <= 15: this is what
// bounds the unrolling factor to 16.
//
// The five register-set terms split the three cipher functions:
//   f = R0                      LFSR feedback, taps 0 13 23 38 51 62
//   g = R1 ^ R2                 NFSR feedback (includes l_0)
//   z = R3 ^ R4                 keystream bit, the output function H(L, N)
// R1 holds the linear and quadratic NFSR feedback terms, R2 the products of
// three or more bits, R3 the linear part of the output (the NFSR bits of
// A = {1,2,4,10,31,43,56} and the linear terms n_63 and l_25 of h), and R4
// the non-linear monomials of h. The tap positions and monomials are those of
// Grain v1; the way g is split between R1 and R2 is this design's choice.
package grain_pkg;

  localparam int unsigned STATE_W     = 80;  // LFSR and NFSR length
  localparam int unsigned KEY_W       = 80;
  localparam int unsigned IV_W        = 64;
  localparam int unsigned INIT_ROUNDS = 160; // initialisation clocks at one bit per clock
  localparam int unsigned KS_BITS     = 80;  // keystream bits collected into ks_output
  localparam int unsigned MAX_UNROLL  = 16;  // 80 - 64: highest tap used is 64

  typedef logic [STATE_W-1:0] state_t;

  // True when u is a legal unrolling factor: a power of two that divides the
  // 160 initialisation rounds and the 80 collected keystream bits.
  function automatic bit unroll_ok(int unsigned u);
    return (u >= 1) && (u <= MAX_UNROLL) && ((u & (u - 1)) == 0);
  endfunction

  // R0: LFSR feedback polynomial f(x)
  function automatic logic r0_term(state_t l, int unsigned j);
    return l[j] ^ l[13+j] ^ l[23+j] ^ l[38+j] ^ l[51+j] ^ l[62+j];
  endfunction

  // R1: l_0, the linear NFSR taps and the three quadratic monomials of g(x)
  function automatic logic r1_term(state_t l, state_t n, int unsigned j);
    logic lin;
    lin = n[j] ^ n[9+j] ^ n[14+j] ^ n[21+j] ^ n[28+j] ^ n[33+j] ^ n[37+j] ^
          n[45+j] ^ n[52+j] ^ n[60+j] ^ n[62+j];
    return l[j] ^ lin ^ (n[63+j] & n[60+j]) ^ (n[37+j] & n[33+j]) ^ (n[15+j] & n[9+j]);
  endfunction

  // R2: monomials of degree 3 to 6 of g(x)
  function automatic logic r2_term(state_t n, int unsigned j);
    logic a, b, c, d, e, f6, p, q;
    a  = n[60+j] & n[52+j] & n[45+j];
    b  = n[33+j] & n[28+j] & n[21+j];
    c  = n[63+j] & n[45+j] & n[28+j] & n[9+j];
    d  = n[60+j] & n[52+j] & n[37+j] & n[33+j];
    e  = n[63+j] & n[60+j] & n[21+j] & n[15+j];
    p  = n[63+j] & n[60+j] & n[52+j] & n[45+j] & n[37+j];
    q  = n[33+j] & n[28+j] & n[21+j] & n[15+j] & n[9+j];
    f6 = n[52+j] & n[45+j] & n[37+j] & n[33+j] & n[28+j] & n[21+j];
    return a ^ b ^ c ^ d ^ e ^ p ^ q ^ f6;
  endfunction

  // R3: linear part of the output, sum over A of n_k plus the linear terms of h
  function automatic logic r3_term(state_t l, state_t n, int unsigned j);
    return n[1+j] ^ n[2+j] ^ n[4+j] ^ n[10+j] ^ n[31+j] ^ n[43+j] ^ n[56+j] ^
           n[63+j] ^ l[25+j];
  endfunction

  // R4: non-linear monomials of h(x0..x4) with x0=l_3, x1=l_25, x2=l_46,
  // x3=l_64, x4=n_63
  function automatic logic r4_term(state_t l, state_t n, int unsigned j);
    logic x0, x1, x2, x3, x4;
    x0 = l[3+j];
    x1 = l[25+j];
    x2 = l[46+j];
    x3 = l[64+j];
    x4 = n[63+j];
    return (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2) ^ (x0 & x2 & x3) ^
           (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
  endfunction

endpackage
