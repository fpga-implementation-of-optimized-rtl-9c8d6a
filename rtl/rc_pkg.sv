// rc_pkg: constants and types shared by the RC5 and RC6 units.
//
// The two ciphers derive their round-key tables from the same pair of "magic"
// constants, P_w = Odd((e-2)*2^w) and Q_w = Odd((phi-1)*2^w), where Odd(x) is
// the odd integer nearest to x. The functions below give them for any word
// size up to 64 bits: the 64-bit binary fractions of (e-2) and (phi-1) are
// truncated to w bits and the least significant bit is set, which is the
// nearest odd integer. For w = 16, 32, 64 this gives B7E1/9E37,
// B7E15163/9E3779B9 and B7E151628AED2A6B/9E3779B97F4A7C15.
package rc_pkg;

  // First 64 fraction bits of e-2 and of phi-1 (the golden ratio minus one).
  localparam logic [63:0] FRAC_E_MINUS_2   = 64'hB7E1_5162_8AED_2A6A;
  localparam logic [63:0] FRAC_PHI_MINUS_1 = 64'h9E37_79B9_7F4A_7C15;

  // Which cipher a request goes to in the combined unit.
  typedef enum logic {
    ALG_RC5 = 1'b0,
    ALG_RC6 = 1'b1
  } alg_e;

  function automatic logic [63:0] magic_p(input int unsigned w);
    return (FRAC_E_MINUS_2 >> (64 - w)) | 64'd1;
  endfunction

  function automatic logic [63:0] magic_q(input int unsigned w);
    return (FRAC_PHI_MINUS_1 >> (64 - w)) | 64'd1;
  endfunction

  // Number of w-bit words that hold a key of kb bytes (at least one).
  function automatic int unsigned key_words(input int unsigned kb, input int unsigned w);
    int unsigned u;
    u = w / 8;
    return (kb == 0) ? 1 : (kb + u - 1) / u;
  endfunction

  function automatic int unsigned max_u(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
