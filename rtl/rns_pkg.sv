// rns_pkg: types, limits and constant functions shared by the residue
// number system (RNS) FIR filter.
//
// A coefficient residue is stored in the coefficient memory as a code word,
// not necessarily as its binary value (coefficient encoding). A code table
// for one modulus is a code_row_t: entry r holds the code word of residue r.
// Only the low RW bits of an entry and the first M entries are used, where
// M is the modulus and RW the residue width of the filter. The identity
// table (residue r coded as binary r) is the conventional encoding.
//
// The limits MAX_M and CODE_W bound the size of a code table; they are this
// design's choice and allow moduli up to 32.
package rns_pkg;

  localparam int MAX_M  = 32;  // largest modulus a code table can describe
  localparam int CODE_W = 5;   // widest residue code word

  typedef logic [CODE_W-1:0] code_t;
  typedef code_t [MAX_M-1:0] code_row_t;

  // Binary (conventional) coefficient encoding: residue r coded as r.
  function automatic code_row_t identity_row();
    code_row_t row;
    for (int r = 0; r < MAX_M; r++) row[r] = code_t'(r);
    return row;
  endfunction

  localparam code_row_t IDENTITY_ROW = identity_row();

  // Non-negative residue of a signed integer.
  function automatic int residue(longint x, int m);
    longint r;
    r = x % longint'(m);
    if (r < 0) r += longint'(m);
    return int'(r);
  endfunction

  // Multiplicative inverse of a modulo m (a and m relatively prime).
  function automatic int mod_inverse(longint a, int m);
    for (int i = 1; i < m; i++)
      if (residue(a * longint'(i), m) == 1) return i;
    return 0;
  endfunction

  // Binary-reflected Gray code and its inverse.
  function automatic logic [31:0] bin2gray(logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [31:0] gray2bin(logic [31:0] g);
    logic [31:0] b;
    b = g;
    for (int s = 1; s < 32; s <<= 1) b ^= (b >> s);
    return b;
  endfunction

endpackage
