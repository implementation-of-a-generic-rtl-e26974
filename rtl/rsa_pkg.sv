// rsa_pkg: sizes and encodings shared by the RSA cryptosystem.
//
// The engine is generic up to a 256-bit modulus n = p*q built from two
// 128-bit primes. The Montgomery radix is r = 2^RSA_W, so every "mod r" is
// a truncation and every "/ r" a shift. The instruction codes on the top
// level's instr port are this design's own numbering; the source only says
// that instr selects key generation, encryption and decryption and that
// zero resets the cryptosystem.
package rsa_pkg;

  localparam int unsigned RSA_W  = 256;          // modulus width
  localparam int unsigned RSA_DW = 2 * RSA_W;    // dividend / product width

  typedef enum logic [1:0] {
    INSTR_RESET   = 2'd0,
    INSTR_KEYGEN  = 2'd1,
    INSTR_ENCRYPT = 2'd2,
    INSTR_DECRYPT = 2'd3
  } instr_e;

  // Bit length of a vector: index of the highest set bit plus one, 0 for 0.
  function automatic int unsigned bitlen(input logic [RSA_DW:0] v);
    bitlen = 0;
    for (int unsigned i = 0; i <= RSA_DW; i++)
      if (v[i]) bitlen = i + 1;
  endfunction

endpackage
