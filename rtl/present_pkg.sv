// present_pkg: types, tables and small helpers shared by the PRESENT-80 cores and
// the TRNG-PRNG key generator.
//
// The 4-bit substitution table is the PRESENT S-box; its inverse is derived from it
// and is used by the decryption core. KROT is the fixed 20-bit bit rotation of the
// second key stage: bit j of a 20-bit key word moves to bit KROT[j]. Bit 0 is the
// least significant bit everywhere in this design.
package present_pkg;

  localparam int unsigned BLOCK_W = 64;
  localparam int unsigned KEY_W   = 80;
  localparam int unsigned ROUNDS  = 31;   // full rounds; a 32nd round key whitens the output

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [4:0]         round_t;
  typedef logic [3:0]         nibble_t;

  // PRESENT S-box as a packed table, SBOX[x] = S[x] (entry 0 in the low nibble):
  // S = C 5 6 B 9 0 A D 3 E F 8 4 7 1 2 for x = 0..F
  localparam logic [15:0][3:0] SBOX     = 64'h2174_8FE3_DA09_B65C;

  // Inverse S-box, SBOX_INV[SBOX[x]] == x
  localparam logic [15:0][3:0] SBOX_INV = 64'hA970_364B_D21C_8FE5;

  // Second key stage: destination of bit j of each 20-bit key word
  localparam int unsigned KROT [20] = '{
    14, 10,  9, 13, 16, 11,  8,  2, 17,  5,
    18,  3, 15,  1, 19,  4,  7, 12,  0,  6
  };

  // P-layer: bit i of the state moves to bit player_pos(i)
  function automatic int unsigned player_pos(input int unsigned i);
    return (i % 4) * 16 + i / 4;
  endfunction

  function automatic nibble_t sbox(input nibble_t x);
    return SBOX[x];
  endfunction

  function automatic nibble_t sbox_inv(input nibble_t x);
    return SBOX_INV[x];
  endfunction

endpackage
