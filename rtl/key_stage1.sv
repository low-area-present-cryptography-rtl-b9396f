// key_stage1: first stage of the round-key update (the PRESENT-80 key schedule).
//
// Forward: the 80-bit key is rotated left by 61 places, its top nibble (79:76) goes
// through the S-box, and the 5-bit round counter is XORed into bits 19:15; bits
// 75:20 and 14:0 pass unchanged. With INVERSE set the module undoes one such step
// (XOR the counter, inverse S-box on the top nibble, rotate right by 61), which lets
// the decryption core walk the key schedule backwards.
// Interface: kin, round counter rc, kout. Combinational.
// The single nibble substitution uses the shared table directly rather than a DROM.
module key_stage1
  import present_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  key_t   kin,
  input  round_t rc,
  output key_t   kout
);

  key_t t;

  always_comb begin
    if (!INVERSE) begin
      t          = {kin[18:0], kin[79:19]};
      t[79:76]   = sbox(t[79:76]);
      t[19:15]   = t[19:15] ^ rc;
      kout       = t;
    end else begin
      t          = kin;
      t[19:15]   = t[19:15] ^ rc;
      t[79:76]   = sbox_inv(t[79:76]);
      kout       = {t[60:0], t[79:61]};
    end
  end

endmodule
