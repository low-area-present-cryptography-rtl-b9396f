// key_stage2: second stage of the round-key update ("key scheduling process").
//
// The 80-bit key from the first stage is cut into four 20-bit words K1..K4
// (K1 = bits 79:60, K4 = bits 19:0). Each word is bit-rotated by the fixed table
// KROT (bit j moves to bit KROT[j]), giving R1..R4. The 80 rotated bits are cut into
// 20 nibbles and substituted by 10 dual-port ROMs (two nibbles each); the results
// Y1..Y20 are put back in the same order to form the next round key.
// With en low the stage is bypassed (kout = kin), which gives the plain PRESENT-80
// key schedule and lets the standard test vectors be checked.
// With INVERSE set the module undoes the stage: inverse S-box on all 20 nibbles,
// then the inverse rotation of each word. Combinational.
//
// The split into four words, the rotation table and the 10 DROMs follow the
// architecture description; the order in which Y1..Y20 are reassembled (same
// positions as the nibbles they came from) is a choice of this design.
module key_stage2
  import present_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  key_t kin,
  input  logic en,
  output key_t kout
);

  key_t sub_in, sub_out, res;

  // rotation of each 20-bit word, forward or inverse
  function automatic key_t rotate_words(input key_t k, input bit inv);
    key_t r;
    r = '0;
    for (int unsigned w = 0; w < 4; w++) begin
      for (int unsigned j = 0; j < 20; j++) begin
        if (inv) r[20*w + j]        = k[20*w + KROT[j]];
        else     r[20*w + KROT[j]]  = k[20*w + j];
      end
    end
    return r;
  endfunction

  // forward: rotate, then substitute; inverse: substitute back, then rotate back
  assign sub_in = INVERSE ? kin : rotate_words(kin, 1'b0);

  for (genvar g = 0; g < 10; g++) begin : g_drom
    drom #(.INVERSE(INVERSE)) u_drom (
      .addr_a(sub_in[8*g   +: 4]),
      .addr_b(sub_in[8*g+4 +: 4]),
      .data_a(sub_out[8*g   +: 4]),
      .data_b(sub_out[8*g+4 +: 4])
    );
  end

  assign res  = INVERSE ? rotate_words(sub_out, 1'b1) : sub_out;
  assign kout = en ? res : kin;

endmodule
