// sbox_layer: substitution layer of the 64-bit state built from 8 dual-port ROMs.
//
// The state is cut into 16 nibbles; DROM g substitutes nibbles 2g (bits 8g+3:8g) and
// 2g+1 (bits 8g+7:8g+4), and the 16 results are concatenated back in place.
// INVERSE selects the inverse S-box for decryption. Purely combinational.
module sbox_layer
  import present_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);

  for (genvar g = 0; g < 8; g++) begin : g_drom
    drom #(.INVERSE(INVERSE)) u_drom (
      .addr_a(din[8*g   +: 4]),
      .addr_b(din[8*g+4 +: 4]),
      .data_a(dout[8*g   +: 4]),
      .data_b(dout[8*g+4 +: 4])
    );
  end

endmodule
