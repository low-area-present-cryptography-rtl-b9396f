// p_layer: PRESENT bit permutation of the 64-bit state.
//
// Bit i moves to bit 16*(i mod 4) + i/4, which spreads the four outputs of every
// S-box over four different S-boxes of the next round. With INVERSE set the module
// undoes the permutation (bit P(i) returns to bit i) for the decryption core.
// Pure wiring, no logic and no timing of its own.
module p_layer
  import present_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);

  always_comb begin
    for (int unsigned i = 0; i < BLOCK_W; i++) begin
      if (INVERSE) dout[i] = din[player_pos(i)];
      else         dout[player_pos(i)] = din[i];
    end
  end

endmodule
