// drom: dual-port 16 x 4-bit read-only memory holding the PRESENT S-box.
//
// Two nibbles are substituted at once, one per port, which is how the design halves
// the number of S-box instances: 8 of these cover the 16 nibbles of the 64-bit state
// and 10 cover the 20 nibbles of the second key stage. With INVERSE set the ROM holds
// the inverse S-box for the decryption core.
//
// Interface: addr_a/addr_b are the nibbles to substitute, data_a/data_b the results.
// Timing: asynchronous (combinational) read, so a whole cipher round fits in one
// clock; a 16-entry ROM maps to distributed LUT memory on an FPGA. The read style is
// a choice of this design; the table contents follow the PRESENT S-box.
module drom
  import present_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  nibble_t addr_a,
  input  nibble_t addr_b,
  output nibble_t data_a,
  output nibble_t data_b
);

  localparam logic [15:0][3:0] ROM = INVERSE ? SBOX_INV : SBOX;

  assign data_a = ROM[addr_a];
  assign data_b = ROM[addr_b];

endmodule
