// trng: behavioural model of a true random number source (not synthesizable).
//
// A physical TRNG samples an unpredictable effect (oscillator jitter, metastability)
// and has no logic function that RTL can express, so this model stands in for one in
// simulation: it presents a fresh WIDTH-bit word drawn from the simulator's random
// generator on every rising clock edge, as the key generator expects.
// Interface: clk in, rn out (WIDTH bits, new value each clock, registered).
// For an FPGA build replace this module with an entropy source of the same ports.
module trng #(
  parameter int unsigned WIDTH = 80
) (
  input  logic             clk,
  output logic [WIDTH-1:0] rn
);

  localparam int unsigned POOL = ((WIDTH + 31) / 32) * 32;

  function automatic logic [POOL-1:0] draw();
    logic [POOL-1:0] p;
    for (int unsigned i = 0; i < POOL / 32; i++) p[32*i +: 32] = $urandom;
    return p;
  endfunction

  always_ff @(posedge clk) rn <= WIDTH'(draw());

endmodule
