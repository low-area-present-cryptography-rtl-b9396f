// prng: mixing network that turns two true-random words into an 80-bit key each clock.
//
// From the first random word RN0: T1 = RN0[19:0], T2 = RN0[39:20], T3 = RN0[59:40],
// T4 = RN0[79:60]. From the second: RN1..RN4 = its 20-bit quarters, RN1 lowest.
//   M1 = sel ? T2 : T1          M2 = sel ? T4 : T3
//   X1 = M1 ^ T1                X2 = M2 ^ T4
//   A1 = X1 + RN1  A2 = M1 + RN2  A3 = X2 + RN3  A4 = M2 + RN4   (20-bit, carry dropped)
//   X3 = ~(A1 ^ A2)             X4 = ~(A3 ^ A4)
//   M3 = {A1, X3, A4, X4}[cnt]  (cnt = 0,1,2,3)
//   kdat1 = {X3, M3, X4, A4}    (X3 in bits 79:60)
// cnt is a free-running 2-bit counter and sel is its low bit; both are choices of
// this design, as are the bit order of the quarters and the registered output.
// Interface: rn0, rn_b from the random sources; kdat1 is registered, a new key every
// clock. Asynchronous active-low reset; cnt starts at 0.
module prng
  import present_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  key_t       rn0,
  input  key_t       rn_b,
  output key_t       kdat1
);

  typedef logic [19:0] word_t;

  word_t t1, t2, t3, t4, rn1, rn2, rn3, rn4;
  word_t m1, m2, x1, x2, a1, a2, a3, a4, x3, x4, m3;
  logic  sel;
  logic [1:0] cnt;

  assign {t4, t3, t2, t1}     = rn0;
  assign {rn4, rn3, rn2, rn1} = rn_b;
  assign sel = cnt[0];

  always_comb begin
    m1 = sel ? t2 : t1;
    m2 = sel ? t4 : t3;
    x1 = m1 ^ t1;
    x2 = m2 ^ t4;
    a1 = x1 + rn1;
    a2 = m1 + rn2;
    a3 = x2 + rn3;
    a4 = m2 + rn4;
    x3 = ~(a1 ^ a2);
    x4 = ~(a3 ^ a4);
    unique case (cnt)
      2'd0: m3 = a1;
      2'd1: m3 = x3;
      2'd2: m3 = a4;
      default: m3 = x4;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      kdat1 <= '0;
    end else begin
      cnt   <= cnt + 1'b1;
      kdat1 <= {x3, m3, x4, a4};
    end
  end

endmodule
