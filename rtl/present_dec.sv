// present_dec: round-iterative PRESENT-80 decryption, the encryption core run in
// reverse.
//
// Decryption needs the round keys last-first. On an accepted load the ciphertext goes
// into dreg and the 80-bit (first) key into kreg; the core then:
//   KEYGEN  31 clocks: kreg <= key_stage2(key_stage1(kreg, r)), r = 1..31, giving the
//           last round key K32 (the same schedule the encryption core runs);
//   WHITEN  1 clock:   dreg <= dreg ^ K32[79:16]; kreg <= inverse step -> K31;
//   ROUND   31 clocks, r = 31..1: dreg <= inverse S-box(inverse P-layer(dreg)) ^ Kr,
//           kreg <= inverse key step -> K(r-1).
// The inverse S-box layer uses 8 dual-port ROMs with the inverse table. The
// plaintext is registered on the last round.
//
// Interface: as present_enc. load/idat/key/stage2_en are sampled when ready is high;
// stage2_en must match the value used to encrypt.
// Timing: valid pulses 63 clocks after the load edge; ready is high only when idle,
// and in the cycle valid is written, so one block per 63 clocks.
// The key pre-computation pass and the handshake are this design's own choices; the
// inverse datapath follows from reversing the encryption round.
module present_dec
  import present_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t idat,
  input  key_t   key,
  input  logic   stage2_en,
  output logic   ready,
  output block_t odat,
  output logic   valid
);

  typedef enum logic [1:0] {S_IDLE, S_KEYGEN, S_WHITEN, S_ROUND} state_e;

  state_e state;
  round_t round, rc_inv;
  block_t dreg, inv_p, inv_s, dnext;
  key_t   kreg, kf1, kf2, ki2, ki1;
  logic   s2_q;
  logic   last;

  assign last  = (state == S_ROUND) && (round == 5'd1);
  assign ready = (state == S_IDLE) || last;

  // inverse round: undo the permutation, then the substitution, then add Kr
  p_layer    #(.INVERSE(1'b1)) u_iperm (.din(dreg),  .dout(inv_p));
  sbox_layer #(.INVERSE(1'b1)) u_isbox (.din(inv_p), .dout(inv_s));
  assign dnext = inv_s ^ kreg[79:16];

  // forward schedule for the pre-computation pass
  key_stage1 #(.INVERSE(1'b0)) u_kf1 (.kin(kreg), .rc(round), .kout(kf1));
  key_stage2 #(.INVERSE(1'b0)) u_kf2 (.kin(kf1),  .en(s2_q),  .kout(kf2));

  // backward schedule: K(r) = stage1^-1(stage2^-1(K(r+1)), r)
  assign rc_inv = (state == S_WHITEN) ? round_t'(ROUNDS) : round - 1'b1;
  key_stage2 #(.INVERSE(1'b1)) u_ki2 (.kin(kreg), .en(s2_q),   .kout(ki2));
  key_stage1 #(.INVERSE(1'b1)) u_ki1 (.kin(ki2),  .rc(rc_inv), .kout(ki1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      round <= '0;
      dreg  <= '0;
      kreg  <= '0;
      s2_q  <= 1'b0;
      odat  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_KEYGEN: begin
          kreg <= kf2;
          if (round == round_t'(ROUNDS)) state <= S_WHITEN;
          else                           round <= round + 1'b1;
        end
        S_WHITEN: begin
          dreg  <= dreg ^ kreg[79:16];
          kreg  <= ki1;
          round <= round_t'(ROUNDS);
          state <= S_ROUND;
        end
        S_ROUND: begin
          dreg <= dnext;
          if (last) begin
            odat  <= dnext;
            valid <= 1'b1;
            state <= S_IDLE;
          end else begin
            kreg  <= ki1;
            round <= round - 1'b1;
          end
        end
        default: ;
      endcase
      if (ready && load) begin
        dreg  <= idat;
        kreg  <= key;
        s2_q  <= stage2_en;
        round <= 5'd1;
        state <= S_KEYGEN;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   state inside {S_KEYGEN, S_ROUND} |-> round inside {[1:ROUNDS]})
    else $error("present_dec: round counter out of range");

endmodule
