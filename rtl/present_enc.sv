// present_enc: round-iterative PRESENT-80 encryption of one 64-bit block
// ("64-bit path encryption").
//
// On an accepted load the plaintext goes into dreg and the 80-bit key into kreg.
// Each of the 31 rounds then, in one clock:
//   dat1 = dreg ^ kreg[79:16]         add round key (upper 64 key bits)
//   dat2 = 8 dual-port S-box ROMs(dat1)
//   dat3 = P-layer(dat2)              -> dreg
//   kreg <= key_stage2(key_stage1(kreg, round), stage2)
// where key_stage1 is the PRESENT-80 key update (rotate by 61, S-box on the top
// nibble, round counter into bits 19:15) and key_stage2 is the optional second
// key-security stage. A 32nd step XORs the last round key into the state and
// registers the ciphertext. With the second stage off the core is standard
// PRESENT-80 (key 0, plaintext 0 gives 5579C1387B228445).
//
// Interface: load/idat/key/stage2_en are sampled when ready is high; stage2_en is held
// for the whole block. odat is valid, and stays valid, from the cycle valid pulses.
// Timing: valid rises 32 clocks after the load edge; ready is high in every cycle
// except the 31 round cycles, so a new block can be loaded in the same cycle the
// previous result is written: one block per 32 clocks.
// Reset is asynchronous, active low; the handshake and reset style are this design's
// own choices.
module present_enc
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
  output logic   valid,
  output round_t round
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} state_e;

  state_e state;
  block_t dreg, dat1, dat2, dat3;
  key_t   kreg, kdat4, kdat5;
  logic   s2_q;

  assign ready = (state != S_ROUND);

  assign dat1 = dreg ^ kreg[79:16];

  sbox_layer #(.INVERSE(1'b0)) u_sbox (.din(dat1), .dout(dat2));
  p_layer    #(.INVERSE(1'b0)) u_perm (.din(dat2), .dout(dat3));

  key_stage1 #(.INVERSE(1'b0)) u_key1 (.kin(kreg),  .rc(round),  .kout(kdat4));
  key_stage2 #(.INVERSE(1'b0)) u_key2 (.kin(kdat4), .en(s2_q),   .kout(kdat5));

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
      if (state == S_ROUND) begin
        dreg <= dat3;
        kreg <= kdat5;
        if (round == round_t'(ROUNDS)) state <= S_FINAL;
        else                           round <= round + 1'b1;
      end else begin
        if (state == S_FINAL) begin
          odat  <= dat1;
          valid <= 1'b1;
          state <= S_IDLE;
        end
        if (load) begin
          dreg  <= idat;
          kreg  <= key;
          s2_q  <= stage2_en;
          round <= 5'd1;
          state <= S_ROUND;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_ROUND |-> round inside {[1:ROUNDS]})
    else $error("present_enc: round counter out of range");

endmodule
