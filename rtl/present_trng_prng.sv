// present_trng_prng: PRESENT-80 block cipher with a random per-block key.
//
// Two true-random sources feed the mixing network (prng), which offers a new 80-bit
// key every clock. When a plaintext block is loaded, the key on offer that clock (or
// the external key_in, if key_sel is high) is taken by the encryption core and
// reported on key_used, so that the block can later be decrypted with it. The
// encryption core runs 31 PRESENT rounds plus final whitening; its round-key update
// is the PRESENT-80 schedule, optionally followed by the second key-security stage
// (stage2_en). The decryption core, with its own port set, reverses the cipher for a
// given key and the same stage2_en setting.
//
// Interface (all synchronous to clk, asynchronous active-low rst_n):
//   load, idat, key_sel, key_in -> ready, odat, valid, key_used, round  (encrypt)
//   dec_load, dec_idat, dec_key -> dec_ready, dec_odat, dec_valid       (decrypt)
//   stage2_en selects the second key stage for both cores, sampled at each load.
// Timing: ciphertext valid 32 clocks after an accepted load (one block per 32
// clocks); plaintext valid 63 clocks after an accepted dec_load.
// key_sel, key_used and the separate decryption port set are this design's choices.
module present_trng_prng
  import present_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   stage2_en,
  // encryption
  input  logic   load,
  input  block_t idat,
  input  logic   key_sel,
  input  key_t   key_in,
  output logic   ready,
  output block_t odat,
  output logic   valid,
  output key_t   key_used,
  output round_t round,
  // decryption
  input  logic   dec_load,
  input  block_t dec_idat,
  input  key_t   dec_key,
  output logic   dec_ready,
  output block_t dec_odat,
  output logic   dec_valid
);

  key_t       rn0, rn_b, kdat1, enc_key;

  trng #(.WIDTH(KEY_W)) u_trng0 (.clk(clk), .rn(rn0));
  trng #(.WIDTH(KEY_W)) u_trng1 (.clk(clk), .rn(rn_b));

  prng u_prng (
    .clk  (clk),
    .rst_n(rst_n),
    .rn0  (rn0),
    .rn_b (rn_b),
    .kdat1(kdat1)
  );

  assign enc_key = key_sel ? key_in : kdat1;

  present_enc u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .idat     (idat),
    .key      (enc_key),
    .stage2_en(stage2_en),
    .ready    (ready),
    .odat     (odat),
    .valid    (valid),
    .round    (round)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              key_used <= '0;
    else if (load && ready)  key_used <= enc_key;
  end

  present_dec u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (dec_load),
    .idat     (dec_idat),
    .key      (dec_key),
    .stage2_en(stage2_en),
    .ready    (dec_ready),
    .odat     (dec_odat),
    .valid    (dec_valid)
  );

endmodule
