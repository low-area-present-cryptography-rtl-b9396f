// tb_image_workload: encrypts and decrypts a whole 128 x 128 8-bit grayscale image
// (16384 pixels, 2048 blocks of eight pixels, first pixel in bits 63:56) through the
// top level at its default configuration, with the second key stage on and a fresh
// random key for every block.
// The image is generated here: a diagonal gradient with a flat square in the middle,
// so that many plaintext blocks repeat. Checks:
//   - every decrypted block equals the original (mean-square error 0);
//   - encryption streams at one block per 32 clocks;
//   - repeated plaintext blocks give different ciphertexts (per-block keys);
//   - the ciphertext bits are balanced (fraction of ones 0.49..0.51).
module tb_image_workload;

  localparam int SIDE   = 128;
  localparam int PIXELS = SIDE * SIDE;
  localparam int BLOCKS = PIXELS / 8;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        stage2_en = 1'b1, load = 1'b0, key_sel = 1'b0;
  logic [63:0] idat = '0, odat;
  logic [79:0] key_in = '0, key_used;
  logic        ready, valid;
  logic [4:0]  round;
  logic        dec_load = 1'b0;
  logic [63:0] dec_idat = '0, dec_odat;
  logic [79:0] dec_key = '0;
  logic        dec_ready, dec_valid;

  present_trng_prng dut (.*);

  always #5 clk = ~clk;

  logic [7:0]  img [PIXELS];
  logic [63:0] pt  [BLOCKS];
  logic [63:0] ct  [BLOCKS];
  logic [79:0] kk  [BLOCKS];
  logic [63:0] rec [BLOCKS];
  int n_acc = 0, n_key = 0, n_ct = 0, n_rec = 0;
  bit key_next = 1'b0;
  longint unsigned cyc = 0, t_first = 0, t_last = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (BLOCKS * 110) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect keys, ciphertexts and decrypted blocks in order
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (key_next) begin kk[n_key] = key_used; n_key++; end
    key_next = load && ready;
    if (load && ready) begin
      if (n_acc == 0) t_first = cyc;
      n_acc++;
    end
    if (valid)     begin ct[n_ct] = odat; n_ct++; t_last = cyc; end
    if (dec_valid) begin rec[n_rec] = dec_odat; n_rec++; end
  end

  initial begin
    automatic longint ones = 0, sq = 0;
    automatic int     repeats = 0, distinct = 0;
    real    frac;

    for (int y = 0; y < SIDE; y++)
      for (int x = 0; x < SIDE; x++)
        img[y*SIDE + x] = (x >= 32 && x < 96 && y >= 32 && y < 96) ? 8'd200 : 8'((x + 2*y) / 3);
    for (int b = 0; b < BLOCKS; b++)
      for (int p = 0; p < 8; p++) pt[b][63 - 8*p -: 8] = img[8*b + p];

    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // encryption: load held high, next block offered whenever ready
    for (int b = 0; b < BLOCKS; b++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      load = 1'b1;
      idat = pt[b];
    end
    @(negedge clk);
    load = 1'b0;
    while (n_ct < BLOCKS) @(negedge clk);
    check(t_last - t_first == longint'(BLOCKS) * 32 + 1,
          $sformatf("encryption of %0d blocks took %0d clocks", BLOCKS, t_last - t_first - 1));

    // decryption with the reported keys
    for (int b = 0; b < BLOCKS; b++) begin
      @(negedge clk);
      while (!dec_ready) @(negedge clk);
      dec_load = 1'b1;
      dec_idat = ct[b];
      dec_key  = kk[b];
    end
    @(negedge clk);
    dec_load = 1'b0;
    while (n_rec < BLOCKS) @(negedge clk);

    for (int b = 0; b < BLOCKS; b++) begin
      check(rec[b] == pt[b], $sformatf("block %0d decrypted %h, expected %h", b, rec[b], pt[b]));
      for (int p = 0; p < 8; p++) begin
        int d;
        d  = int'(rec[b][63 - 8*p -: 8]) - int'(pt[b][63 - 8*p -: 8]);
        sq += d * d;
      end
      ones += $countones(ct[b]);
      if (b > 0 && pt[b] == pt[b-1]) begin
        repeats++;
        if (ct[b] != ct[b-1]) distinct++;
      end
    end
    frac = real'(ones) / real'(BLOCKS * 64);
    $display("blocks=%0d mse=%0f ones_fraction=%f repeated_plaintexts=%0d with_distinct_ciphertexts=%0d",
             BLOCKS, real'(sq) / real'(PIXELS), frac, repeats, distinct);
    check(sq == 0, "decrypted image equals the original");
    check(repeats > 0 && distinct == repeats, "repeated blocks encrypt differently");
    check(frac > 0.49 && frac < 0.51, "ciphertext bits balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
