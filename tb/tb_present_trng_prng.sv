// tb_present_trng_prng: end-to-end test of the whole design at its default sizes.
//   1. External all-zero key, second key stage off, plaintext 0: the published
//      PRESENT-80 ciphertext 5579C1387B228445, then its decryption.
//   2. Streams of blocks with load held high, keys mostly from the random key
//      generator and sometimes from key_in, first with the second key stage on,
//      then off. Every generated key is checked against the reference mixing
//      network, every ciphertext against the reference cipher with the key reported
//      on key_used, and every block is decrypted again through the decryption ports.
// Mechanisms counted, each must occur: random key, external key, second key stage on
// and off, load ignored while busy, back-to-back blocks, all four selections of the
// key generator's output multiplexer, a fresh key for consecutive random-key blocks,
// successful decryption.
module tb_present_trng_prng;
  import present_ref_pkg::*;

  localparam longint unsigned LAT = 32;

  typedef struct {
    logic [63:0] pt;
    logic [63:0] ct;
    logic [79:0] key;
    bit          s2;
  } item_t;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        stage2_en = 1'b0, load = 1'b0, key_sel = 1'b0;
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

  longint unsigned cyc = 0, last_valid = 0;
  item_t           encq [$];   // accepted by the encryption core
  longint unsigned enct [$];
  item_t           decq [$];   // waiting for the decryption core
  item_t           decp [$];   // accepted by the decryption core
  logic [1:0]      cnt_m = '0;
  logic [79:0]     kexp = '0, prev_rand_key = '0;
  bit              kexp_ok = 1'b0, chk_key_used = 1'b0;
  logic [79:0]     key_used_exp;
  int n_rand = 0, n_ext = 0, n_s2_on = 0, n_s2_off = 0, n_ignored = 0, n_b2b = 0;
  int n_key_change = 0, n_enc = 0, n_dec = 0;
  int m3_sel [4] = '{0, 0, 0, 0};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: values read at a rising edge are those before the edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // key generator: the key on offer now was computed from last clock's words
      if (kexp_ok) check(dut.kdat1 == kexp, $sformatf("generated key %h, expected %h", dut.kdat1, kexp));
      kexp    = ref_prng(dut.rn0, dut.rn_b, cnt_m);
      kexp_ok = 1'b1;

      if (chk_key_used) check(key_used == key_used_exp, "key_used reports the block's key");
      chk_key_used = 1'b0;

      if (valid) begin
        item_t it;
        longint unsigned t;
        n_enc++;
        if (encq.size() == 0) check(1'b0, "valid without a pending block");
        else begin
          it = encq.pop_front();
          t  = enct.pop_front();
          check(odat == it.ct, $sformatf("ciphertext %h, expected %h", odat, it.ct));
          check(cyc - t == LAT + 1, $sformatf("encryption latency %0d", cyc - t - 1));
          decq.push_back(it);
        end
        if (last_valid != 0 && cyc - last_valid == LAT) n_b2b++;
        last_valid = cyc;
      end

      if (load && ready) begin
        item_t it;
        it.pt  = idat;
        it.key = key_sel ? key_in : dut.kdat1;
        it.s2  = stage2_en;
        it.ct  = ref_encrypt(it.pt, it.key, it.s2);
        encq.push_back(it);
        enct.push_back(cyc);
        key_used_exp = it.key;
        chk_key_used = 1'b1;
        if (key_sel) n_ext++;
        else begin
          n_rand++;
          m3_sel[cnt_m]++;
          if (n_rand > 1 && it.key != prev_rand_key) n_key_change++;
          prev_rand_key = it.key;
        end
        if (stage2_en) n_s2_on++; else n_s2_off++;
      end
      if (load && !ready) n_ignored++;

      if (dec_valid) begin
        item_t it;
        if (decp.size() == 0) check(1'b0, "dec_valid without a pending block");
        else begin
          it = decp.pop_front();
          check(dec_odat == it.pt, $sformatf("decrypted %h, expected %h", dec_odat, it.pt));
          n_dec++;
        end
      end
      if (dec_load && dec_ready) decp.push_back(decq.pop_front());

      cnt_m = cnt_m + 1'b1;
    end
  end

  // decryption driver: sends every produced ciphertext back through the decryption core
  initial begin
    forever begin
      @(negedge clk);
      if (decq.size() > 0 && dec_ready) begin
        dec_load = 1'b1;
        dec_idat = decq[0].ct;
        dec_key  = decq[0].key;
      end else begin
        dec_load = 1'b0;
      end
    end
  end

  task automatic stream(input int n, input bit s2);
    stage2_en = s2;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (!ready) begin
        load = (i > 0);
        @(negedge clk);
      end
      // a one-clock idle gap before every third block moves the loads to the next
      // phase of the key generator's 2-bit counter, so every output selection is used
      if (i % 3 == 2) begin
        load = 1'b0;
        @(negedge clk);
      end
      load    = 1'b1;
      idat    = {$urandom, $urandom};
      key_sel = (i % 5 == 4);
      key_in  = {16'($urandom), $urandom, $urandom};
    end
    @(negedge clk);
    load = 1'b0;
    // drain both cores before the key stage setting may change
    while (encq.size() > 0 || decq.size() > 0 || decp.size() > 0) @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. published test vector through the top
    @(negedge clk);
    load = 1'b1; idat = '0; key_sel = 1'b1; key_in = '0; stage2_en = 1'b0;
    @(negedge clk);
    load = 1'b0;
    while (!valid) @(negedge clk);
    check(odat == 64'h5579_C138_7B22_8445, $sformatf("test vector ciphertext %h", odat));
    while (encq.size() > 0 || decq.size() > 0 || decp.size() > 0) @(negedge clk);

    // 2. streams with the second key stage on, then off
    stream(40, 1'b1);
    stream(20, 1'b0);

    $display("enc=%0d dec=%0d random_key=%0d external_key=%0d stage2_on=%0d stage2_off=%0d",
             n_enc, n_dec, n_rand, n_ext, n_s2_on, n_s2_off);
    $display("ignored_loads=%0d back_to_back=%0d key_changes=%0d m3_sel=%0d/%0d/%0d/%0d",
             n_ignored, n_b2b, n_key_change, m3_sel[0], m3_sel[1], m3_sel[2], m3_sel[3]);
    check(n_enc == 61 && n_dec == 61, "every block encrypted and decrypted");
    check(n_rand > 0, "random key used");
    check(n_ext > 0, "external key used");
    check(n_s2_on > 0, "second key stage on");
    check(n_s2_off > 0, "second key stage off");
    check(n_ignored > 0, "load ignored while busy");
    check(n_b2b > 0, "back-to-back blocks");
    check(n_key_change == n_rand - 1, "fresh key for every random-key block");
    for (int i = 0; i < 4; i++) check(m3_sel[i] > 0, $sformatf("output multiplexer selection %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
