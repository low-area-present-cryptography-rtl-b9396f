// tb_present_enc: PRESENT-80 encryption core.
//   - the four published PRESENT-80 test vectors with the second key stage off;
//   - random blocks and keys with the second key stage on and off, against the
//     reference model;
//   - a stream with load held high, which must give one block every 32 clocks and
//     ignore load while the core is busy.
// A scoreboard records every accepted load and checks each result and its latency
// (valid 32 clocks after the load edge).
module tb_present_enc;
  import present_ref_pkg::*;

  localparam longint unsigned LAT = 32;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        load = 1'b0, stage2_en = 1'b0;
  logic [63:0] idat = '0, odat;
  logic [79:0] key = '0;
  logic        ready, valid;
  logic [4:0]  round;

  longint unsigned cyc = 0;
  logic [63:0]     expq [$];
  longint unsigned tq [$];
  longint unsigned last_valid = 0;
  int n_valid = 0, n_ignored = 0, n_back_to_back = 0, n_s2 = 0;

  present_enc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: values seen at a rising edge are those before the edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (valid) begin
        n_valid++;
        if (expq.size() == 0) check(1'b0, "valid without a pending block");
        else begin
          logic [63:0] e;
          longint unsigned t;
          e = expq.pop_front();
          t = tq.pop_front();
          check(odat == e, $sformatf("ciphertext %h, expected %h", odat, e));
          check(cyc - t == LAT + 1, $sformatf("latency %0d", cyc - t - 1));
        end
        if (last_valid != 0 && cyc - last_valid == LAT) n_back_to_back++;
        last_valid = cyc;
      end
      if (load && ready) begin
        expq.push_back(ref_encrypt(idat, key, stage2_en));
        tq.push_back(cyc);
        if (stage2_en) n_s2++;
      end
      if (load && !ready) n_ignored++;
    end
  end

  task automatic send(input logic [63:0] pt, input logic [79:0] k, input bit s2);
    @(negedge clk);
    while (!ready) @(negedge clk);
    load = 1'b1; idat = pt; key = k; stage2_en = s2;
    @(negedge clk);
    load = 1'b0;
  endtask

  task automatic wait_result(output logic [63:0] ct);
    while (!valid) @(negedge clk);
    ct = odat;
  endtask

  initial begin
    logic [63:0] ct;
    logic [63:0] pts  [4] = '{64'h0, 64'h0, 64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF};
    logic [79:0] keys [4] = '{80'h0, {80{1'b1}}, 80'h0, {80{1'b1}}};
    logic [63:0] cts  [4] = '{64'h5579_C138_7B22_8445, 64'hE72C_46C0_F594_5049,
                              64'hA112_FFC7_2F68_417B, 64'h3333_DCD3_2132_10D2};
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 4; i++) begin
      check(ref_encrypt(pts[i], keys[i], 0) == cts[i], "reference model test vector");
      send(pts[i], keys[i], 1'b0);
      wait_result(ct);
      check(ct == cts[i], $sformatf("test vector %0d: %h", i, ct));
    end

    for (int i = 0; i < 40; i++) begin
      send({$urandom, $urandom}, {16'($urandom), $urandom, $urandom}, 1'(i % 2));
      wait_result(ct);
    end

    // stream: load held high, new data offered whenever ready is seen
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      while (!ready) begin
        if (i > 0) load = 1'b1;  // keep requesting while busy
        @(negedge clk);
      end
      load = 1'b1; idat = {$urandom, $urandom}; key = {16'($urandom), $urandom, $urandom};
      stage2_en = 1'($urandom);
    end
    @(negedge clk);
    load = 1'b0;
    repeat (LAT + 4) @(negedge clk);

    check(expq.size() == 0, "all accepted blocks produced a result");
    check(n_valid == 4 + 40 + 20, $sformatf("result count %0d", n_valid));
    check(n_back_to_back >= 19, $sformatf("back-to-back results %0d", n_back_to_back));
    check(n_ignored > 0, "load while busy happened");
    check(n_s2 > 0, "second key stage used");
    $display("results=%0d back_to_back=%0d ignored_loads=%0d stage2_blocks=%0d",
             n_valid, n_back_to_back, n_ignored, n_s2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
