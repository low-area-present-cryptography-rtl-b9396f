// tb_trng: statistical sanity check of the random source model over 4000 clocks:
// a new word every clock, every bit position toggles, and the fraction of ones over
// all bits lies within 0.48..0.52 (far outside what an unbiased source produces).
module tb_trng;

  localparam int W = 80;
  localparam int N = 4000;

  int checks = 0, failures = 0;
  logic         clk = 1'b0;
  logic [W-1:0] rn, prev, toggled;
  longint       ones = 0;
  int           repeats = 0;

  trng #(.WIDTH(W)) dut (.clk(clk), .rn(rn));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real frac;
    toggled = '0;
    @(negedge clk);
    prev = rn;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (rn == prev) repeats++;
      toggled |= rn ^ prev;
      ones += $countones(rn);
      prev = rn;
    end
    frac = real'(ones) / real'(N * W);
    $display("fraction of ones %f, repeated words %0d", frac, repeats);
    check(repeats == 0, "a new word every clock");
    check(&toggled, $sformatf("every bit toggles: %h", toggled));
    check(frac > 0.48 && frac < 0.52, "balanced ones and zeros");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
