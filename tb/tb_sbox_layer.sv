// tb_sbox_layer: random and directed vectors through the forward and inverse 64-bit
// substitution layers, against the reference model, plus the round trip.
module tb_sbox_layer;
  import present_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [63:0] din, fwd, inv, back;

  sbox_layer #(.INVERSE(1'b0)) u_fwd  (.din(din), .dout(fwd));
  sbox_layer #(.INVERSE(1'b1)) u_inv  (.din(din), .dout(inv));
  sbox_layer #(.INVERSE(1'b1)) u_back (.din(fwd), .dout(back));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 64'h0123_4567_89AB_CDEF; #1;
    check(fwd == 64'hC56B_90AD_3EF8_4712, $sformatf("identity pattern -> %h", fwd));
    for (int i = 0; i < 500; i++) begin
      din = {$urandom, $urandom};
      #1;
      check(fwd == ref_slayer(din, 0), $sformatf("fwd %h -> %h", din, fwd));
      check(inv == ref_slayer(din, 1), $sformatf("inv %h -> %h", din, inv));
      check(back == din, $sformatf("round trip %h -> %h", din, back));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
