// tb_key_stage2: second key stage enabled and bypassed, forward against the reference
// model and inverse as a round trip.
module tb_key_stage2;
  import present_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [79:0] kin, fwd, back;
  logic        en;

  key_stage2 #(.INVERSE(1'b0)) u_fwd  (.kin(kin), .en(en), .kout(fwd));
  key_stage2 #(.INVERSE(1'b1)) u_back (.kin(fwd), .en(en), .kout(back));

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
    // a zero key rotates to zero and every nibble becomes S[0]=C
    kin = '0; en = 1'b1; #1;
    check(fwd == {20{4'hC}}, $sformatf("zero key -> %h", fwd));
    // bit 0 of the lowest word moves to bit 14
    kin = 80'h0_0000_0000_0000_0000_0001; #1;
    check(fwd == (({20{4'hC}} & ~(80'hF << 12)) | (80'h9 << 12)), $sformatf("bit 0 -> %h", fwd));
    for (int i = 0; i < 400; i++) begin
      kin = {16'($urandom), $urandom, $urandom};
      en  = 1'(i % 3 != 0);
      #1;
      check(fwd == (en ? ref_ks2(kin) : kin), $sformatf("fwd en=%0b %h -> %h", en, kin, fwd));
      check(back == kin, $sformatf("inverse en=%0b %h -> %h", en, kin, back));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
