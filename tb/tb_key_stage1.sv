// tb_key_stage1: first key stage, forward against the reference model and inverse
// as a round trip, for every round counter value and random keys.
module tb_key_stage1;
  import present_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [79:0] kin, fwd, back;
  logic [4:0]  rc;

  key_stage1 #(.INVERSE(1'b0)) u_fwd  (.kin(kin), .rc(rc), .kout(fwd));
  key_stage1 #(.INVERSE(1'b1)) u_back (.kin(fwd), .rc(rc), .kout(back));

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
    // all-zero key, round 1: top nibble S[0]=C, counter bit 15 set
    kin = '0; rc = 5'd1; #1;
    check(fwd == 80'hC000_0000_0000_0000_8000, $sformatf("zero key round 1 -> %h", fwd));
    for (int i = 0; i < 400; i++) begin
      kin = {16'($urandom), $urandom, $urandom};
      rc  = 5'(i);
      #1;
      check(fwd == ref_ks1(kin, rc), $sformatf("fwd %h rc %0d -> %h", kin, rc, fwd));
      check(back == kin, $sformatf("inverse %h rc %0d -> %h", kin, rc, back));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
