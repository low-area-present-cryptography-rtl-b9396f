// tb_drom: exhaustive check of the dual-port S-box ROM, forward and inverse tables,
// both ports at once (every address pair).
module tb_drom;
  import present_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] a, b, fa, fb, ia, ib;

  drom #(.INVERSE(1'b0)) u_fwd (.addr_a(a), .addr_b(b), .data_a(fa), .data_b(fb));
  drom #(.INVERSE(1'b1)) u_inv (.addr_a(a), .addr_b(b), .data_a(ia), .data_b(ib));

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
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        check(fa == ref_s(a),  $sformatf("S[%h] port a = %h", a, fa));
        check(fb == ref_s(b),  $sformatf("S[%h] port b = %h", b, fb));
        check(ia == ref_si(a), $sformatf("Sinv[%h] port a = %h", a, ia));
        check(ib == ref_si(b), $sformatf("Sinv[%h] port b = %h", b, ib));
      end
    end
    // spot values straight from the S-box table
    a = 4'h0; b = 4'hF; #1;
    check(fa == 4'hC && fb == 4'h2, "S[0]=C, S[F]=2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
