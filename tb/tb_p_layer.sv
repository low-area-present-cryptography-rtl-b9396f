// tb_p_layer: walks a single one through all 64 bit positions and runs random
// vectors through the forward and inverse permutation against the table.
module tb_p_layer;
  import present_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [63:0] din, fwd, inv, back;

  p_layer #(.INVERSE(1'b0)) u_fwd  (.din(din), .dout(fwd));
  p_layer #(.INVERSE(1'b1)) u_inv  (.din(din), .dout(inv));
  p_layer #(.INVERSE(1'b1)) u_back (.din(fwd), .dout(back));

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
    for (int i = 0; i < 64; i++) begin
      din = 64'd1 << i;
      #1;
      check(fwd == (64'd1 << P_TAB[i]), $sformatf("bit %0d -> %h", i, fwd));
    end
    for (int i = 0; i < 300; i++) begin
      din = {$urandom, $urandom};
      #1;
      check(fwd == ref_player(din, 0), $sformatf("fwd %h -> %h", din, fwd));
      check(inv == ref_player(din, 1), $sformatf("inv %h -> %h", din, inv));
      check(back == din, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
