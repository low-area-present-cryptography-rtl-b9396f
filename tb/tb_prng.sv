// tb_prng: key-mixing network. Random words are applied every clock; the key
// registered one clock later must match the reference model, with the 2-bit
// selection counter modelled from reset. Directed words check the XOR/XNOR/adder
// paths, and every counter value (each M3 source) must be seen.
module tb_prng;
  import present_ref_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic [79:0] rn0 = '0, rn_b = '0, kdat1;
  logic [1:0]  cnt_model = '0;
  int          seen [4] = '{0, 0, 0, 0};

  prng dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check(input logic [79:0] a, input logic [79:0] b);
    logic [79:0] e;
    rn0 = a; rn_b = b;
    e = ref_prng(a, b, cnt_model);
    seen[cnt_model]++;
    @(posedge clk);
    #1;
    check(kdat1 == e, $sformatf("cnt %0d: key %h expected %h", cnt_model, kdat1, e));
    cnt_model = cnt_model + 1'b1;
  endtask

  initial begin
    #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
    @(negedge clk);
    #1;
    check(kdat1 == '0, "key cleared by reset");
    rst_n = 1'b1;
    @(negedge clk);
    // one rising edge has passed since reset was released: the counter is at 1
    cnt_model = 2'd1;
    // all zero: sel = 1 -> M1 = T2 = 0, X1 = 0, A = 0, X3 = X4 = all ones
    step_and_check('0, '0);
    for (int i = 0; i < 400; i++)
      step_and_check({16'($urandom), $urandom, $urandom}, {16'($urandom), $urandom, $urandom});
    // adder carry out of a 20-bit word is dropped
    step_and_check({4{20'hFFFFF}}, {4{20'h00001}});
    for (int i = 0; i < 4; i++) check(seen[i] > 0, $sformatf("counter value %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
