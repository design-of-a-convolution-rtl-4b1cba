// tb_fa2: exhaustive test of the 2-bit full adder: all 32 combinations of
// the two 2-bit inputs and the carry-in, compared with integer addition.
module tb_fa2;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  fa2 dut (.i_input1(a), .i_input2(b), .i_cin(cin), .o_sum(s), .o_cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int total;
      {cin, b, a} = 5'(i);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, s} != 3'(total)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d got %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
