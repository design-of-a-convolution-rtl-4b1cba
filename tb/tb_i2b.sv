// tb_i2b: test of the intermediate 2-bit block on random a and b streams.
// The block is a digit-serial adder of four partial products per step:
// with a(t) entering on i_a and b(t) on i_b, step t contributes
//   2*(a(t)&b(t-2) + a(t-1)&b(t-1)) + a(t-1)&b(t-2) + a(t-2)&b(t-1)
// at radix-4 weight 4^t. The testbench accumulates that value and checks
// that the digits on o_s so far equal its low digits, step by step, and that
// o_a / o_b are the inputs delayed by two steps. Idle cycles with i_en low
// are mixed in.
module tb_i2b;
  logic clk = 0, arstn, en, a, b, oa, ob;
  logic [1:0] s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  function automatic int b2i(logic x);
    return x ? 1 : 0;
  endfunction

  i2b dut (.i_clk(clk), .i_arstn(arstn), .i_en(en), .i_a(a), .o_a(oa), .i_b(b), .o_b(ob), .o_s(s));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ah, bh;     // history: [0] = current step, [1] = one step ago ...
    logic [127:0] acc;
    arstn = 0; en = 0; a = 0; b = 0;
    @(negedge clk);
    for (int run = 0; run < 50; run++) begin
      arstn = 0; #1; arstn = 1;
      ah = '0; bh = '0; acc = '0;
      for (int t = 0; t < 40; t++) begin
        int v;
        en = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
        a = (t < 36) ? 1'($urandom) : 1'b0;
        b = (t < 36) ? 1'($urandom) : 1'b0;
        en = 1;
        ah = {ah[2:0], a};
        bh = {bh[2:0], b};
        v = 2 * (b2i(ah[0] & bh[2]) + b2i(ah[1] & bh[1])) + b2i(ah[1] & bh[2]) + b2i(ah[2] & bh[1]);
        acc = acc + (128'(v) << (2 * t));
        #1;
        checks++;
        if (s !== acc[2*t +: 2]) begin
          failures++;
          $display("FAIL run %0d step %0d digit got %0d exp %0d", run, t, s, acc[2*t +: 2]);
        end
        checks++;
        if (oa !== ah[2] || ob !== bh[2]) begin
          failures++;
          $display("FAIL run %0d step %0d chain outputs", run, t);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
