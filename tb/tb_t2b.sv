// tb_t2b: test of the terminating 2-bit block on random a and b streams.
// Step t contributes 2*(a(t)&b(t-1) + a(t-1)&b(t)) + a(t-1)&b(t-1) at
// radix-4 weight 4^t; the digits on o_s so far must equal the low digits of
// the accumulated value, and o_b must be b delayed by one step.
module tb_t2b;
  logic clk = 0, arstn, en, a, b, ob;
  logic [1:0] s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  function automatic int b2i(logic x);
    return x ? 1 : 0;
  endfunction

  t2b dut (.i_clk(clk), .i_arstn(arstn), .i_en(en), .i_a(a), .i_b(b), .o_b(ob), .o_s(s));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ah, bh;
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
        ah = {ah[1:0], a};
        bh = {bh[1:0], b};
        v = 2 * (b2i(ah[0] & bh[1]) + b2i(ah[1] & bh[0])) + b2i(ah[1] & bh[1]);
        acc = acc + (128'(v) << (2 * t));
        #1;
        checks++;
        if (s !== acc[2*t +: 2]) begin
          failures++;
          $display("FAIL run %0d step %0d digit got %0d exp %0d", run, t, s, acc[2*t +: 2]);
        end
        checks++;
        if (ob !== bh[1]) begin
          failures++;
          $display("FAIL run %0d step %0d o_b", run, t);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
