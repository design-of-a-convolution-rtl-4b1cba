// tb_srr: random words are shifted into the 16-bit shift right register two
// bits at a time, least significant pair first, with idle cycles between
// shifts; after 8 shifts the register must hold the word, and it must not
// move while i_shift is low.
module tb_srr;
  logic clk = 0, arstn, sh;
  logic [1:0] d;
  logic [15:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  srr dut (.i_clk(clk), .i_arstn(arstn), .i_shift(sh), .i_digit(d), .o_q(q));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arstn = 0; sh = 0; d = 0;
    @(negedge clk);
    for (int run = 0; run < 100; run++) begin
      logic [15:0] w;
      w = 16'($urandom);
      arstn = 0; #1; arstn = 1;
      checks++;
      if (q !== 16'h0) begin failures++; $display("FAIL reset"); end
      for (int i = 0; i < 8; i++) begin
        logic [15:0] q_prev;
        sh = 0; d = 2'($urandom);
        q_prev = q;
        @(negedge clk);
        checks++;
        if (q !== q_prev) begin failures++; $display("FAIL moved without shift"); end
        sh = 1; d = w[2*i +: 2];
        @(negedge clk);
      end
      sh = 0;
      checks++;
      if (q !== w) begin failures++; $display("FAIL run %0d got %h exp %h", run, q, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
