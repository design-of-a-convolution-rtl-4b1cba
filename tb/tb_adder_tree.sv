// tb_adder_tree: the 25-input tree (default) and a 7-input tree are fed
// random radix-4 digit streams (random values of up to 16 digits, then zero
// digits); each output digit is compared in the step it appears with the
// corresponding digit of the sum of all input values.
module tb_adder_tree;
  localparam int M1 = 25, M2 = 7, T = 24;
  logic clk = 0, arstn, en;
  logic [1:0] p1 [M1];
  logic [1:0] p2 [M2];
  logic [1:0] s1, s2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  adder_tree dut1 (.i_clk(clk), .i_arstn(arstn), .i_en(en), .i_product(p1), .o_sum(s1));
  adder_tree #(.M(M2)) dut2 (.i_clk(clk), .i_arstn(arstn), .i_en(en), .i_product(p2), .o_sum(s2));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v1 [M1];
    logic [31:0] v2 [M2];
    logic [47:0] sum1, sum2;
    arstn = 0; en = 0;
    foreach (p1[i]) p1[i] = 0;
    foreach (p2[i]) p2[i] = 0;
    @(negedge clk);
    for (int run = 0; run < 200; run++) begin
      arstn = 0; #1; arstn = 1;
      sum1 = 0; sum2 = 0;
      for (int i = 0; i < M1; i++) begin
        v1[i] = (run == 0) ? 32'hFFFF_FFFF : $urandom;
        sum1 += 48'(v1[i]);
      end
      for (int i = 0; i < M2; i++) begin
        v2[i] = (run == 0) ? 32'hFFFF_FFFF : $urandom;
        sum2 += 48'(v2[i]);
      end
      for (int t = 0; t < T; t++) begin
        en = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
        for (int i = 0; i < M1; i++) p1[i] = (t < 16) ? v1[i][2*t +: 2] : 2'b00;
        for (int i = 0; i < M2; i++) p2[i] = (t < 16) ? v2[i][2*t +: 2] : 2'b00;
        en = 1;
        #1;
        checks += 2;
        if (s1 !== sum1[2*t +: 2]) begin
          failures++;
          $display("FAIL M=25 run %0d step %0d got %0d exp %0d", run, t, s1, sum1[2*t +: 2]);
        end
        if (s2 !== sum2[2*t +: 2]) begin
          failures++;
          $display("FAIL M=7 run %0d step %0d got %0d exp %0d", run, t, s2, sum2[2*t +: 2]);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
