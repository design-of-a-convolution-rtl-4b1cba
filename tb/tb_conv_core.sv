// tb_conv_core: the datapath alone, driven directly with i_step. Random
// 5x5 windows and kernels of 8-bit values (plus all-maximum and all-zero
// cases) are sent as 12 bit slices, LSB first, zeros after bit 7, with idle
// cycles between slices. Each digit must appear, with o_digit_valid, after
// exactly n/2 + d steps and equal digit d of sum(X*K) mod 2^16; o_done must
// rise with the last digit (after 3n/2 = 12 steps). A second instance built
// for 11 result digits checks the full 21-bit sum.
module tb_conv_core;
  localparam int N = 8, M = 25;
  logic clk = 0, arstn, step;
  logic [M-1:0] bx, bk;
  logic [1:0] d8, d11;
  logic v8, v11, done8, done11;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  conv_core dut (.i_clk(clk), .i_arstn(arstn), .i_step(step), .i_bit_x(bx), .i_bit_k(bk),
                 .o_digit(d8), .o_digit_valid(v8), .o_done(done8));
  conv_core #(.OUT_DIGITS(11)) dut_full (.i_clk(clk), .i_arstn(arstn), .i_step(step),
                 .i_bit_x(bx), .i_bit_k(bk), .o_digit(d11), .o_digit_valid(v11), .o_done(done11));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x [M];
    logic [7:0] k [M];
    logic [31:0] y;
    arstn = 0; step = 0; bx = 0; bk = 0;
    @(negedge clk);
    for (int run = 0; run < 300; run++) begin
      y = 0;
      for (int j = 0; j < M; j++) begin
        x[j] = (run == 0) ? 8'hFF : (run == 1) ? 8'h00 : 8'($urandom);
        k[j] = (run == 0) ? 8'hFF : (run == 1) ? 8'hA5 : 8'($urandom);
        y += 32'(x[j]) * 32'(k[j]);
      end
      arstn = 0; #1; arstn = 1;
      for (int s = 0; s < 3 * N / 2 + 3; s++) begin
        step = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        for (int j = 0; j < M; j++) begin
          bx[j] = (s < N) ? x[j][s] : 1'b0;
          bk[j] = (s < N) ? k[j][s] : 1'b0;
        end
        step = 1;
        @(negedge clk);
        step = 0;
        // after step s: digit s - n/2
        checks++;
        if (v8 !== (s >= N / 2 && s < N / 2 + 8)) begin
          failures++;
          $display("FAIL run %0d step %0d digit_valid=%0d", run, s, v8);
        end
        checks++;
        if (done8 !== (s >= N / 2 + 7)) begin
          failures++;
          $display("FAIL run %0d step %0d done=%0d", run, s, done8);
        end
        if (s >= N / 2 && s < N / 2 + 11) begin
          checks++;
          if (d11 !== y[2*(s-N/2) +: 2] || (s < N / 2 + 8 && d8 !== y[2*(s-N/2) +: 2])) begin
            failures++;
            $display("FAIL run %0d step %0d digit %0d got %0d/%0d exp %0d", run, s, s-N/2, d8, d11,
                     y[2*(s-N/2) +: 2]);
          end
        end
        checks++;
        if (v11 !== (s >= N / 2 && s < N / 2 + 11)) begin
          failures++;
          $display("FAIL run %0d step %0d full digit_valid", run, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
