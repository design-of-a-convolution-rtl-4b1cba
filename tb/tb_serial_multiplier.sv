// tb_serial_multiplier: self-checking test of the bit-serial multiplier.
// Three instances are run: n = 8 with the input delays (the build used in
// the accelerator), n = 8 without them, and n = 12 with them. Operands are
// fed LSB first, one bit per step, followed by zeros; every 2-bit output
// digit is compared at the exact step it is due with the product computed
// by the testbench, which also checks the latency: the last digit appears
// after 3n/2 steps with the input delays and during step 3n/2 - 1 without.
// Steps are interleaved with idle cycles (i_valid low) to check that nothing
// moves without i_valid.
module tb_serial_multiplier;

  logic clk = 1'b0;
  logic arstn;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n = 8 pair
  logic       v8, a8, b8;
  logic [1:0] p8_d, p8_nd;
  serial_multiplier #(.N(8), .IN_DELAY(1'b1)) dut_d  (.i_clk(clk), .i_arstn(arstn), .i_valid(v8),
      .i_a(a8), .i_b(b8), .o_product(p8_d));
  serial_multiplier #(.N(8), .IN_DELAY(1'b0)) dut_nd (.i_clk(clk), .i_arstn(arstn), .i_valid(v8),
      .i_a(a8), .i_b(b8), .o_product(p8_nd));

  // n = 12
  logic       v12, a12, b12;
  logic [1:0] p12;
  serial_multiplier #(.N(12), .IN_DELAY(1'b1)) dut_12 (.i_clk(clk), .i_arstn(arstn), .i_valid(v12),
      .i_a(a12), .i_b(b12), .o_product(p12));

  task automatic do_reset();
    arstn = 1'b0;
    @(negedge clk);
    arstn = 1'b1;
  endtask

  task automatic run8(input logic [7:0] x, input logic [7:0] y, input bit gaps);
    logic [15:0] prod;
    prod = 16'(x) * 16'(y);
    do_reset();
    for (int s = 0; s < 12; s++) begin
      // optional idle cycles between steps
      if (gaps) begin
        v8 = 1'b0; a8 = ($urandom % 2) == 1; b8 = ($urandom % 2) == 1;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      v8 = 1'b1;
      a8 = (s < 8) ? x[s] : 1'b0;
      b8 = (s < 8) ? y[s] : 1'b0;
      #1;
      if (s >= 4) begin
        checks++;
        if (p8_nd !== prod[2*(s-4) +: 2]) begin
          failures++;
          $display("FAIL n=8 no-delay %0d*%0d step %0d digit %0d got %0d exp %0d",
                   x, y, s, s-4, p8_nd, prod[2*(s-4) +: 2]);
        end
      end
      @(negedge clk);
      if (s >= 4) begin
        checks++;
        if (p8_d !== prod[2*(s-4) +: 2]) begin
          failures++;
          $display("FAIL n=8 delayed %0d*%0d step %0d digit %0d got %0d exp %0d",
                   x, y, s, s-4, p8_d, prod[2*(s-4) +: 2]);
        end
      end
    end
    v8 = 1'b0;
  endtask

  task automatic run12(input logic [11:0] x, input logic [11:0] y);
    logic [23:0] prod;
    prod = 24'(x) * 24'(y);
    do_reset();
    for (int s = 0; s < 18; s++) begin
      v12 = 1'b1;
      a12 = (s < 12) ? x[s] : 1'b0;
      b12 = (s < 12) ? y[s] : 1'b0;
      @(negedge clk);
      if (s >= 6) begin
        checks++;
        if (p12 !== prod[2*(s-6) +: 2]) begin
          failures++;
          $display("FAIL n=12 %0d*%0d step %0d got %0d exp %0d", x, y, s, p12, prod[2*(s-6) +: 2]);
        end
      end
    end
    v12 = 1'b0;
  endtask

  initial begin
    v8 = 1'b0; a8 = 1'b0; b8 = 1'b0;
    v12 = 1'b0; a12 = 1'b0; b12 = 1'b0;
    arstn = 1'b0;
    @(negedge clk);
    run8(8'd255, 8'd255, 1'b0);
    run8(8'd0,   8'd255, 1'b0);
    run8(8'd1,   8'd1,   1'b0);
    run8(8'd128, 8'd128, 1'b0);
    run8(8'd170, 8'd85,  1'b1);
    for (int i = 0; i < 400; i++) run8(8'($urandom), 8'($urandom), i[0]);
    run12(12'hFFF, 12'hFFF);
    for (int i = 0; i < 200; i++) run12(12'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
