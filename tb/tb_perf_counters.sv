// tb_perf_counters: random step and run patterns; both counters are compared
// every cycle with counts kept by the testbench, and the synchronous clear
// is exercised.
module tb_perf_counters;
  logic clk = 0, arstn, clr, step, run;
  logic [31:0] c_step, c_total;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  perf_counters dut (.i_clk(clk), .i_arstn(arstn), .i_clr(clr), .i_step(step), .i_run(run),
                     .o_cnt_step(c_step), .o_cnt_total(c_total));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_step, e_total;
    e_step = 0;
    e_total = 0;
    arstn = 0; clr = 0; step = 0; run = 0;
    @(negedge clk);
    arstn = 1;
    for (int i = 0; i < 5000; i++) begin
      clr  = ($urandom % 500) == 0;
      step = ($urandom % 3) == 0;
      run  = ($urandom % 4) != 0;
      @(negedge clk);
      if (clr) begin
        e_step = 0; e_total = 0;
      end else begin
        e_step  += int'(step);
        e_total += int'(run);
      end
      checks++;
      if (c_step !== 32'(e_step) || c_total !== 32'(e_total)) begin
        failures++;
        $display("FAIL cycle %0d got %0d/%0d exp %0d/%0d", i, c_step, c_total, e_step, e_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
