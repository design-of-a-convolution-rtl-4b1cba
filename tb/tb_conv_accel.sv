// tb_conv_accel: end-to-end test of the accelerator at its default size
// (n = 8, 5x5 kernel, 25 multipliers). A host model follows the scheduling
// loop of the design: for every output entry it resets the module, then,
// until 16 result bits have been collected, waits for o_idle, drives the
// next bit slice of the 5x5 window and kernel with i_valid high, lowers
// i_valid, and if o_out_valid is up stores the 2-bit digit and acknowledges
// it by pulsing i_ready low and high. Every host access takes a random 2 to 6
// cycles, as a memory-mapped port would.
//
// The workload is a 3-channel 9x9 image convolved channel by channel with a
// random 5x5 kernel at stride 1 (75 windows, 5x5 output per channel). Each
// result is compared with sum(X*K) mod 2^16 computed here, both as rebuilt
// by the host from the digits and as held in the result shift register. The
// step counter must advance exactly 3n/2 = 12 per window. The test counts
// each handshake path and hold state of the control FSM and fails if one
// never occurred.
module tb_conv_accel;
  import conv_pkg::*;
  localparam int N = 8, KL = 5, KK = 5, M = KL * KK;
  localparam int IMG = 9, CH = 3, OUT = IMG - KL + 1;

  logic clk = 0, arstn, valid, ready, perf_arstn, perf_clr, run;
  logic [M-1:0] bx, bk;
  logic [1:0] prod;
  logic out_valid, idle, done;
  logic [15:0] result;
  fsm_state_t st;
  logic [31:0] cnt_step, cnt_total;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  conv_accel dut (
    .i_clk(clk), .i_arstn(arstn), .i_valid(valid), .i_ready(ready),
    .i_bit_x(bx), .i_bit_k(bk), .o_product(prod), .o_out_valid(out_valid), .o_idle(idle),
    .o_result(result), .o_done(done), .o_state(st),
    .i_perf_arstn(perf_arstn), .i_perf_clr(perf_clr), .i_run(run),
    .o_cnt_step(cnt_step), .o_cnt_total(cnt_total));

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled every clock.
  int n_write = 0, n_read_done = 0, n_hold_read_done = 0, n_hold_write = 0;
  int n_hold_write_done = 0, n_idle_wait = 0;
  fsm_state_t prev_st = ST_IDLE;
  always @(posedge clk) begin
    if (arstn) begin
      if (prev_st == ST_WAIT_RES && st == ST_WRITE)           n_write++;
      if (prev_st == ST_WAIT_RES && st == ST_READ_DONE)       n_read_done++;
      if (prev_st == ST_READ_DONE && st == ST_READ_DONE)      n_hold_read_done++;
      if (prev_st == ST_WRITE && st == ST_WRITE)              n_hold_write++;
      if (prev_st == ST_WRITE_DONE && st == ST_WRITE_DONE)    n_hold_write_done++;
      if (prev_st == ST_IDLE && st == ST_IDLE)                n_idle_wait++;
    end
    prev_st <= st;
  end

  task automatic pio_delay();
    repeat ($urandom_range(2, 6)) @(negedge clk);
  endtask

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("mechanism %-28s seen %0d times", what, n);
  endtask

  initial begin
    logic [7:0] img [CH][IMG][IMG];
    logic [7:0] ker [CH][KL][KK];
    logic [7:0] wx [M];
    logic [7:0] wk [M];
    int windows;
    logic [31:0] step_before;
    windows = 0;

    arstn = 0; perf_arstn = 0; perf_clr = 0; run = 0; valid = 0; ready = 1; bx = 0; bk = 0;
    for (int c = 0; c < CH; c++) begin
      for (int r = 0; r < IMG; r++)
        for (int q = 0; q < IMG; q++) img[c][r][q] = (c == 0 && r < KL && q < KK) ? 8'hFF : 8'($urandom);
      for (int r = 0; r < KL; r++)
        for (int q = 0; q < KK; q++) ker[c][r][q] = (c == 0) ? 8'hFF : 8'($urandom);
    end
    @(negedge clk);
    perf_arstn = 1;
    run = 1;

    for (int c = 0; c < CH; c++) begin
      for (int oi = 0; oi < OUT; oi++) begin
        for (int oj = 0; oj < OUT; oj++) begin
          logic [31:0] y_ref;
          logic [15:0] y_host;
          int bits_read, bits_sent;
          // extract the window
          y_ref = 0;
          for (int l = 0; l < KL; l++)
            for (int k = 0; k < KK; k++) begin
              wx[l*KK+k] = img[c][oi+l][oj+k];
              wk[l*KK+k] = ker[c][l][k];
              y_ref += 32'(img[c][oi+l][oj+k]) * 32'(ker[c][l][k]);
            end
          // reset the convolution module
          arstn = 0; pio_delay(); arstn = 1; pio_delay();
          step_before = cnt_step;
          bits_read = 0; bits_sent = 0; y_host = 0;
          while (bits_read < 2 * N) begin
            while (!idle) @(negedge clk);
            for (int j = 0; j < M; j++) begin
              bx[j] = (bits_sent < N) ? wx[j][bits_sent] : 1'b0;
              bk[j] = (bits_sent < N) ? wk[j][bits_sent] : 1'b0;
            end
            valid = 1; pio_delay();
            valid = 0; pio_delay();
            if (out_valid) begin
              y_host[bits_read +: 2] = prod;
              bits_read += 2;
              ready = 0; pio_delay();
              ready = 1; pio_delay();
            end
            bits_sent++;
          end
          windows++;
          checks++;
          if (y_host !== y_ref[15:0]) begin
            failures++;
            $display("FAIL ch %0d (%0d,%0d): host got %0d exp %0d", c, oi, oj, y_host, y_ref[15:0]);
          end
          checks++;
          if (result !== y_ref[15:0] || !done) begin
            failures++;
            $display("FAIL ch %0d (%0d,%0d): result register %0d done %0d", c, oi, oj, result, done);
          end
          checks++;
          if (bits_sent != 3 * N / 2 || cnt_step - step_before != 32'(3 * N / 2)) begin
            failures++;
            $display("FAIL ch %0d (%0d,%0d): %0d slices, %0d steps", c, oi, oj, bits_sent,
                     cnt_step - step_before);
          end
        end
      end
    end
    run = 0;
    @(negedge clk);
    checks++;
    if (cnt_step != 32'(windows * 3 * N / 2)) begin
      failures++;
      $display("FAIL step counter %0d for %0d windows", cnt_step, windows);
    end
    $display("windows %0d, compute cycles %0d (%0d per window), total cycles %0d (%0d per window)",
             windows, cnt_step, cnt_step / windows, cnt_total, cnt_total / windows);
    perf_clr = 1; @(negedge clk); perf_clr = 0;
    checks++;
    if (cnt_step != 0 || cnt_total != 0) begin failures++; $display("FAIL perf clear"); end
    check_seen("digit handed to host", n_write);
    check_seen("step without digit", n_read_done);
    check_seen("READ_DONE hold (valid high)", n_hold_read_done);
    check_seen("WRITE hold (ready high)", n_hold_write);
    check_seen("WRITE_DONE hold (ready low)", n_hold_write_done);
    check_seen("IDLE wait", n_idle_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
