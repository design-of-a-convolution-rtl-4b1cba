// tb_workload_rgb720p: the evaluated workload, a 1280 x 720 RGB image
// convolved per channel with a 5x5 kernel at stride 1, run on the
// accelerator at its default size. The whole image (2,740,848 windows, about
// 200 million cycles with the handshake) would take a few minutes of
// simulation, so the upper half is run: STRIP_ROWS = 358 of the 716 output
// rows of all three channels, 1276 windows per row, with random 8-bit pixels
// and weights. A host model performs the slice handshake for every window
// (with short, fixed port latencies) and every result is compared with
// sum(X*K) mod 2^16. The compute-only counter must grow by 12 cycles (3n/2)
// per window; the testbench also checks that 12 cycles per window over the
// whole image gives 32,890,176 compute cycles, and prints the measured cycles
// per window including the handshake. Runs in about 90 s.
module tb_workload_rgb720p;
  import conv_pkg::*;
  localparam int N = 8, KL = 5, KK = 5, M = KL * KK;
  localparam int W = 1280, H = 720, CH = 3;
  localparam int STRIP_ROWS = 358;                      // output rows simulated
  localparam int OW = W - KK + 1, OH = H - KL + 1;

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
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] img [CH][STRIP_ROWS+KL-1][W];
    logic [7:0] ker [CH][KL][KK];
    longint windows;
    longint full_windows, full_cycles;
    windows = 0;

    arstn = 0; perf_arstn = 0; perf_clr = 0; run = 0; valid = 0; ready = 1; bx = 0; bk = 0;
    for (int c = 0; c < CH; c++) begin
      for (int r = 0; r < STRIP_ROWS + KL - 1; r++)
        for (int q = 0; q < W; q++) img[c][r][q] = 8'($urandom);
      for (int r = 0; r < KL; r++)
        for (int q = 0; q < KK; q++) ker[c][r][q] = 8'($urandom);
    end
    @(negedge clk);
    perf_arstn = 1;
    run = 1;

    for (int c = 0; c < CH; c++) begin
      for (int oi = 0; oi < STRIP_ROWS; oi++) begin
        for (int oj = 0; oj < OW; oj++) begin
          logic [31:0] y_ref;
          logic [15:0] y_host;
          int bits_read, bits_sent;
          y_ref = 0;
          for (int l = 0; l < KL; l++)
            for (int k = 0; k < KK; k++)
              y_ref += 32'(img[c][oi+l][oj+k]) * 32'(ker[c][l][k]);
          arstn = 0; @(negedge clk); arstn = 1;
          bits_read = 0; bits_sent = 0; y_host = 0;
          while (bits_read < 2 * N) begin
            while (!idle) @(negedge clk);
            for (int l = 0; l < KL; l++)
              for (int k = 0; k < KK; k++) begin
                bx[l*KK+k] = (bits_sent < N) ? img[c][oi+l][oj+k][bits_sent] : 1'b0;
                bk[l*KK+k] = (bits_sent < N) ? ker[c][l][k][bits_sent] : 1'b0;
              end
            valid = 1; repeat (2) @(negedge clk);
            valid = 0; repeat (2) @(negedge clk);
            if (out_valid) begin
              y_host[bits_read +: 2] = prod;
              bits_read += 2;
              ready = 0; repeat (2) @(negedge clk);
              ready = 1; @(negedge clk);
            end
            bits_sent++;
          end
          windows++;
          checks++;
          if (y_host !== y_ref[15:0] || result !== y_ref[15:0]) begin
            failures++;
            if (failures < 10)
              $display("FAIL ch %0d (%0d,%0d): got %0d/%0d exp %0d", c, oi, oj, y_host, result,
                       y_ref[15:0]);
          end
        end
      end
    end
    run = 0;
    @(negedge clk);
    checks++;
    if (longint'(cnt_step) != windows * 12) begin
      failures++;
      $display("FAIL compute cycles %0d for %0d windows", cnt_step, windows);
    end
    full_windows = longint'(OW) * longint'(OH) * longint'(CH);
    full_cycles  = full_windows * longint'(cnt_step) / windows;
    checks++;
    if (full_windows != 64'd2740848 || full_cycles != 64'd32890176) begin
      failures++;
      $display("FAIL whole-image extrapolation %0d windows %0d cycles", full_windows, full_cycles);
    end
    $display("strip: %0d windows, %0d compute cycles (%0d/window), %0d cycles with handshake (%0d/window)",
             windows, cnt_step, longint'(cnt_step) / windows, cnt_total, longint'(cnt_total) / windows);
    $display("whole image: %0d windows, %0d compute cycles", full_windows, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
