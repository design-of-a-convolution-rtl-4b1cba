// conv_core: the convolution datapath for one output entry.
//
// The host sends the l x k window of the input feature map and the l x k
// kernel as bit slices: slice s carries bit s of every window value on
// i_bit_x and bit s of every weight on i_bit_k (bit j of the bus belongs to
// kernel position j), least significant bit first, followed by zero slices
// while the result drains. Each slice is accepted on a cycle with i_step
// high. The slices are first registered in two M-bit delay banks, then
// feed M = l x k bit-serial multipliers (window value on a, weight on b) in
// parallel. The multipliers' 2-bit product streams are summed by a tree of
// M - 1 2FAs into a single 2-bit digit stream: digit d of the sum
// Y = sum_j X_j * K_j, least significant digit first.
//
// Timing: digit d is on o_digit after step n/2 + d (step 0 loads bit 0),
// so the n digits of a 2n-bit result take 3n/2 steps; o_digit_valid is high
// while the digit on o_digit is one of the OUT_DIGITS result digits and
// o_done once all of them have been produced. A step counter (4 bits at the
// default size) tracks this. All registers, including the counter, advance
// only on i_step; i_arstn (active low, asynchronous) clears everything and
// is applied by the host before each window.
// The delay banks, the multiplier array and the adder tree follow the
// document; the counter-based digit-valid logic is this design's choice.
module conv_core #(
  parameter int unsigned N          = conv_pkg::N_BITS_DEF,
  parameter int unsigned M          = conv_pkg::KERNEL_L_DEF * conv_pkg::KERNEL_K_DEF,
  parameter int unsigned OUT_DIGITS = conv_pkg::OUT_DIGITS_DEF
) (
  input  logic         i_clk,
  input  logic         i_arstn,
  input  logic         i_step,
  input  logic [M-1:0] i_bit_x,
  input  logic [M-1:0] i_bit_k,
  output logic [1:0]   o_digit,
  output logic         o_digit_valid,
  output logic         o_done
);

  localparam int unsigned FIRST = N / 2 + 1;            // count at digit 0
  localparam int unsigned LAST  = N / 2 + OUT_DIGITS;   // count at last digit
  localparam int unsigned CNT_W = $clog2(LAST + 2);

  logic [M-1:0] s_bit_x_delayed, s_bit_k_delayed;
  logic [1:0]   product [M];
  logic [CNT_W-1:0] step_cnt;

  // Input delay banks (the extra input delay of every multiplier, shared).
  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) begin
      s_bit_x_delayed <= '0;
      s_bit_k_delayed <= '0;
    end else if (i_step) begin
      s_bit_x_delayed <= i_bit_x;
      s_bit_k_delayed <= i_bit_k;
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_mul
    serial_multiplier #(.N(N), .IN_DELAY(1'b0)) u_mul (
      .i_clk     (i_clk),
      .i_arstn   (i_arstn),
      .i_valid   (i_step),
      .i_a       (s_bit_x_delayed[j]),
      .i_b       (s_bit_k_delayed[j]),
      .o_product (product[j])
    );
  end

  adder_tree #(.M(M)) u_tree (
    .i_clk     (i_clk),
    .i_arstn   (i_arstn),
    .i_en      (i_step),
    .i_product (product),
    .o_sum     (o_digit)
  );

  // Step counter, saturating one past the last digit.
  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) step_cnt <= '0;
    else if (i_step && step_cnt <= CNT_W'(LAST)) step_cnt <= step_cnt + CNT_W'(1);
  end

  always_comb begin
    o_digit_valid = (step_cnt >= CNT_W'(FIRST)) && (step_cnt <= CNT_W'(LAST));
    o_done        = (step_cnt >= CNT_W'(LAST));
  end

endmodule
