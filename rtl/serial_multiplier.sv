// serial_multiplier: n x n unsigned bit-serial multiplier with a 2-bit
// synchronous output.
//
// Both operands enter one bit per step, least significant bit first, on i_a
// and i_b; after the n operand bits the inputs must be held at 0 while the
// rest of the product drains. The product leaves two bits per step on
// o_product (bit 1 = p(n+1), bit 0 = p(n) in the usual notation), least
// significant pair first.
//
// Structure: (n/2 - 1) intermediate 2-bit blocks (i2b) followed by one
// terminating 2-bit block (t2b). Operand a runs through the blocks from the
// first i2b to the t2b, operand b enters at the t2b and runs the other way,
// so at every step all AND gates work on the same pair of product columns.
// The per-block 2-bit partial sums are added by a series of (n/2 - 1) 2FAs,
// each with its carry delayed one step and fed back. For n = 8 the multiplier
// holds 3n - 3 = 21 flip-flops, plus 2 when IN_DELAY is set.
//
// Timing (steps are clock edges with i_valid = 1):
//   IN_DELAY = 1 (default, extra delay on both inputs): digit k of the
//     product is on o_product after step n/2 + k, counting the step that
//     loads bit 0 as step 0, i.e. all n digits are out after 3n/2 steps.
//   IN_DELAY = 0: digit k is on o_product combinationally during step
//     n/2 + k, the last one during step 3n/2 - 1.
// Nothing moves while i_valid is low. i_arstn (active low, asynchronous)
// clears every register and must be applied between two products.
// The block structure, the single b delay in the terminating block, the
// extra input delays and the latencies follow the document; that i_valid is
// a clock enable for every register is this design's choice.
module serial_multiplier #(
  parameter int unsigned N        = conv_pkg::N_BITS_DEF,
  parameter bit          IN_DELAY = 1'b1
) (
  input  logic       i_clk,
  input  logic       i_arstn,
  input  logic       i_valid,
  input  logic       i_a,
  input  logic       i_b,
  output logic [1:0] o_product
);

  localparam int unsigned NI = N / 2 - 1;   // number of i2b blocks

  // N must be even and at least 4.
  if ((N % 2) != 0 || N < 4) begin : g_bad_n
    $error("serial_multiplier: N must be even and >= 4");
  end

  logic a_in, b_in;

  if (IN_DELAY) begin : g_in_delay
    logic a_q, b_q;
    always_ff @(posedge i_clk or negedge i_arstn) begin
      if (!i_arstn) begin
        a_q <= 1'b0;
        b_q <= 1'b0;
      end else if (i_valid) begin
        a_q <= i_a;
        b_q <= i_b;
      end
    end
    assign a_in = a_q;
    assign b_in = b_q;
  end else begin : g_no_delay
    assign a_in = i_a;
    assign b_in = i_b;
  end

  // a_chain[m] enters i2b m, a_chain[NI] enters the t2b.
  // b_chain[m+1] enters i2b m from the right, b_chain[NI] leaves the t2b.
  logic [NI:0]   a_chain;   // a_chain[NI] feeds the t2b
  logic [NI:0]   b_chain;
  logic [1:0]    blk_s [NI+1];   // partial-sum digits: i2b 0..NI-1, t2b at NI
  logic [1:0]    acc   [NI+1];   // running sums along the 2FA series
  logic [NI-1:0] acc_c_q, acc_c_d;

  assign a_chain[0] = a_in;

  // The b stream leaving the first i2b (b_chain[0]) is the end of the b
  // chain and is not used.
  for (genvar m = 0; m < NI; m++) begin : g_i2b
    i2b u_i2b (
      .i_clk   (i_clk),
      .i_arstn (i_arstn),
      .i_en    (i_valid),
      .i_a     (a_chain[m]),
      .o_a     (a_chain[m+1]),
      .i_b     (b_chain[m+1]),
      .o_b     (b_chain[m]),
      .o_s     (blk_s[m])
    );
  end

  t2b u_t2b (
    .i_clk   (i_clk),
    .i_arstn (i_arstn),
    .i_en    (i_valid),
    .i_a     (a_chain[NI]),
    .i_b     (b_in),
    .o_b     (b_chain[NI]),
    .o_s     (blk_s[NI])
  );

  // Series of NI 2FAs with delayed carries summing the NI+1 block digits.
  assign acc[0] = blk_s[0];
  for (genvar j = 0; j < NI; j++) begin : g_sum
    fa2 u_fa (
      .i_input1 (acc[j]),
      .i_input2 (blk_s[j+1]),
      .i_cin    (acc_c_q[j]),
      .o_sum    (acc[j+1]),
      .o_cout   (acc_c_d[j])
    );
  end

  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) acc_c_q <= '0;
    else if (i_valid) acc_c_q <= acc_c_d;
  end

  assign o_product = acc[NI];

endmodule
