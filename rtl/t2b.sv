// t2b: terminating 2-bit block (T2B) of the bit-serial multiplier.
//
// It sits at the end of the a chain and at the entry of the b chain. It holds
// one a-delay and one b-delay (the corrected form with a single delay on b),
// so it sees a taps i_a, a_d1 and b taps i_b, b_d1. It forms three partial
// products, two of the odd column and one of the even column of the current
// output digit:
//   A = {i_a & b_d1, a_d1 & b_d1}   (odd, even)
//   B = {a_d1 & i_b, 1'b0}          (odd, constant 0)
// and sums them with a 2FA whose carry-out is delayed one step and fed back.
// o_b passes the b stream, delayed one step, on to the intermediate blocks.
// Registers advance only when i_en is high; active-low asynchronous reset.
// Delay and product counts and the constant 0 input follow the block
// description; which tap pairs feed which adder input is derived from the
// column arithmetic explained in i2b.
module t2b (
  input  logic       i_clk,
  input  logic       i_arstn,
  input  logic       i_en,
  input  logic       i_a,
  input  logic       i_b,
  output logic       o_b,
  output logic [1:0] o_s
);

  logic a_d1, b_d1, carry_q, carry_d;
  logic [1:0] pp_a, pp_b;

  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) begin
      a_d1    <= 1'b0;
      b_d1    <= 1'b0;
      carry_q <= 1'b0;
    end else if (i_en) begin
      a_d1    <= i_a;
      b_d1    <= i_b;
      carry_q <= carry_d;
    end
  end

  always_comb begin
    pp_a = {i_a & b_d1, a_d1 & b_d1};
    pp_b = {a_d1 & i_b, 1'b0};
  end

  fa2 u_fa (
    .i_input1 (pp_a),
    .i_input2 (pp_b),
    .i_cin    (carry_q),
    .o_sum    (o_s),
    .o_cout   (carry_d)
  );

  assign o_b = b_d1;

endmodule
