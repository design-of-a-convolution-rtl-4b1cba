// i2b: intermediate 2-bit block (I2B) of the bit-serial multiplier.
//
// The multiplier moves the bits of operand a from left to right and those of
// operand b from right to left through chains of one-step delays. This block
// holds two a-delays and two b-delays, so it sees three a taps
// (i_a, a_d1, a_d2) and three b taps (i_b, b_d1, b_d2). Because the two
// streams run against each other, the bit-index sum of a tap pair is the same
// everywhere in the multiplier at a given step: pairs whose tap offsets add to
// n-1 belong to the odd product column of the current output digit, pairs
// whose offsets add to n belong to the even column. This block forms four
// partial products, two of each column:
//   A = {i_a  & b_d2, a_d1 & b_d2}   (odd, even)
//   B = {a_d1 & b_d1, a_d2 & b_d1}   (odd, even)
// and sums them with a 2FA whose carry-out is held in a delay and fed back to
// its carry-in, giving one radix-4 digit of its partial sum per step on o_s.
//
// All registers advance only when i_en is high (one step per datapath
// transaction) and are cleared by the active-low asynchronous reset.
// Interface: i_a/o_a is the a chain (o_a = a after two steps), i_b/o_b the
// b chain (o_b = b after two steps). o_s is combinational from the taps.
// The counts of delays, products and adders follow the block description;
// the assignment of tap pairs to adder inputs is derived from the column
// arithmetic above.
module i2b (
  input  logic       i_clk,
  input  logic       i_arstn,
  input  logic       i_en,
  input  logic       i_a,
  output logic       o_a,
  input  logic       i_b,
  output logic       o_b,
  output logic [1:0] o_s
);

  logic a_d1, a_d2, b_d1, b_d2, carry_q, carry_d;
  logic [1:0] pp_a, pp_b;

  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) begin
      a_d1    <= 1'b0;
      a_d2    <= 1'b0;
      b_d1    <= 1'b0;
      b_d2    <= 1'b0;
      carry_q <= 1'b0;
    end else if (i_en) begin
      a_d1    <= i_a;
      a_d2    <= a_d1;
      b_d1    <= i_b;
      b_d2    <= b_d1;
      carry_q <= carry_d;
    end
  end

  always_comb begin
    pp_a = {i_a  & b_d2, a_d1 & b_d2};
    pp_b = {a_d1 & b_d1, a_d2 & b_d1};
  end

  fa2 u_fa (
    .i_input1 (pp_a),
    .i_input2 (pp_b),
    .i_cin    (carry_q),
    .o_sum    (o_s),
    .o_cout   (carry_d)
  );

  assign o_a = a_d2;
  assign o_b = b_d2;

endmodule
