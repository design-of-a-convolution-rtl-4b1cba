// srr: shift right register that rebuilds a result word from its 2-bit
// digits.
//
// The datapath delivers a result two bits per step, least significant pair
// first. On every cycle with i_shift high the register moves right by two
// bits and the new digit enters at the top, so after W/2 shifts the first
// digit has reached bits [1:0] and o_q holds the whole W-bit result. It is
// cleared by the active-low asynchronous reset, which the host applies
// before each window. The document places this register between the adder
// tree and the result; its width (W = 2 x number of result digits) and the
// shift-enable control are this design's choice.
module srr #(
  parameter int unsigned W = 2 * conv_pkg::OUT_DIGITS_DEF
) (
  input  logic         i_clk,
  input  logic         i_arstn,
  input  logic         i_shift,
  input  logic [1:0]   i_digit,
  output logic [W-1:0] o_q
);

  if ((W % 2) != 0 || W < 2) begin : g_bad_w
    $error("srr: W must be even and >= 2");
  end

  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) o_q <= '0;
    else if (i_shift) o_q <= {i_digit, o_q[W-1:2]};
  end

endmodule
