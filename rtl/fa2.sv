// fa2: two-bit full adder (2FA), the adding element used everywhere in the
// accelerator: inside the multiplier blocks, between them, and in the adder
// tree that sums the multiplier outputs.
//
// It adds two 2-bit numbers and a carry-in and returns a 2-bit sum and a
// carry-out: {o_cout, o_sum} = i_input1 + i_input2 + i_cin. It is purely
// combinational; in every use the carry-out is registered by the instantiating
// block and returned to i_cin on the next step, which turns the adder into a
// radix-4 digit-serial adder (a carry of weight 4 in one step has weight 1 in
// the next, because each step advances the stream by two bit positions).
// The port names follow the instance ports of the reference netlist; the
// internal realisation (a single 3-bit addition) is this design's choice.
module fa2 (
  input  logic [1:0] i_input1,
  input  logic [1:0] i_input2,
  input  logic       i_cin,
  output logic [1:0] o_sum,
  output logic       o_cout
);

  logic [2:0] total;

  always_comb begin
    total  = {1'b0, i_input1} + {1'b0, i_input2} + {2'b00, i_cin};
    o_sum  = total[1:0];
    o_cout = total[2];
  end

endmodule
