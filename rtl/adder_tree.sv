// adder_tree: network of 2-bit full adders (2FAs) that adds M digit-serial
// product streams into one.
//
// Each input is a radix-4 digit stream, least significant digit first, one
// digit per step (the o_product of a bit-serial multiplier). The tree holds
// M - 1 2FAs; each adds two streams and keeps its own carry in a one-step
// delay fed back to its carry-in, so each 2FA is a digit-serial adder and
// the tree output is the digit stream of the sum of all inputs. The adders
// themselves are combinational, so the sum digit of a step appears in the
// same step as the input digits.
//
// Arrangement: level 0 pairs the inputs in order (0+1, 2+3, ...); each later
// level pairs the previous level's results in order, and an odd item left
// over at the end of a level moves up unchanged to the end of the next one.
// For M = 25 this gives 12, 6, 3, 2 and 1 adders on levels 0 to 4 (24 in
// all, depth 5), with the 25th product joining on level 3. The adder count,
// level sizes and depth follow the document; the tree is generated from M
// instead of being written out by hand.
// Registers advance only when i_en is high; active-low asynchronous reset.
module adder_tree #(
  parameter int unsigned M = conv_pkg::KERNEL_L_DEF * conv_pkg::KERNEL_K_DEF
) (
  input  logic       i_clk,
  input  logic       i_arstn,
  input  logic       i_en,
  input  logic [1:0] i_product [M],
  output logic [1:0] o_sum
);

  // Number of items on level lv (level 0 holds the M inputs).
  function automatic int unsigned items_at(input int unsigned lv);
    int unsigned c = M;
    for (int unsigned i = 0; i < lv; i++) c = (c + 1) / 2;
    return c;
  endfunction

  localparam int unsigned LEVELS = (M > 1) ? $clog2(M) : 0;

  // Each level has its own item array; g_level[lv].items_out feeds level lv+1.
  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
    localparam int unsigned CNT  = items_at(lv);
    localparam int unsigned NADD = CNT / 2;
    logic [1:0] items_in  [M];
    logic [1:0] items_out [M];

    if (lv == 0) begin : g_from_inputs
      assign items_in = i_product;
    end else begin : g_from_level
      assign items_in = g_level[lv-1].items_out;
    end

    for (genvar j = 0; j < M; j++) begin : g_item
      if (j < NADD) begin : g_add
        logic carry_q, carry_d;
        fa2 u_fa (
          .i_input1 (items_in[2*j]),
          .i_input2 (items_in[2*j+1]),
          .i_cin    (carry_q),
          .o_sum    (items_out[j]),
          .o_cout   (carry_d)
        );
        always_ff @(posedge i_clk or negedge i_arstn) begin
          if (!i_arstn) carry_q <= 1'b0;
          else if (i_en) carry_q <= carry_d;
        end
      end else if (j == NADD && (CNT % 2) == 1) begin : g_pass
        assign items_out[j] = items_in[CNT-1];
      end else begin : g_unused
        assign items_out[j] = 2'b00;
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign o_sum = i_product[0];
  end else begin : g_root
    assign o_sum = g_level[LEVELS-1].items_out[0];
  end

endmodule
