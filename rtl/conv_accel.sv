// conv_accel: top level of the bit-serial convolution accelerator (FPGA
// side). It computes one entry of an output feature map,
//   Y = sum over the l x k window of X[i+l][j+k] * K[l][k],
// with one bit-serial multiplier per kernel position working in parallel and
// a tree of 2-bit full adders summing their outputs, two result bits per
// step. A host processor does the scheduling: it cuts the window out of the
// image, resets this module (i_arstn), and then sends bit slices (bit s of
// all window values on i_bit_x, bit s of all weights on i_bit_k, LSB first,
// zeros after the n operand bits) one per handshake, collecting each 2-bit
// result digit the module offers.
//
// Handshake per slice (see control_fsm): the host waits for o_idle, drives
// the slice and raises i_valid, then lowers i_valid. If that step produced a
// result digit the module raises o_out_valid with the digit on o_product;
// the host reads it and pulses i_ready low and high again to acknowledge.
// With n = 8 one window takes 12 slices (3n/2) and yields 8 digits (a 16-bit
// result, least significant pair first), which are also collected in the
// shift right register o_result; o_done is high once all digits have left.
//
// Two performance counters run beside the datapath: o_cnt_step counts the
// cycles in which a slice enters the datapath, o_cnt_total counts cycles
// while the host's start flag i_run is high. They have their own reset
// (i_perf_arstn) and clear (i_perf_clr) so that they survive the per-window
// datapath resets.
//
// The host-side program and the memory-mapped parallel ports that carry
// these signals are outside this design; their signals are the ports here.
// Sizes follow the document (n = 8, 5 x 5 kernel); the port-level signal
// set and the result register width are this design's choices.
module conv_accel
  import conv_pkg::*;
#(
  parameter int unsigned N          = N_BITS_DEF,
  parameter int unsigned KERNEL_L   = KERNEL_L_DEF,
  parameter int unsigned KERNEL_K   = KERNEL_K_DEF,
  parameter int unsigned OUT_DIGITS = OUT_DIGITS_DEF,
  parameter int unsigned PERF_W     = 32,
  localparam int unsigned M         = KERNEL_L * KERNEL_K
) (
  input  logic                    i_clk,
  input  logic                    i_arstn,
  input  logic                    i_valid,
  input  logic                    i_ready,
  input  logic [M-1:0]            i_bit_x,
  input  logic [M-1:0]            i_bit_k,
  output logic [1:0]              o_product,
  output logic                    o_out_valid,
  output logic                    o_idle,
  output logic [2*OUT_DIGITS-1:0] o_result,
  output logic                    o_done,
  output fsm_state_t              o_state,
  input  logic                    i_perf_arstn,
  input  logic                    i_perf_clr,
  input  logic                    i_run,
  output logic [PERF_W-1:0]       o_cnt_step,
  output logic [PERF_W-1:0]       o_cnt_total
);

  logic step, capture, digit_valid;

  control_fsm u_fsm (
    .i_clk       (i_clk),
    .i_arstn     (i_arstn),
    .i_valid     (i_valid),
    .i_ready     (i_ready),
    .i_out_valid (digit_valid),
    .o_step      (step),
    .o_capture   (capture),
    .o_out_valid (o_out_valid),
    .o_idle      (o_idle),
    .o_state     (o_state)
  );

  conv_core #(.N(N), .M(M), .OUT_DIGITS(OUT_DIGITS)) u_core (
    .i_clk         (i_clk),
    .i_arstn       (i_arstn),
    .i_step        (step),
    .i_bit_x       (i_bit_x),
    .i_bit_k       (i_bit_k),
    .o_digit       (o_product),
    .o_digit_valid (digit_valid),
    .o_done        (o_done)
  );

  srr #(.W(2 * OUT_DIGITS)) u_srr (
    .i_clk   (i_clk),
    .i_arstn (i_arstn),
    .i_shift (capture),
    .i_digit (o_product),
    .o_q     (o_result)
  );

  perf_counters #(.W(PERF_W)) u_perf (
    .i_clk       (i_clk),
    .i_arstn     (i_perf_arstn),
    .i_clr       (i_perf_clr),
    .i_step      (step),
    .i_run       (i_run),
    .o_cnt_step  (o_cnt_step),
    .o_cnt_total (o_cnt_total)
  );

  // The digit offered to the host must not change while it is offered.
  a_digit_stable: assert property (@(posedge i_clk) disable iff (!i_arstn)
      (o_out_valid && $past(o_out_valid)) |-> $stable(o_product));

  // The datapath steps exactly once per accepted slice.
  a_single_step: assert property (@(posedge i_clk) disable iff (!i_arstn)
      step |=> !step);

endmodule
