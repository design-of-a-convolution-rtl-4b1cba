// conv_pkg: types and default sizes shared by the bit-serial convolution
// accelerator. The defaults are those of the 5x5-kernel, 8-bit build: 25
// parallel bit-serial multipliers whose 2-bit product streams are summed by a
// tree of 24 two-bit full adders. The state encoding of the control FSM lives
// here so that the FSM, the top level and the testbenches agree on it.
package conv_pkg;

  // Operand width n (bits of each feature-map entry and kernel weight).
  localparam int unsigned N_BITS_DEF   = 8;
  // Kernel size l x k; one multiplier per kernel entry.
  localparam int unsigned KERNEL_L_DEF = 5;
  localparam int unsigned KERNEL_K_DEF = 5;
  // Number of 2-bit result digits handed to the host per window. The host
  // loop reads 2n result bits, i.e. n digits.
  localparam int unsigned OUT_DIGITS_DEF = N_BITS_DEF;

  // One radix-4 digit of a serial stream (bit 1 has weight 2, bit 0 weight 1).
  typedef logic [1:0] digit_t;

  // Control FSM states (six states, 3-bit state register).
  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,
    ST_READ       = 3'd1,
    ST_WAIT_RES   = 3'd2,
    ST_WRITE      = 3'd3,
    ST_READ_DONE  = 3'd4,
    ST_WRITE_DONE = 3'd5
  } fsm_state_t;

endpackage
