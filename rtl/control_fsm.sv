// control_fsm: FPGA-side control unit that paces the datapath to the host.
//
// The host cannot see whether a memory-mapped write has landed, so a small
// handshake runs on top of the bus: the host places one bit slice on the
// input port and raises i_valid; the FSM steps the datapath once (READ),
// looks at whether that step produced a result digit (WAIT_RES), and either
// holds the digit for the host (WRITE) or just waits for i_valid to drop
// (READ_DONE). The host acknowledges a digit by pulling i_ready low and then
// high again (WRITE -> WRITE_DONE -> IDLE).
//
// Transitions (the document's table):
//   IDLE       valid=1 -> READ,        else IDLE
//   READ               -> WAIT_RES
//   WAIT_RES   i_out_valid=1 -> WRITE, else READ_DONE
//   READ_DONE  valid=1 -> READ_DONE,   valid=0 -> IDLE
//   WRITE      ready=1 -> WRITE,       ready=0 -> WRITE_DONE
//   WRITE_DONE ready=1 -> IDLE,        ready=0 -> WRITE_DONE
// Outputs (this design's choice, the document names the states only):
//   o_step     high in READ: the one-cycle clock enable of the datapath
//   o_capture  high in WAIT_RES when a digit is produced (loads the SRR)
//   o_out_valid high in WRITE: the digit on the output port is valid
//   o_idle     high in IDLE: the FPGA is ready for the next slice
// Active-low asynchronous reset to IDLE.
module control_fsm
  import conv_pkg::*;
(
  input  logic       i_clk,
  input  logic       i_arstn,
  input  logic       i_valid,
  input  logic       i_ready,
  input  logic       i_out_valid,
  output logic       o_step,
  output logic       o_capture,
  output logic       o_out_valid,
  output logic       o_idle,
  output fsm_state_t o_state
);

  fsm_state_t state, next;

  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) state <= ST_IDLE;
    else          state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      ST_IDLE:       next = i_valid ? ST_READ : ST_IDLE;
      ST_READ:       next = ST_WAIT_RES;
      ST_WAIT_RES:   next = i_out_valid ? ST_WRITE : ST_READ_DONE;
      ST_READ_DONE:  next = i_valid ? ST_READ_DONE : ST_IDLE;
      ST_WRITE:      next = i_ready ? ST_WRITE : ST_WRITE_DONE;
      ST_WRITE_DONE: next = i_ready ? ST_IDLE : ST_WRITE_DONE;
      default:       next = ST_IDLE;
    endcase
  end

  always_comb begin
    o_step      = (state == ST_READ);
    o_capture   = (state == ST_WAIT_RES) && i_out_valid;
    o_out_valid = (state == ST_WRITE);
    o_idle      = (state == ST_IDLE);
    o_state     = state;
  end

endmodule
