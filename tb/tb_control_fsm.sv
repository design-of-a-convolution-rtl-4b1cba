// tb_control_fsm: walks the control FSM through every row of its transition
// table (including every self-loop), checking the state after each clock and
// the outputs in each state, then runs random input sequences against a
// table-driven reference of the next-state function.
module tb_control_fsm;
  import conv_pkg::*;
  logic clk = 0, arstn, valid, ready, ovalid;
  logic step, capture, out_valid, idle;
  fsm_state_t st;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  control_fsm dut (.i_clk(clk), .i_arstn(arstn), .i_valid(valid), .i_ready(ready),
                   .i_out_valid(ovalid), .o_step(step), .o_capture(capture),
                   .o_out_valid(out_valid), .o_idle(idle), .o_state(st));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fsm_state_t ref_next(fsm_state_t s, logic v, logic r, logic ov);
    case (s)
      ST_IDLE:       return v ? ST_READ : ST_IDLE;
      ST_READ:       return ST_WAIT_RES;
      ST_WAIT_RES:   return ov ? ST_WRITE : ST_READ_DONE;
      ST_READ_DONE:  return v ? ST_READ_DONE : ST_IDLE;
      ST_WRITE:      return r ? ST_WRITE : ST_WRITE_DONE;
      ST_WRITE_DONE: return r ? ST_IDLE : ST_WRITE_DONE;
      default:       return ST_IDLE;
    endcase
  endfunction

  task automatic expect_state(fsm_state_t e, string what);
    checks++;
    if (st !== e) begin
      failures++;
      $display("FAIL %s: state %s expected %s", what, st.name(), e.name());
    end
    checks++;
    if (step !== (e == ST_READ) || out_valid !== (e == ST_WRITE) || idle !== (e == ST_IDLE)) begin
      failures++;
      $display("FAIL %s: outputs in %s", what, e.name());
    end
  endtask

  task automatic clock(logic v, logic r, logic ov);
    valid = v; ready = r; ovalid = ov;
    @(negedge clk);
  endtask

  initial begin
    fsm_state_t model;
    arstn = 0; valid = 0; ready = 1; ovalid = 0;
    @(negedge clk);
    arstn = 1;
    expect_state(ST_IDLE, "reset");
    clock(0, 1, 0); expect_state(ST_IDLE, "IDLE valid=0");
    clock(1, 1, 0); expect_state(ST_READ, "IDLE valid=1");
    clock(1, 1, 0); expect_state(ST_WAIT_RES, "READ");
    ovalid = 0; #1;
    checks++; if (capture !== 1'b0) begin failures++; $display("FAIL capture w/o digit"); end
    clock(1, 1, 0); expect_state(ST_READ_DONE, "WAIT_RES out_valid=0");
    clock(1, 1, 0); expect_state(ST_READ_DONE, "READ_DONE valid=1");
    clock(0, 1, 0); expect_state(ST_IDLE, "READ_DONE valid=0");
    clock(1, 1, 1); expect_state(ST_READ, "IDLE valid=1 (2)");
    clock(0, 1, 1); expect_state(ST_WAIT_RES, "READ (2)");
    ovalid = 1; #1;
    checks++; if (capture !== 1'b1) begin failures++; $display("FAIL capture missing"); end
    clock(0, 1, 1); expect_state(ST_WRITE, "WAIT_RES out_valid=1");
    clock(0, 1, 1); expect_state(ST_WRITE, "WRITE ready=1");
    clock(0, 0, 1); expect_state(ST_WRITE_DONE, "WRITE ready=0");
    clock(0, 0, 1); expect_state(ST_WRITE_DONE, "WRITE_DONE ready=0");
    clock(0, 1, 1); expect_state(ST_IDLE, "WRITE_DONE ready=1");
    // random sequences against the reference
    model = ST_IDLE;
    for (int i = 0; i < 5000; i++) begin
      logic v, r, ov;
      v = 1'($urandom); r = 1'($urandom); ov = 1'($urandom);
      model = ref_next(model, v, r, ov);
      clock(v, r, ov);
      expect_state(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
