// perf_counters: the two cycle counters used to measure the accelerator.
//
// o_cnt_step counts only cycles in which a new input slice enters the
// datapath (i_step high): the time spent on computation alone, 3n/2 cycles
// per output entry. o_cnt_total counts every cycle while the host's start
// flag i_run is high: the time including data scheduling and transfer.
// Both counters are cleared by their own active-low asynchronous reset
// (i_arstn) or synchronously by i_clr, so that they can keep running across
// the per-window resets of the datapath. The two counters and what they
// count follow the document; the 32-bit width and the clear inputs are this
// design's choice (32 bits holds the cycle totals of a full 1280 x 720 RGB
// run).
module perf_counters #(
  parameter int unsigned W = 32
) (
  input  logic         i_clk,
  input  logic         i_arstn,
  input  logic         i_clr,
  input  logic         i_step,
  input  logic         i_run,
  output logic [W-1:0] o_cnt_step,
  output logic [W-1:0] o_cnt_total
);

  always_ff @(posedge i_clk or negedge i_arstn) begin
    if (!i_arstn) begin
      o_cnt_step  <= '0;
      o_cnt_total <= '0;
    end else if (i_clr) begin
      o_cnt_step  <= '0;
      o_cnt_total <= '0;
    end else begin
      if (i_step) o_cnt_step  <= o_cnt_step + W'(1);
      if (i_run)  o_cnt_total <= o_cnt_total + W'(1);
    end
  end

endmodule
