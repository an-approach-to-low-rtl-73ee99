// prog_oscillator: behavioural model of the on-chip programmable oscillator
// that can clock the processor instead of an external clock. It is not
// synthesizable: the real part is a ring oscillator whose period is set by
// selectable delay, which this model reproduces with a timed loop.
//
// While enable is high, clk_out toggles every (ctrl + 1) * UNIT_DELAY time
// units, so a larger ctrl gives a slower clock; while enable is low clk_out
// rests at 0. The existence of a selectable, programmable oscillator follows
// the processor's description; the control encoding and the delay per step
// are this design's choices.
module prog_oscillator #(
  parameter int unsigned CTRL_W     = 4,
  parameter int unsigned UNIT_DELAY = 1
) (
  input  logic              enable,
  input  logic [CTRL_W-1:0] ctrl,
  output logic              clk_out
);

  initial clk_out = 1'b0;

  always begin
    if (enable) begin
      #((int'(ctrl) + 1) * int'(UNIT_DELAY));
      clk_out = enable ? ~clk_out : 1'b0;
    end else begin
      clk_out = 1'b0;
      @(posedge enable);
    end
  end

endmodule
