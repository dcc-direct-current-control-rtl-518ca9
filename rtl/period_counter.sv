// period_counter - measures the switching period.
//
// Counts clocks between successive mark pulses (one mark per switching
// period: in the controller, each time the vector that drives the current
// away from zero is applied). At each mark
// the count so far becomes period and valid rises. If the count reaches its
// all-ones value before the next mark, stopped rises: the controller has
// stopped switching. The count saturates and stopped falls at the next mark.
//
// Interface: mark (pulse), period (clocks between the last two marks),
// valid (a period has been measured), stopped.
// Timing: period is updated in the clock after the mark.
// Measuring the period and flagging a stalled controller follow the design;
// what counts as one period is this design's own choice.
module period_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mark,
  output logic [WIDTH-1:0] period,
  output logic             valid,
  output logic             stopped
);

  logic [WIDTH-1:0] count;
  logic             seen;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count  <= '0;
      period <= '0;
      valid  <= 1'b0;
      seen   <= 1'b0;
    end else if (mark) begin
      if (seen) begin
        period <= count + 1'b1;
        valid  <= 1'b1;
      end
      seen  <= 1'b1;
      count <= '0;
    end else if (count != '1) begin
      count <= count + 1'b1;
    end

  assign stopped = seen && (count == '1);

endmodule
