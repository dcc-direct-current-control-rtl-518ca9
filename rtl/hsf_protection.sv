// hsf_protection - high switching frequency protection for one transistor.
//
// The vector selector may not drive a switch directly. The requested state
// goes through this block: turning the switch off is passed at once, but
// once off it may only be turned on again after min_off clocks. A request
// to turn on earlier is held until the timer has run out.
//
// Interface: req (requested switch state), min_off (clocks), sw (the
// switch state driven to the power electronics), blocked (a turn-on is
// being held back).
// Timing: sw follows req one clock later when nothing is held back; after
// sw falls in clock t it may rise again at edge t + min_off at the earliest.
// After reset the switch is off and may be turned on at once.
// One protection timer per switch, and the rule that the timer must run out
// before the switch turns on again, follow the design; the timer's
// behaviour at reset is this design's own choice.
module hsf_protection #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic [WIDTH-1:0] min_off,
  output logic             sw,
  output logic             blocked
);

  logic [WIDTH-1:0] off_time;   // clocks since sw fell, saturating
  logic             may_on;

  assign may_on  = (off_time >= min_off);
  assign blocked = req && !sw && !may_on;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sw       <= 1'b0;
      off_time <= '1;
    end else begin
      if (sw) begin
        if (!req) begin
          sw       <= 1'b0;
          off_time <= WIDTH'(1);
        end
      end else begin
        if (off_time != '1) off_time <= off_time + 1'b1;
        if (req && may_on) sw <= 1'b1;
      end
    end

endmodule
