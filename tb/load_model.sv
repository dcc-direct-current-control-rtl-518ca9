// load_model - behavioural model (not synthesizable logic) of everything
// outside the controller: the two-switch bridge, an inductive load with
// resistance and back-EMF, the current sensor with noise, the two R-2R
// reference DACs and the two comparators.
//
// The current i is kept in units of 1/256 of a DAC code, relative to the
// code of zero current. Per clock:
//   i += v * K_U - (i * K_R) / 4096 - K_E,   v = +1 for [1,0], -1 for [0,1],
//                                             0 for a zero vector
// The sensed current is i plus a uniform noise of +-noise units, so a
// comparator chatters while the current is close to its reference.
// comp_upper = sensed > upper reference, comp_lower = sensed < lower
// reference, each reference being (dac code - zero_code) * 256.
module load_model (
  input  logic       clk,
  input  logic       s_a,
  input  logic       s_b,
  input  logic [7:0] upper_dac,
  input  logic [7:0] lower_dac,
  input  logic [7:0] zero_code,
  input  int         k_u,
  input  int         k_r,
  input  int         k_e,
  input  int         noise,
  output logic       comp_upper,
  output logic       comp_lower,
  output int         current
);
  int i = 0;
  int sensed;

  always @(posedge clk) begin
    int v;
    v = (s_a && !s_b) ? 1 : (!s_a && s_b) ? -1 : 0;
    i <= i + v * k_u - (i * k_r) / 4096 - k_e;
  end

  always @(negedge clk) begin
    sensed = i + ((noise > 0) ? ($urandom_range(2 * noise) - noise) : 0);
    comp_upper <= sensed > (int'(upper_dac) - int'(zero_code)) * 256;
    comp_lower <= sensed < (int'(lower_dac) - int'(zero_code)) * 256;
  end

  initial begin
    comp_upper = 1'b0;
    comp_lower = 1'b0;
  end

  assign current = i;
endmodule
