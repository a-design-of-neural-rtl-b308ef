// Behavioural model (not synthesizable logic): the DPWM's pair of
// integrate-and-fire (I&F) cells.
//
// Both cells integrate a bias current on a set of unit capacitors and fire a
// rising edge when they cross their threshold; the two edges go to the row's
// two word lines, and their time difference is the pulse that steers the MPE
// currents. For a code N one cell uses 32-N capacitors while the other uses
// all 32 in phase 1 and 32-N in phase 2, which cancels the parasitic offset:
// the pulse width is N x t_unit. The output pulse_w is that width in
// normalised time units (exactly N for an ideal, calibrated cell).
//
// RATIO_PCT is the cell's capacitance/current ratio relative to nominal
// (70..140). The full-capacitance firing time is 1.9 cycles x RATIO/100,
// shortened by the current trim (factor 8/(8+trim)). fired_max reports
// whether the maximum-capacitance test fired within two cycles. If the cells
// are too slow to fire in time, the pulse is clipped to the part that fits
// in the two-cycle window, which is the non-linearity the calibration
// removes. Time is modelled per control cycle, not with delays.
module dpwm_if #(
  parameter int RATIO_PCT = 100
) (
  input  logic [30:0] therm,
  input  logic        fire_en,
  input  logic [2:0]  trim,
  output real         pulse_w,
  output logic        fired_max
);
  real t_fire;
  int  n;
  always_comb begin
    n = $countones(therm);
    t_fire = 1.9 * real'(RATIO_PCT) / 100.0 * 8.0 / (8.0 + real'(trim));
    fired_max = fire_en && (t_fire <= 2.0);
    if (!fire_en)          pulse_w = 0.0;
    else if (t_fire <= 2.0) pulse_w = real'(n);
    else                   pulse_w = real'(n) * 2.0 / t_fire;
  end
endmodule
