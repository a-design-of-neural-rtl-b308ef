// Behavioural model (not synthesizable logic): the MPE's 5-bit programmable
// current source and its switches onto the column bit-line pair.
//
// The source is a current DAC: a fixed 300 nA plus 31 equal steps up to
// 900 nA, selected by the upper 5 bits of the MPE calibration register. While
// the WL pulse pair is open (pulse_w time units) and the WL logic enables the
// source, the current discharges one line of the pair; wl_pol chooses the
// line (0: BLn, raising the differential V_BL = V_BLp - V_BLn; 1: BLp).
// With en_dac low the source is off.
//
// Charge is given in normalised units: code 16 (the reset value of the
// calibration register) and GAIN_PPM = 0 deliver exactly 1.0 per time unit,
// so an ideal array produces integer bit-line values. GAIN_PPM models the
// process-variation gain error of this instance (it is what calibration
// removes). The model is combinational: the outputs are the charge moved in
// the current control cycle.
module mpe_isrc #(
  parameter int          I_MIN_NA  = 300,
  parameter int          I_SPAN_NA = 600,
  parameter int          GAIN_PPM  = 0
) (
  input  logic       en_dac,
  input  logic       wl_en,
  input  logic       wl_pol,
  input  logic [4:0] code,
  input  real        pulse_w,   // WL pulse width, in DPWM time units
  output real        q_p,       // charge removed from BLp
  output real        q_n        // charge removed from BLn
);
  real i_na, i_ref, q;

  always_comb begin
    i_na  = real'(I_MIN_NA) + real'(I_SPAN_NA) * real'(code) / 31.0;
    i_ref = real'(I_MIN_NA) + real'(I_SPAN_NA) * 16.0 / 31.0;
    q     = (en_dac && wl_en) ? pulse_w * (i_na / i_ref) * (1.0 + real'(GAIN_PPM) / 1.0e6) : 0.0;
    q_p   = wl_pol ? q : 0.0;
    q_n   = wl_pol ? 0.0 : q;
  end
endmodule
