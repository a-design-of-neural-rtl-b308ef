// Digital pulse-width modulator (DPWM), control logic.
//
// Converts the unsigned 5-bit analog part of a row's activation (N = 0..31)
// into a 31-bit thermometer code that selects unit capacitors of the
// integrate-and-fire (I&F) pair; a thermometer code keeps the pulse width
// monotonic in N. The I&F pair itself is analog (dpwm_if).
//
// Firing calibration: the I&F capacitance/current ratio can spread from 70 %
// to 140 % of nominal, so with all capacitors selected a slow cell may not
// fire within the two cycles it is given. On cal_req the logic selects all
// capacitors (cal_test), waits two cycles, samples the fire flag and, if it
// did not fire, raises the 3-bit current trim and retries, until the cell
// fires or the trim is at its maximum. A fire seen during the two test
// cycles is latched and evaluated in the third. cal_done pulses for one cycle at the
// end; cal_fail tells that even the maximum trim was not enough.
// The thermometer conversion and the purpose of the calibration follow the
// document; the trim width and the search order are this design's choice.
module dpwm #(
  parameter int unsigned TRIM_W = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        code,      // lower 5 bits of the activation
  input  logic              en,        // generate a pulse this cycle
  input  logic              cal_req,   // start firing calibration
  input  logic              fired_max, // from the I&F pair: max-cap case fired in time
  output logic [30:0]       therm,     // unit capacitor select
  output logic              fire_en,   // I&F pair armed
  output logic              cal_test,  // I&F pair runs the maximum-capacitance test
  output logic [TRIM_W-1:0] trim,      // current trim of the I&F cells
  output logic              cal_busy,
  output logic              cal_done,
  output logic              cal_fail
);
  typedef enum logic [1:0] {S_IDLE, S_T1, S_T2, S_EVAL} cal_st_e;
  cal_st_e st;
  logic    fired_q;   // fire seen during the current test window

  always_comb begin
    for (int i = 0; i < 31; i++) therm[i] = (5'(i) < code);
    if (cal_test) therm = '1;
  end
  assign fire_en  = en | cal_test;
  assign cal_test = (st == S_T1) || (st == S_T2);
  assign cal_busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; trim <= '0; cal_done <= 1'b0; cal_fail <= 1'b0; fired_q <= 1'b0;
    end else begin
      cal_done <= 1'b0;
      if (cal_test && fired_max) fired_q <= 1'b1;
      unique case (st)
        S_IDLE: if (cal_req) begin st <= S_T1; trim <= '0; cal_fail <= 1'b0; fired_q <= 1'b0; end
        S_T1:   st <= S_T2;
        S_T2:   st <= S_EVAL;
        S_EVAL: begin
          if (fired_q) begin
            st <= S_IDLE; cal_done <= 1'b1;
          end else if (trim == '1) begin
            st <= S_IDLE; cal_done <= 1'b1; cal_fail <= 1'b1;
          end else begin
            trim <= trim + 1'b1; st <= S_T1; fired_q <= 1'b0;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
