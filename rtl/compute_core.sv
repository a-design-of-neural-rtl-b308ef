// Computation core of the mixed-signal accelerator.
//
// Left side: per row, a digital input driver splits the signed 9-bit
// activation into the digital x_hi (MSB-line) and the analog x_lo, and a
// DPWM (control logic dpwm + I&F pair dpwm_if) turns x_lo into a word-line
// pulse of x_lo time units. Centre: the ROWS x COLS MPE array. Bottom: per
// column, a cyclic MAC unit (analog part cmu_analog + accumulation logic
// cmu_acc) produces DANA from the bit-line voltages, and a logic module (lm)
// forms DDIG from the data-line sums and combines both into DOUT.
//
// One MAC (driven cycle by cycle through ctrl by the test logic):
//   8 MAC cycles : mac_step, bit_pos walking down the magnitude bits
//                  (mac_en low once the weight's bits are exhausted; the
//                  CMU and LM keep shifting so the output scale is fixed);
//                  the first also loads the sign register (sign_ld, bit
//                  sign_pos) and restarts the CMU and LM (mac_clr, mac_first)
//   ninth cycle  : mac_fin, DOUT = (DDIG + 8*DANA) >>> 3
// DOUT ~= sum_r(w_r,c * x_r) / 256 with w as a sign-magnitude value whose
// magnitude bits are MSB-aligned in the 8-bit magnitude field.
// VAR_SEED = 0 makes all analog models ideal; otherwise current sources get
// gain errors and DPWM cells ratio errors (70 %..140 %).
module compute_core
  import mpe_pkg::*;
#(
  parameter int unsigned ROWS     = ROWS_DEF,
  parameter int unsigned COLS     = COLS_DEF,
  parameter int unsigned VAR_SEED = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  core_ctrl_t                ctrl,
  input  logic signed [DATA_W-1:0]  x_in    [ROWS],  // activations
  input  logic        [WORD_W-1:0]  wr_data [COLS],  // weight / calibration / error
  output logic signed [DOUT_W-1:0]  dout    [COLS],
  output logic signed [PSUM_W-1:0]  psum    [COLS],
  output logic        [WORD_W-1:0]  rdata   [COLS],
  output logic signed [DANA_W-1:0]  dana    [COLS],
  output logic signed [DDIG_W-1:0]  ddig    [COLS],
  output logic        [4:0]         isrc_code [ROWS][COLS],
  output logic                      dpwm_cal_busy,
  output logic        [ROWS-1:0]    dpwm_cal_fail
);
  logic [HI_W-1:0]        ml      [ROWS];
  real                    pulse_w [ROWS];
  logic [WORD_W-1:0]      col_wr  [COLS];
  logic signed [DL_W-1:0] dl_bot  [COLS];
  real                    bl_q_p  [COLS];
  real                    bl_q_n  [COLS];
  logic [ROWS-1:0]        cal_busy_r;

  function automatic int ratio_pct(int r);
    if (VAR_SEED == 0) return 100;
    return 70 + (((r * 29 + int'(VAR_SEED) * 13) * 7919) % 71);
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [LO_W-1:0] x_lo;
    logic [30:0]     therm;
    logic            fire_en, fired_max, cal_test, cal_done;
    logic [2:0]      trim;
    input_driver #(.ROW(r)) u_drv (.ctrl, .x(x_in[r]), .ml(ml[r]), .x_lo);
    dpwm u_dpwm (
      .clk, .rst_n, .code(x_lo), .en(ctrl.dpwm_en), .cal_req(ctrl.dpwm_cal),
      .fired_max, .therm, .fire_en, .cal_test, .trim,
      .cal_busy(cal_busy_r[r]), .cal_done, .cal_fail(dpwm_cal_fail[r])
    );
    dpwm_if #(.RATIO_PCT(ratio_pct(r))) u_if (
      .therm, .fire_en, .trim, .pulse_w(pulse_w[r]), .fired_max
    );
  end
  assign dpwm_cal_busy = |cal_busy_r;

  mpe_array #(.ROWS(ROWS), .COLS(COLS), .VAR_SEED(VAR_SEED)) u_array (
    .clk, .rst_n, .ctrl, .ml, .pulse_w, .col_wr, .dl_bot, .bl_q_p, .bl_q_n, .isrc_code
  );

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic signed [2:0] qtzd;
    real               v_out;
    cmu_analog u_cmu (
      .clk, .rst_n, .q_p(bl_q_p[c]), .q_n(bl_q_n[c]), .bl_prch(ctrl.bl_prch),
      .cb_code(ctrl.cb_code), .mac_clr(ctrl.mac_clr), .mac_step(ctrl.mac_step),
      .mac_first(ctrl.mac_first), .qtzd, .v_out
    );
    cmu_acc u_acc (
      .clk, .rst_n, .mac_clr(ctrl.mac_clr), .mac_step(ctrl.mac_step), .qtzd, .dana(dana[c])
    );
    lm u_lm (
      .clk, .rst_n, .ctrl, .dl_bot(dl_bot[c]), .dana(dana[c]), .wr_data(wr_data[c]),
      .col_wr(col_wr[c]), .rdata(rdata[c]), .ddig(ddig[c]), .dout(dout[c]), .psum(psum[c])
    );
  end
endmodule
