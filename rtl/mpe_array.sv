// Array of ROWS x COLS mixed-signal processing elements.
//
// Rows share an MSB-line (ML, the digital 4-bit input or a row select) and a
// word-line pulse (its width from the row's DPWM). Columns share a data-line
// (DL) adder chain, running from the top MPE (input 0) to the bottom where
// the LM reads the sum, a write bus from the LM, and a bit-line pair whose
// discharge is the sum of the charges steered by the column's current
// sources (mpe_isrc). All MPEs see the same SRAM address and bit select, so
// the array acts as 1152 stacked 16x16 weight-bit matrices, one of which is
// active in a cycle.
// VAR_SEED = 0 gives ideal current sources; any other value gives each
// source a fixed pseudo-random gain error of up to +/-20 %, for exercising
// calibration. Control is shown here as a broadcast; in silicon it is
// repeated MPE to MPE along daisy chains. Combinational except for the
// MPEs' registers.
module mpe_array
  import mpe_pkg::*;
#(
  parameter int unsigned ROWS     = ROWS_DEF,
  parameter int unsigned COLS     = COLS_DEF,
  parameter int unsigned VAR_SEED = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  core_ctrl_t               ctrl,
  input  logic        [HI_W-1:0]   ml      [ROWS],
  input  real                      pulse_w [ROWS],
  input  logic        [WORD_W-1:0] col_wr  [COLS],
  output logic signed [DL_W-1:0]   dl_bot  [COLS],
  output real                      bl_q_p  [COLS],
  output real                      bl_q_n  [COLS],
  output logic        [4:0]        isrc_code [ROWS][COLS]
);
  real q_p [ROWS][COLS];
  real q_n [ROWS][COLS];

  function automatic int gain_ppm(int r, int c);
    if (VAR_SEED == 0) return 0;
    return ((((r * 37 + c * 101 + int'(VAR_SEED) * 53) * 7919) % 401) - 200) * 1000;
  endfunction

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      logic wl_en, wl_pol, en_dac;
      logic signed [DL_W-1:0] dl_i, dl_o;
      if (r == 0) begin : g_top
        assign dl_i = '0;
      end else begin : g_chain
        assign dl_i = g_row[r-1].dl_o;
      end
      mpe u_mpe (
        .clk, .rst_n, .ctrl,
        .ml       (ml[r]),
        .dl_in    (dl_i),
        .dl_out   (dl_o),
        .col_wr   (col_wr[c]),
        .wl_en, .wl_pol, .en_dac,
        .isrc_code(isrc_code[r][c])
      );
      mpe_isrc #(.GAIN_PPM(gain_ppm(r, c))) u_isrc (
        .en_dac, .wl_en, .wl_pol,
        .code   (isrc_code[r][c]),
        .pulse_w(pulse_w[r]),
        .q_p    (q_p[r][c]),
        .q_n    (q_n[r][c])
      );
    end
    assign dl_bot[c] = g_row[ROWS-1].dl_o;
  end

  // bit-line pairs: the charges of a column add up on its lines
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      bl_q_p[c] = 0.0;
      bl_q_n[c] = 0.0;
      for (int r = 0; r < ROWS; r++) begin
        bl_q_p[c] = bl_q_p[c] + q_p[r][c];
        bl_q_n[c] = bl_q_n[c] + q_n[r][c];
      end
    end
  end
endmodule
