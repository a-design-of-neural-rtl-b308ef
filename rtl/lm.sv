// Logic module (LM) at the bottom of each column.
//
// Digital shift-and-add: during each of the eight MAC cycles the LM takes
// the column's data-line sum (the signed sum of +/-x_hi over the rows whose
// current weight bit is 1) and forms DDIG := 2*DDIG + sum (signed 16-bit).
// In the final cycle (mac_fin) it combines this with the CMU's analog result:
// DMAC = DDIG + 8*DANA (signed 17-bit) and DOUT = DMAC >>> 3 (signed 14-bit),
// which equals sum(w*x)/256 for a full 8-bit weight magnitude.
// DOUT also goes into a signed 16-bit partial-sum register (loaded with
// psum_load, otherwise added, saturating) used to sum the results of several
// 16x16 sub-matrices of a larger layer before activation.
// Weight access: the LM drives the column write bus (weights and
// calibration data going up the data lines) and captures a word read out of
// the selected MPE into rdata.
// Timing: all registers update on the rising edge; dout/psum are valid the
// cycle after mac_fin. The arithmetic follows the document; the partial-sum
// saturation and the read register are this design's choices.
module lm
  import mpe_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  core_ctrl_t               ctrl,
  input  logic signed [DL_W-1:0]   dl_bot,   // bottom of the column DL chain
  input  logic signed [DANA_W-1:0] dana,     // CMU result
  input  logic        [WORD_W-1:0] wr_data,  // word to send up the column
  output logic        [WORD_W-1:0] col_wr,   // column write bus
  output logic        [WORD_W-1:0] rdata,    // last word read from the column
  output logic signed [DDIG_W-1:0] ddig,
  output logic signed [DOUT_W-1:0] dout,
  output logic signed [PSUM_W-1:0] psum
);
  logic signed [DMAC_W-1:0] dmac;
  logic signed [PSUM_W:0]   psum_n;

  assign col_wr = wr_data;
  assign dmac   = DMAC_W'(ddig) + (DMAC_W'(dana) <<< 3);
  assign psum_n = ctrl.psum_load ? (PSUM_W+1)'(dmac >>> 3)
                                 : (PSUM_W+1)'(psum) + (PSUM_W+1)'(dmac >>> 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ddig <= '0; dout <= '0; psum <= '0; rdata <= '0;
    end else begin
      if (ctrl.mode == CM_READ) rdata <= WORD_W'(dl_bot);
      if (ctrl.mac_step)
        ddig <= (ctrl.mac_clr ? '0 : ddig <<< 1) + DDIG_W'(dl_bot);
      else if (ctrl.mac_clr)
        ddig <= '0;
      if (ctrl.mac_fin) begin
        dout <= DOUT_W'(dmac >>> 3);
        if      (psum_n > (PSUM_W+1)'(32767))  psum <= 16'sh7fff;
        else if (psum_n < -(PSUM_W+1)'(32768)) psum <= 16'sh8000;
        else                                   psum <= psum_n[PSUM_W-1:0];
      end
    end
  end
endmodule
