// Digital input driver of one array row.
//
// In a MAC it splits the row's signed 9-bit activation x into the signed
// upper 4 bits x_hi = x[8:5], driven on the row's MSB-line (ML) to the
// MPEs' digital adders, and the unsigned lower 5 bits x_lo = x[4:0], sent to
// the row's DPWM (x = 32*x_hi + x_lo). For weight or calibration-register
// access the ML instead carries the row select in ML[0]; for a
// gradient-descent calibration step it carries the row's input clipped to
// 2 bits (min(x, 3), negative inputs as 0).
// The split follows the document; the ML use outside MACs and the clipping
// of negative values are this design's choices. Purely combinational.
module input_driver
  import mpe_pkg::*;
#(
  parameter int unsigned ROW = 0
) (
  input  core_ctrl_t              ctrl,
  input  logic signed [DATA_W-1:0] x,
  output logic [HI_W-1:0]         ml,
  output logic [LO_W-1:0]         x_lo
);
  always_comb begin
    x_lo = '0;
    ml   = '0;
    unique case (ctrl.mode)
      CM_MAC: begin
        ml   = x[DATA_W-1 -: HI_W];
        x_lo = x[LO_W-1:0];
      end
      CM_WRITE, CM_READ, CM_CALW: ml = {3'b000, ctrl.row_sel == 4'(ROW)};
      CM_CALG: ml = {2'b00, (x < 0) ? 2'd0 : (x > 3) ? 2'd3 : x[1:0]};
      default: ;
    endcase
  end
endmodule
