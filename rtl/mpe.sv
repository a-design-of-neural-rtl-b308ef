// Mixed-signal processing element (MPE), digital part.
//
// Each MPE holds a 128 x 9-bit weight SRAM (1152 bits) shared by all weight
// precisions. A 9:1 mux picks one bit of the addressed word each cycle, so a
// multi-bit weight is processed bit-serially, MSB first. In the first MAC
// cycle (sign_ld) the sign bit at sign_pos is used directly and latched into
// the sign register, which supplies it for the remaining seven cycles.
//
// Digital MAC: the MPE adds +/-x_hi (the signed 4-bit activation on its
// MSB-line, negated when the sign register is set) to the data-line value from
// the MPE above when the selected weight bit is 1, and passes the sum down
// (dl_out). The 16 MPEs of a column form a ripple adder chain.
// Analog MAC: the WL logic enables the current source (wl_en) for the
// selected bit and sets its polarity (wl_pol) from the sign register; the
// current source and the bit lines are modelled in mpe_isrc.
// Calibration: an 8-bit register (reset to 8'h80, the mid-scale value) whose
// upper 5 bits set the programmable current source. It can be written
// directly (CM_CALW) or updated in place by one gradient-descent step
// (CM_CALG): grad = min(x * |e|, 7) from a 2-bit clipped input on the ML and a
// sign + 2-bit clipped column error on the write bus; the register moves
// against the sign of the error and saturates at 0 and 255.
// Weight access: in CM_WRITE/CM_READ the row is selected by ML[0]; the column
// write bus carries the word to store, and a read places the word on dl_out.
// CM_ERASE clears the addressed word in every MPE.
//
// Timing: SRAM read is combinational (register-file style), all state
// (SRAM, sign, calibration) updates on the rising clock edge.
// The data-line chain is 9 bits wide so the corner case +128 (16 rows of
// -8 x negative weight) fits; the document states a narrower chain input.
// The structure (SRAM, mux, sign register, DL adder, WL logic, calibration
// register with multiplier and adder) follows the document; control
// encoding, widths of the clipped operands' signs and the read timing are
// this design's choices.
module mpe
  import mpe_pkg::*;
#(
  parameter int unsigned ADDR_BITS = ADDR_W,
  parameter int unsigned WORD_BITS = WORD_W,
  parameter int unsigned DL_BITS   = DL_W,
  parameter int unsigned CAL_BITS  = CAL_W,
  parameter logic [CAL_W-1:0] CAL_INIT = 8'h80
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  core_ctrl_t                  ctrl,
  input  logic        [HI_W-1:0]      ml,       // MSB-line of this row
  input  logic signed [DL_BITS-1:0]   dl_in,    // from the MPE above
  output logic signed [DL_BITS-1:0]   dl_out,   // to the MPE below
  input  logic        [WORD_BITS-1:0] col_wr,   // column write bus (from the LM)
  output logic                        wl_en,    // current source steered to BLs
  output logic                        wl_pol,   // 1: negative bit line
  output logic                        en_dac,   // current DAC enabled
  output logic        [4:0]           isrc_code // programmable current source code
);

  logic [WORD_BITS-1:0] mem [2**ADDR_BITS];
  logic [WORD_BITS-1:0] word;
  logic                 sign_q;
  logic                 sign_w;     // sign in force this cycle
  logic [CAL_BITS-1:0]  cal_q;
  logic                 wbit;
  logic                 row_hit;
  logic signed [DL_BITS-1:0] contrib;

  assign word    = mem[ctrl.sram_addr];
  assign row_hit = ml[0];
  assign wbit    = ctrl.force_one | word[ctrl.bit_pos];
  assign sign_w  = ctrl.sign_ld ? word[ctrl.sign_pos] : sign_q;

  // SRAM
  always_ff @(posedge clk) begin
    if (ctrl.mode == CM_ERASE)
      mem[ctrl.sram_addr] <= '0;
    else if (ctrl.mode == CM_WRITE && row_hit)
      mem[ctrl.sram_addr] <= col_wr;
  end

  // sign register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 sign_q <= 1'b0;
    else if (ctrl.mode == CM_MAC && ctrl.sign_ld) sign_q <= word[ctrl.sign_pos];
  end

  // digital MAC on the data-line chain, and read-out
  always_comb begin
    contrib = '0;
    if (ctrl.mode == CM_MAC && ctrl.mac_en && wbit) begin
      contrib = DL_BITS'(signed'(ml));
      if (sign_w) contrib = -contrib;
    end
    if (ctrl.mode == CM_READ && row_hit) dl_out = DL_BITS'(word);
    else                                 dl_out = dl_in + contrib;
  end

  // WL logic
  assign wl_en  = (ctrl.mode == CM_MAC) && ctrl.mac_en && wbit;
  assign wl_pol = sign_w;
  assign en_dac = (ctrl.mode == CM_MAC);

  // calibration register with in-place gradient step
  logic [1:0] x_c, e_mag;
  logic       e_neg;
  logic [3:0] prod;
  logic [2:0] grad;
  logic [CAL_BITS:0] cal_up;
  logic signed [CAL_BITS+1:0] cal_dn;
  assign x_c   = ml[1:0];
  assign e_mag = col_wr[1:0];
  assign e_neg = col_wr[2];
  assign prod  = x_c * e_mag;
  assign grad  = (prod > 4'd7) ? 3'd7 : prod[2:0];
  assign cal_up = {1'b0, cal_q} + (CAL_BITS+1)'(grad);
  assign cal_dn = signed'({2'b00, cal_q}) - signed'((CAL_BITS+2)'(grad));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cal_q <= CAL_INIT;
    else if (ctrl.mode == CM_CALW && row_hit) cal_q <= col_wr[CAL_BITS-1:0];
    else if (ctrl.mode == CM_CALG) begin
      if (e_neg) cal_q <= cal_up[CAL_BITS] ? '1 : cal_up[CAL_BITS-1:0];
      else       cal_q <= (cal_dn < 0) ? '0 : cal_dn[CAL_BITS-1:0];
    end
  end
  assign isrc_code = cal_q[CAL_BITS-1 -: 5];

endmodule
