// Shared types and constants of the mixed-signal PE array accelerator.
//
// Number formats: an activation is signed 9-bit two's complement, split into a
// signed upper 4-bit part (computed digitally on the MSB-lines) and an unsigned
// lower 5-bit part (converted to a pulse width and computed in the analog
// domain): x = 32*x_hi + x_lo. A weight is sign-magnitude: one sign bit and up
// to eight magnitude bits stored MSB-aligned in a 9-bit SRAM word.
//
// core_ctrl_t is the per-cycle control bundle the test logic sends to the
// computation core; its encoding is this implementation's own.
package mpe_pkg;

  localparam int unsigned ROWS_DEF   = 16;   // MPE rows (array inputs)
  localparam int unsigned COLS_DEF   = 16;   // MPE columns (array outputs)
  localparam int unsigned ADDR_W     = 7;    // MPE SRAM address width (128 words)
  localparam int unsigned WORD_W     = 9;    // MPE SRAM word width (one weight)
  localparam int unsigned DATA_W     = 9;    // activation width
  localparam int unsigned HI_W       = 4;    // digital part of an activation
  localparam int unsigned LO_W       = 5;    // analog part of an activation
  localparam int unsigned DL_W       = 9;    // data-line width
  localparam int unsigned CAL_W      = 8;    // calibration register width
  localparam int unsigned DANA_W     = 10;   // CMU result
  localparam int unsigned DDIG_W     = 16;   // digital shift-and-add result
  localparam int unsigned DMAC_W     = 17;   // combined result
  localparam int unsigned DOUT_W     = 14;   // final output
  localparam int unsigned PSUM_W     = 16;   // partial-sum register in the LM
  localparam int unsigned NCYC       = 8;    // cyclic MAC cycles per MAC
  localparam int unsigned CB_W       = 6;    // CMU capacitor bank code (63 levels)

  // Analog scale used by the behavioural models, in units of one input LSB
  // times one unit current pulse. V_M (maximum accumulator voltage) = 1024.
  localparam int          VM         = 1024;

  typedef enum logic [2:0] {
    CM_IDLE  = 3'd0,  // nothing
    CM_MAC   = 3'd1,  // bit-serial multiply-accumulate
    CM_WRITE = 3'd2,  // write weight word of the selected row at sram_addr
    CM_READ  = 3'd3,  // read weight word of the selected row onto the DLs
    CM_ERASE = 3'd4,  // clear the word at sram_addr in every MPE
    CM_CALW  = 3'd5,  // write calibration register of the selected row
    CM_CALG  = 3'd6   // gradient-descent update of every calibration register
  } core_mode_e;

  typedef struct packed {
    core_mode_e         mode;
    logic [ADDR_W-1:0]  sram_addr;
    logic [3:0]         bit_pos;    // SRAM word bit selected by the 9:1 mux
    logic [3:0]         sign_pos;   // SRAM word bit holding the weight's sign
    logic               sign_ld;    // load the sign register (first MAC cycle)
    logic               mac_en;     // current weight bit takes part this cycle
    logic               force_one;  // binary (1-bit signed) weight: magnitude 1
    logic [3:0]         row_sel;    // row for weight / calibration access
    logic               mac_clr;    // clear CMU/LM shift registers; with mac_step:
                                    // first MAC cycle, start from this cycle's value
    logic               mac_step;   // one cyclic-MAC cycle (CMU + LM shift-and-add)
    logic               mac_first;  // first of the eight cycles (CMU phases 1-2)
    logic               mac_fin;    // ninth cycle: LM combines DDIG and DANA
    logic               psum_load;  // LM: partial sum := DOUT (else += DOUT)
    logic               bl_prch;    // bit-line precharge
    logic [CB_W-1:0]    cb_code;    // CMU capacitor bank setting
    logic               dpwm_en;    // DPWMs fire pulses this cycle
    logic               dpwm_cal;   // DPWM firing calibration request
  } core_ctrl_t;

  // saturate a signed value to a signed n-bit range
  function automatic logic signed [31:0] sat_s(input logic signed [31:0] v, input int unsigned n);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (n - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (n - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
