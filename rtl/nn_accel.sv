// Mixed-signal neural-network accelerator: top level.
//
// A 16 x 16 array of mixed-signal processing elements computes 16 weighted
// sums of 16 signed 9-bit activations per MAC, with sign-magnitude weights
// of 1 to 9 bits processed bit-serially from per-PE weight SRAMs. The upper
// 4 bits of each activation are multiplied and summed digitally along
// column adder chains; the lower 5 bits become word-line pulse widths that
// gate per-PE current sources onto column bit lines, and a cyclic MAC unit
// per column converts that analog sum two bits per cycle while keeping the
// residue in the analog domain. A logic module per column merges both parts
// into a signed 14-bit result. The on-chip test logic executes a 21-opcode
// instruction set (tl_pkg) that sequences MACs, weight and calibration
// access, activation functions, pooling, loops and debugging.
//
// Interface: the programming port fills the instruction SRAM while prg_en is
// high; with run high the test logic executes from the SRAM (inst_src = 0)
// or from bus_inst (inst_src = 1, valid/ready). Data enter on one serial line
// per row (bus_in, RCV) and leave on one per column (bus_out, SND; outside
// SND bus_out shows the control signals chosen with SFS).
// VAR_SEED = 0 gives ideal analog models; other values add per-instance
// current-source gain and DPWM timing errors.
module nn_accel
  import mpe_pkg::*;
#(
  parameter int unsigned ROWS       = ROWS_DEF,
  parameter int unsigned COLS       = COLS_DEF,
  parameter int unsigned IMEM_DEPTH = 512,
  parameter int unsigned VAR_SEED   = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prg_en,
  input  logic                          prg_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prg_addr,
  input  logic [15:0]                   prg_data,
  input  logic                          run,
  input  logic                          inst_src,
  input  logic [15:0]                   bus_inst,
  input  logic                          bus_inst_valid,
  output logic                          bus_inst_ready,
  input  logic [ROWS-1:0]               bus_in,
  output logic [COLS-1:0]               bus_out,
  output logic [$clog2(IMEM_DEPTH)-1:0] pc,
  output logic                          busy
);
  core_ctrl_t               ctrl;
  logic signed [DATA_W-1:0] x       [ROWS];
  logic        [WORD_W-1:0] wr_data [COLS];
  logic signed [DOUT_W-1:0] dout    [COLS];
  logic signed [PSUM_W-1:0] psum    [COLS];
  logic        [WORD_W-1:0] rdata   [COLS];
  logic signed [DANA_W-1:0] dana    [COLS];
  logic signed [DDIG_W-1:0] ddig    [COLS];
  logic        [4:0]        isrc_code [ROWS][COLS];
  logic                     dpwm_cal_busy;
  logic        [ROWS-1:0]   dpwm_cal_fail;

  test_logic #(.ROWS(ROWS), .COLS(COLS), .IMEM_DEPTH(IMEM_DEPTH)) u_tl (
    .clk, .rst_n, .prg_en, .prg_we, .prg_addr, .prg_data, .run, .inst_src,
    .bus_inst, .bus_inst_valid, .bus_inst_ready, .bus_in, .bus_out,
    .ctrl, .x_out(x), .wr_data, .dout, .psum, .rdata, .dpwm_cal_busy, .pc, .busy
  );

  compute_core #(.ROWS(ROWS), .COLS(COLS), .VAR_SEED(VAR_SEED)) u_core (
    .clk, .rst_n, .ctrl, .x_in(x), .wr_data, .dout, .psum, .rdata, .dana, .ddig,
    .isrc_code, .dpwm_cal_busy, .dpwm_cal_fail
  );
endmodule
