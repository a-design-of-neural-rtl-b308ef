// Instruction set of the test logic. An instruction is 16 bits:
// [15:11] opcode, [10:0] operand. The 21 instructions and their purposes
// follow the prototype's instruction set; the binary encoding and operand
// layout are this design's own.
//
//  SSA  [6:0] MPE SRAM address
//  ERA  erase all 128 words of every MPE SRAM (128 cycles)
//  CFD  [0]=1: run DPWM firing calibration and wait for it
//  CFC  [5:0] CMU capacitor-bank code
//  UPD  [10]=0: write calibration registers of the selected row from column
//              register [1:0];  [10]=1: one gradient-descent step, inputs
//              from row register [1:0], error = DOUT - sum(inputs) per column
//  SFT  [3:0] select MPE row for SRAM / calibration access
//  SSB  [3:0] bit position of the weight's sign, [7:4] weight width 1..9
//  SRR  read the selected row's word at the SRAM address into col reg [1:0]
//  SRW  write col reg [1:0] into the selected row's word at the SRAM address
//  RCV  shift 9 bits, MSB first, from each bus_in line into row reg [1:0]
//       ([2]=0) or, line i to column i, into col reg [1:0] ([2]=1)
//  SND  shift col reg [1:0] out, MSB first, on the bus_out lines (9 cycles)
//  MUL  MAC with row reg [1:0] as inputs; [2]=1 starts a new partial sum,
//       else the result is added to it (9 cycles)
//  ADD  col reg [1:0] := sat9(col reg [3:2] + col reg [5:4])
//  ATV  col reg [1:0] := sat9(ReLU(partial sum) >>> [5:2])
//  LDA  row reg [3:2] := col reg [1:0] (a layer's outputs become inputs)
//  MXP  col reg [1:0] := max(col reg [1:0], col reg [3:2])
//  LPS  [2:0] loop index, [10:3] iteration count; loop body starts next
//  LPE  [2:0] loop index; [3] SRAM address +1, [4] sign bit position -width,
//       [5] register offset +1, applied each time; jumps back while
//       iterations remain
//  CNT  [7:0] hold the state counter for that many cycles
//  JMP  [8:0] jump to instruction address
//  SFS  [2:0] select the control-signal set shown on bus_out (0: data)
package tl_pkg;
  typedef enum logic [4:0] {
    OP_NOP = 5'd0,  OP_SSA = 5'd1,  OP_ERA = 5'd2,  OP_CFD = 5'd3,  OP_CFC = 5'd4,
    OP_UPD = 5'd5,  OP_SFT = 5'd6,  OP_SSB = 5'd7,  OP_SRR = 5'd8,  OP_SRW = 5'd9,
    OP_RCV = 5'd10, OP_SND = 5'd11, OP_MUL = 5'd12, OP_ADD = 5'd13, OP_ATV = 5'd14,
    OP_LDA = 5'd15, OP_MXP = 5'd16, OP_LPS = 5'd17, OP_LPE = 5'd18, OP_CNT = 5'd19,
    OP_JMP = 5'd20, OP_SFS = 5'd21
  } opcode_e;

  function automatic logic [15:0] inst(opcode_e op, logic [10:0] arg);
    return {op, arg};
  endfunction
endpackage
