// Calibration scenario on the whole accelerator with process variation
// enabled (every MPE current source gets a fixed gain error of up to
// +/-20 %). All weights are 255 (+0_1111_1111); each epoch receives 16
// pseudo-random unsigned 4-bit inputs, runs one MAC and one gradient step
// (UPD), 300 epochs in two nested hardware loops (the loop counter is 8
// bits, so 2 x 150). Inputs are 4 bits, as for the on-chip PRBS source the
// scheme calls for; they reach the chip through RCV. The column error DOUT - sum(x) is sampled
// every epoch; the mean absolute error of the last epochs must be well
// below that of the first ones, and the calibration codes must have moved.
module tb_nn_accel_cal;
  import mpe_pkg::*;
  import tl_pkg::*;
  localparam int R = 16, C = 16, EPOCHS = 300;
  logic clk = 0, rst_n = 0;
  logic prg_en = 0, prg_we = 0, run = 0, inst_src = 0, bus_inst_ready, busy;
  logic [8:0] prg_addr = 0, pc;
  logic [15:0] prg_data = 0;
  logic [R-1:0] bus_in;
  logic [C-1:0] bus_out;
  int checks = 0, failures = 0;

  nn_accel #(.VAR_SEED(3)) dut (.clk, .rst_n, .prg_en, .prg_we, .prg_addr, .prg_data, .run,
    .inst_src, .bus_inst(16'h0), .bus_inst_valid(1'b0), .bus_inst_ready, .bus_in, .bus_out, .pc, .busy);

  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // input stream: a 16-bit LFSR gives the 4-bit inputs; the first vector
  // (weights, column registers) is all 255
  logic [15:0] lfsr = 16'hace1;
  logic [8:0] cur [16];
  int nrcv = 0;
  wire tl_exec = (2'(dut.u_tl.st) == 2'd3);
  always_comb for (int i = 0; i < 16; i++)
    bus_in[i] = (tl_exec && dut.u_tl.op == OP_RCV) ? cur[i][8 - int'(dut.u_tl.stc)] : 1'b0;
  always @(posedge clk) if (tl_exec && dut.u_tl.op == OP_RCV && dut.u_tl.last) begin
    nrcv++;
    for (int i = 0; i < 16; i++) begin
      lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      cur[i] = {5'b0, lfsr[3:0]};
    end
  end

  // error per epoch, sampled at the gradient step
  real err_ep [EPOCHS];
  int  ep = 0;
  always @(posedge clk) if (tl_exec && dut.u_tl.op == OP_UPD && ep < EPOCHS) begin
    real s;
    s = 0.0;
    for (int c = 0; c < C; c++) s += (dut.u_tl.err[c] < 0) ? -real'(dut.u_tl.err[c]) : real'(dut.u_tl.err[c]);
    err_ep[ep] = s / C;
    ep++;
  end

  logic [15:0] prog [$];
  task automatic emit(opcode_e op, int arg); prog.push_back(inst(op, 11'(arg))); endtask
  initial begin
    real first, lastm;
    int moved;
    for (int i = 0; i < 16; i++) cur[i] = 9'h0ff;
    emit(OP_ERA, 0); emit(OP_SSA, 0); emit(OP_SSB, 'h98);
    emit(OP_RCV, 4 | 0);                                 // col reg 0 <- 255
    for (int r = 0; r < R; r++) begin emit(OP_SFT, r); emit(OP_SRW, 0); end
    emit(OP_LPS, (2 << 3) | 1);                          // 2 x 150 epochs: the loop
    emit(OP_LPS, ((EPOCHS / 2) << 3) | 0);               // count is 8 bits wide
    emit(OP_RCV, 0); emit(OP_MUL, 4); emit(OP_UPD, 'h400);
    emit(OP_LPE, 0);
    emit(OP_LPE, 1);
    emit(OP_JMP, prog.size());
    #12 rst_n = 1;
    prg_en = 1;
    foreach (prog[i]) begin @(negedge clk); prg_we = 1; prg_addr = 9'(i); prg_data = prog[i]; end
    @(negedge clk); prg_we = 0; prg_en = 0;
    @(negedge clk); run = 1;
    while (!(tl_exec && pc == 9'(prog.size() - 1))) @(negedge clk);
    first = 0.0; lastm = 0.0;
    for (int i = 0; i < 20; i++) begin first += err_ep[i] / 20.0; lastm += err_ep[EPOCHS - 20 + i] / 20.0; end
    moved = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) if (dut.isrc_code[r][c] != 5'd16) moved++;
    $display("epochs %0d: mean |error| first 20 = %f, last 20 = %f, codes moved %0d", ep, first, lastm, moved);
    chk(ep == EPOCHS, "all epochs ran");
    chk(first > 2.0, "variation causes errors before calibration");
    chk(lastm < 0.6 * first, "calibration reduces the error");
    chk(lastm < 2.5, "calibrated error within a few LSBs");
    chk(moved > 128, "calibration codes moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
