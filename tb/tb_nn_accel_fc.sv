// Fully connected network on the accelerator at its default size: a
// 48 -> 32 layer and a 32 -> 16 layer, both larger than the 16 x 16 array.
// Each layer is cut into 16 x 16 sub-matrices stored at successive PE SRAM
// addresses (48 -> 32: addresses 0..5, 32 -> 16: addresses 6..7). Sub-
// matrices in the same output slice add up in the partial sums (one MUL
// starting a new sum, the others adding to it). Different output slices
// leave their results in different column registers. The inner MULs run in
// a hardware loop whose end instruction steps the SRAM address and the
// register offset. LDA turns the first layer's outputs into the second
// layer's inputs.
// All weights are random signed 9-bit values and arrive through RCV/SRW;
// the inputs are random signed 9-bit values. The SND outputs are compared
// with a reference built from the number formats (digital column sums, the
// cyclic accumulator recurrence, DDIG + 8*DANA >>> 3, partial sums, ReLU
// with shift and 9-bit saturation). The layer sizes are this testbench's
// choice.
module tb_nn_accel_fc;
  import mpe_pkg::*;
  import tl_pkg::*;
  localparam int R = 16, C = 16, SH = 2;
  logic clk = 0, rst_n = 0;
  logic prg_en = 0, prg_we = 0, run = 0, bus_inst_ready, busy;
  logic [8:0] prg_addr = 0, pc;
  logic [15:0] prg_data = 0;
  logic [R-1:0] bus_in;
  logic [C-1:0] bus_out;
  int checks = 0, failures = 0;

  nn_accel dut (.clk, .rst_n, .prg_en, .prg_we, .prg_addr, .prg_data, .run, .inst_src(1'b0),
                .bus_inst(16'h0), .bus_inst_valid(1'b0), .bus_inst_ready, .bus_in, .bus_out, .pc, .busy);

  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // serial streams
  typedef logic [8:0] vec_t [16];
  vec_t rcv_q [$];
  vec_t snd_q [$];
  vec_t cur_in, snd_sh;
  wire tl_exec = (2'(dut.u_tl.st) == 2'd3);
  always_comb begin
    cur_in = (rcv_q.size() > 0) ? rcv_q[0] : '{default: '0};
    for (int i = 0; i < 16; i++)
      bus_in[i] = (tl_exec && dut.u_tl.op == OP_RCV) ? cur_in[i][8 - int'(dut.u_tl.stc)] : 1'b0;
  end
  int n_mul = 0, n_acc = 0;
  always @(posedge clk) if (tl_exec) begin
    if (dut.u_tl.op == OP_RCV && dut.u_tl.last) void'(rcv_q.pop_front());
    if (dut.u_tl.op == OP_SND) begin
      for (int i = 0; i < 16; i++) snd_sh[i] = {snd_sh[i][7:0], bus_out[i]};
      if (dut.u_tl.last) snd_q.push_back(snd_sh);
    end
    if (dut.u_tl.op == OP_MUL && dut.u_tl.last) begin n_mul++; if (!dut.u_tl.arg[2]) n_acc++; end
  end

  // reference: one 16 x 16 sub-matrix MAC with 9-bit weights
  logic [8:0] w [8][R][C];
  function automatic int ref_mac(int a, int c, int xs [R]);
    int dd, d, rr;
    dd = 0; d = 0; rr = 0;
    for (int k = 0; k < 8; k++) begin
      int ch, an, v, q;
      ch = 0; an = 0;
      for (int r = 0; r < R; r++) begin
        int sg;
        sg = w[a][r][c][8] ? -1 : 1;
        if (w[a][r][c][7 - k]) begin ch += sg * (xs[r] >>> 5); an += sg * (xs[r] & 31); end
      end
      v = (k == 0) ? an : an + 2 * rr;
      q = (v >= 512) ? 3 : (v >= 0) ? 1 : (v >= -512) ? -1 : -3;
      rr = v - 256 * q;
      d = 2 * d + q;
      dd = 2 * dd + ch;
    end
    d = (d > 511) ? 511 : (d < -512) ? -512 : d;
    return (dd + 8 * d) >>> 3;
  endfunction
  function automatic int atv(int p);
    int v;
    if (p < 0) return 0;
    v = p >>> SH;
    return (v > 255) ? 255 : v;
  endfunction

  logic [15:0] prog [$];
  task automatic emit(opcode_e op, int arg); prog.push_back(inst(op, 11'(arg))); endtask

  int x [3][R], h [2][R], y [R];
  initial begin
    vec_t v;
    for (int a = 0; a < 8; a++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) w[a][r][c] = 9'($urandom);
    for (int s = 0; s < 3; s++)
      for (int r = 0; r < R; r++) x[s][r] = $urandom_range(0, 511) - 256;

    emit(OP_ERA, 0); emit(OP_CFD, 1); emit(OP_CFC, 32); emit(OP_SSB, 'h98);
    for (int a = 0; a < 8; a++) begin
      emit(OP_SSA, a);
      for (int r = 0; r < R; r++) begin
        emit(OP_SFT, r); emit(OP_RCV, 4 | 0); emit(OP_SRW, 0);
        for (int c = 0; c < C; c++) v[c] = w[a][r][c];
        rcv_q.push_back(v);
      end
    end
    for (int s = 0; s < 3; s++) begin                 // row regs 0..2 <- input slices
      emit(OP_RCV, s);
      for (int r = 0; r < R; r++) v[r] = 9'(x[s][r]);
      rcv_q.push_back(v);
    end
    // layer 1: output slice j uses addresses 3j..3j+2 and row regs 0..2
    emit(OP_SSA, 0);
    for (int j = 0; j < 2; j++) begin
      emit(OP_MUL, 4 | 0);                            // new partial sum, row reg 0
      emit(OP_LPS, (1 << 3) | 1); emit(OP_LPE, 8 | 32 | 1);      // address+1, offset 1
      emit(OP_LPS, (2 << 3) | 0); emit(OP_MUL, 0); emit(OP_LPE, 8 | 32 | 0);
      emit(OP_ATV, (SH << 2) | ((j + 1) & 3));        // offset 3: col reg j
      emit(OP_LPS, (1 << 3) | 1); emit(OP_LPE, 32 | 1);          // offset back to 0
    end
    emit(OP_SND, 0); emit(OP_SND, 1);
    // layer 2: inputs are layer 1's outputs, addresses 6..7
    emit(OP_LDA, (0 << 2) | 0); emit(OP_LDA, (1 << 2) | 1);
    emit(OP_SSA, 6); emit(OP_MUL, 4 | 0);
    emit(OP_LPS, (1 << 3) | 1); emit(OP_LPE, 8 | 32 | 1);
    emit(OP_MUL, 0);
    emit(OP_ATV, (SH << 2) | 1);                      // offset 1: col reg 2
    emit(OP_SND, 1);
    emit(OP_JMP, prog.size());                        // park
    chk(prog.size() <= 512, $sformatf("program fits the instruction SRAM (%0d words)", prog.size()));

    #12 rst_n = 1;
    prg_en = 1;
    foreach (prog[i]) begin @(negedge clk); prg_we = 1; prg_addr = 9'(i); prg_data = prog[i]; end
    @(negedge clk); prg_we = 0; prg_en = 0;
    @(negedge clk); run = 1;
    while (!(tl_exec && pc == 9'(prog.size() - 1))) @(negedge clk);

    for (int j = 0; j < 2; j++)
      for (int c = 0; c < C; c++)
        h[j][c] = atv(ref_mac(3 * j, c, x[0]) + ref_mac(3 * j + 1, c, x[1]) + ref_mac(3 * j + 2, c, x[2]));
    for (int c = 0; c < C; c++) y[c] = atv(ref_mac(6, c, h[0]) + ref_mac(7, c, h[1]));
    begin
      int mid;
      mid = 0;
      for (int c = 0; c < C; c++) begin
        if (h[0][c] > 0 && h[0][c] < 255) mid++;
        if (h[1][c] > 0 && h[1][c] < 255) mid++;
        if (y[c] > 0 && y[c] < 255) mid++;
      end
      chk(mid >= 12, $sformatf("outputs are neither all cut off nor all saturated (%0d)", mid));
    end
    chk(snd_q.size() == 3, $sformatf("three output vectors (%0d)", snd_q.size()));
    chk(n_mul == 8 && n_acc == 5, $sformatf("MULs %0d, accumulating %0d", n_mul, n_acc));
    if (snd_q.size() == 3)
      for (int c = 0; c < C; c++) begin
        chk(snd_q[0][c] == 9'(h[0][c]), $sformatf("layer 1 out %0d: got %0d exp %0d", c, snd_q[0][c], h[0][c]));
        chk(snd_q[1][c] == 9'(h[1][c]), $sformatf("layer 1 out %0d: got %0d exp %0d", 16 + c, snd_q[1][c], h[1][c]));
        chk(snd_q[2][c] == 9'(y[c]), $sformatf("layer 2 out %0d: got %0d exp %0d", c, snd_q[2][c], y[c]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
