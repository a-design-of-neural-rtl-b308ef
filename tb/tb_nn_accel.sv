// End-to-end testbench of the accelerator at its default size (16 x 16
// array, 512-word instruction SRAM, ideal analog models). The program is
// written through the programming port and executed from the instruction
// SRAM; a second part is fed through the instruction bus port. It covers:
//   weight loading (ERA, SFT, RCV into column registers, SRW) and read-back
//   (SRR, SND); DPWM firing calibration (CFD) and CMU setup (CFC);
//   a two-sub-matrix layer (MUL with a new partial sum, then MUL adding to
//   it), ReLU with shift (ATV), max-pooling (MXP), moving outputs to inputs
//   (LDA) for a second layer, weights of 4 bits and binary weights (SSB), a
//   loop stepping the SRAM address (LPS/LPE), JMP, CNT, the SFS monitor and
//   a gradient calibration step (UPD).
// Every result leaves through SND and is compared with a reference computed
// here from the number formats alone (digital column sums, the cyclic
// accumulator recurrence, DDIG + 8*DANA >>> 3). Each mechanism is counted;
// one that never happens is a failure.
module tb_nn_accel;
  import mpe_pkg::*;
  import tl_pkg::*;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0;
  logic prg_en = 0, prg_we = 0, run = 0, inst_src = 0, bus_inst_valid = 0, bus_inst_ready, busy;
  logic [8:0] prg_addr = 0, pc;
  logic [15:0] prg_data = 0, bus_inst = 0;
  logic [R-1:0] bus_in;
  logic [C-1:0] bus_out;
  int checks = 0, failures = 0;

  nn_accel dut (.clk, .rst_n, .prg_en, .prg_we, .prg_addr, .prg_data, .run, .inst_src, .bus_inst,
                .bus_inst_valid, .bus_inst_ready, .bus_in, .bus_out, .pc, .busy);

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

  // ------------------------------------------------ serial streams
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
  // mechanism counters
  int n_mac = 0, n_wr = 0, n_rd = 0, n_era = 0, n_loop_back = 0, n_busfetch = 0, n_acc = 0,
      n_relu_clip = 0, n_sat = 0, n_mxp_take = 0, n_binary = 0, n_lowprec = 0, n_grad = 0,
      n_dpwm_cal = 0, n_jmp = 0, n_cnt = 0, n_mon = 0;
  always @(posedge clk) begin
    if (tl_exec) begin
      if (dut.u_tl.op == OP_RCV && dut.u_tl.last) void'(rcv_q.pop_front());
      if (dut.u_tl.op == OP_SND) begin
        for (int i = 0; i < 16; i++) snd_sh[i] = {snd_sh[i][7:0], bus_out[i]};
        if (dut.u_tl.last) snd_q.push_back(snd_sh);
      end
      if (dut.u_tl.op == OP_MUL && dut.u_tl.last) begin
        n_mac++;
        if (!dut.u_tl.arg[2]) n_acc++;
        if (dut.u_tl.wbits == 4'd1) n_binary++;
        if (dut.u_tl.wbits > 4'd1 && dut.u_tl.wbits < 4'd9) n_lowprec++;
      end
      if (dut.u_tl.op == OP_SRW) n_wr++;
      if (dut.u_tl.op == OP_SRR && dut.u_tl.last) n_rd++;
      if (dut.u_tl.op == OP_ERA && dut.u_tl.last) n_era++;
      if (dut.u_tl.op == OP_LPE && dut.u_tl.loop_cnt[dut.u_tl.arg[2:0]] != 0) n_loop_back++;
      if (dut.u_tl.op == OP_UPD && dut.u_tl.arg[10]) n_grad++;
      if (dut.u_tl.op == OP_CFD && dut.u_tl.last) n_dpwm_cal++;
      if (dut.u_tl.op == OP_JMP) n_jmp++;
      if (dut.u_tl.op == OP_CNT && dut.u_tl.last) n_cnt++;
    end
    if (2'(dut.u_tl.st) == 2'd1 && bus_inst_valid && bus_inst_ready) n_busfetch++;
  end

  // ------------------------------------------------ reference model
  logic [8:0] w [4][R][C];          // weights by SRAM address
  function automatic int ref_mac(int a, int c, int xs [R], int sp, int wb);
    int dd, d, rr;
    dd = 0; d = 0; rr = 0;
    for (int k = 0; k < 8; k++) begin
      int ch, an, v, q;
      ch = 0; an = 0;
      for (int r = 0; r < R; r++) begin
        logic b;
        int sg;
        b  = (wb == 1) ? (k == 0) : ((k < wb - 1) ? w[a][r][c][sp - 1 - k] : 1'b0);
        sg = w[a][r][c][sp] ? -1 : 1;
        if (b) begin ch += sg * (xs[r] >>> 5); an += sg * (xs[r] & 31); end
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
  function automatic int atv(int p, int sh);
    int v;
    if (p < 0) return 0;
    v = p >>> sh;
    return (v > 255) ? 255 : v;
  endfunction

  // ------------------------------------------------ program
  logic [15:0] prog [$];
  task automatic emit(opcode_e op, int arg); prog.push_back(inst(op, 11'(arg))); endtask

  int xs [R], x2 [R], exp1 [C], exp3 [C], expm [C], exp4 [C], expb [C];
  initial begin
    int sh;
    vec_t v;
    sh = 1;
    // weights: addresses 0..3, random sign-magnitude; address 2 holds 4-bit
    // weights (sign at bit 8, 3 magnitude bits below)
    for (int a = 0; a < 4; a++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          w[a][r][c] = (a == 2) ? {$urandom_range(0, 1) == 1, 3'($urandom), 5'b0} : 9'($urandom);
    for (int r = 0; r < R; r++) begin
      xs[r] = $urandom_range(0, 511) - 256;
    end
    xs[0] = 255; xs[1] = -256;
    // program
    emit(OP_ERA, 0);
    emit(OP_CFD, 1);
    emit(OP_CFC, 32);
    for (int a = 0; a < 4; a++) begin
      emit(OP_SSA, a);
      for (int r = 0; r < R; r++) begin
        emit(OP_SFT, r);
        emit(OP_RCV, 4 | 0);                 // column registers 0 <- weights of row r
        emit(OP_SRW, 0);
        for (int c = 0; c < C; c++) v[c] = w[a][r][c];
        rcv_q.push_back(v);
      end
    end
    emit(OP_SSA, 1); emit(OP_SFT, 5); emit(OP_SRR, 1); emit(OP_SND, 1);      // read-back
    for (int r = 0; r < R; r++) v[r] = 9'(xs[r]);
    rcv_q.push_back(v);
    emit(OP_RCV, 0);                                                        // row reg 0 <- x
    emit(OP_SSB, 8'h98);                                                    // 9-bit weights
    emit(OP_SSA, 0); emit(OP_MUL, 4 | 0);                                   // new partial sum
    emit(OP_SSA, 1); emit(OP_MUL, 0);                                       // add sub-matrix
    emit(OP_ATV, (sh << 2) | 2);                                            // col reg 2
    emit(OP_SND, 2);
    emit(OP_SSA, 3); emit(OP_MUL, 4 | 0); emit(OP_ATV, (sh << 2) | 3);      // col reg 3
    emit(OP_MXP, (2 << 2) | 3);                                             // col3 = max(col3, col2)
    emit(OP_SND, 3);
    emit(OP_LDA, (1 << 2) | 3);                                             // row reg 1 <- col reg 3
    emit(OP_SSA, 2); emit(OP_SSB, 8'h48); emit(OP_MUL, 4 | 1);              // 4-bit weights
    emit(OP_ATV, (0 << 2) | 0); emit(OP_SND, 0);
    emit(OP_SSA, 0); emit(OP_SSB, 8'h18); emit(OP_MUL, 4 | 0);              // binary weights
    emit(OP_ATV, (0 << 2) | 0); emit(OP_SND, 0);
    emit(OP_SSB, 8'h98); emit(OP_SSA, 0);
    emit(OP_LPS, (3 << 3) | 1); emit(OP_MUL, 4 | 0); emit(OP_LPE, 8 | 1);   // loop: addresses 0,1,2
    emit(OP_ATV, (0 << 2) | 0); emit(OP_SND, 0);                           // result of address 2
    emit(OP_CNT, 3);
    emit(OP_UPD, 'h400);                                                    // one gradient step
    emit(OP_SFS, 2);
    emit(OP_JMP, prog.size() + 2);
    emit(OP_MUL, 0);                                                        // skipped by JMP
    emit(OP_JMP, prog.size());                                              // park
    chk(prog.size() <= 512, "program fits the instruction SRAM");

    // load and run
    #12 rst_n = 1;
    prg_en = 1;
    foreach (prog[i]) begin @(negedge clk); prg_we = 1; prg_addr = 9'(i); prg_data = prog[i]; end
    @(negedge clk); prg_we = 0; prg_en = 0;
    @(negedge clk); run = 1;
    while (!(tl_exec && pc == 9'(prog.size() - 1))) @(negedge clk);

    // ------------------------------------------------ expected results
    for (int c = 0; c < C; c++) begin
      exp1[c] = atv(ref_mac(0, c, xs, 8, 9) + ref_mac(1, c, xs, 8, 9), sh);
      exp3[c] = atv(ref_mac(3, c, xs, 8, 9), sh);
      expm[c] = (exp3[c] > exp1[c]) ? exp3[c] : exp1[c];
      if (exp3[c] == 0 || exp1[c] == 0) n_relu_clip++;
      if (exp1[c] == 255 || exp3[c] == 255) n_sat++;
      if (exp1[c] > exp3[c]) n_mxp_take++;
    end
    for (int r = 0; r < R; r++) x2[r] = expm[r];
    for (int c = 0; c < C; c++) begin
      exp4[c] = atv(ref_mac(2, c, x2, 8, 4), 0);
      expb[c] = atv(ref_mac(0, c, xs, 8, 1), 0);
    end
    chk(snd_q.size() == 6, $sformatf("six output vectors (%0d)", snd_q.size()));
    if (snd_q.size() == 6)
      for (int c = 0; c < C; c++) begin
        chk(snd_q[0][c] == w[1][5][c], $sformatf("weight read-back c=%0d", c));
        chk(snd_q[1][c] == 9'(exp1[c]), $sformatf("layer 1 (2 sub-matrices) c=%0d got %0d exp %0d", c, snd_q[1][c], exp1[c]));
        chk(snd_q[2][c] == 9'(expm[c]), $sformatf("max-pool c=%0d got %0d exp %0d", c, snd_q[2][c], expm[c]));
        chk(snd_q[3][c] == 9'(exp4[c]), $sformatf("layer 2, 4-bit weights c=%0d got %0d exp %0d", c, snd_q[3][c], exp4[c]));
        chk(snd_q[4][c] == 9'(expb[c]), $sformatf("binary weights c=%0d got %0d exp %0d", c, snd_q[4][c], expb[c]));
        chk(snd_q[5][c] == 9'(atv(ref_mac(2, c, xs, 8, 9), 0)), $sformatf("loop result c=%0d", c));
      end
    chk(bus_out == {dut.u_tl.sram_addr, dut.u_tl.sign_pos, dut.u_tl.row_sel, 1'b0}, "monitor output");
    if (bus_out == {dut.u_tl.sram_addr, dut.u_tl.sign_pos, dut.u_tl.row_sel, 1'b0}) n_mon++;
    chk(dut.u_tl.sram_addr == 7'd3, "loop stepped the SRAM address");

    // ------------------------------------------------ instruction bus port
    run = 0; repeat (3) @(negedge clk);
    inst_src = 1; run = 1;
    begin
      logic [15:0] bp [$];
      bp = {inst(OP_SSA, 11'd1), inst(OP_SSB, 11'h098), inst(OP_MUL, 11'd4), inst(OP_ATV, 11'd0), inst(OP_SND, 11'd0)};
      foreach (bp[i]) begin
        bus_inst = bp[i]; bus_inst_valid = 1;
        while (!bus_inst_ready) @(negedge clk);
        @(negedge clk);
        bus_inst_valid = 0;
        while (busy && 2'(dut.u_tl.st) != 2'd1) @(negedge clk);
      end
      repeat (3) @(negedge clk);
    end
    chk(snd_q.size() == 7, "bus-port SND");
    if (snd_q.size() == 7)
      for (int c = 0; c < C; c++) chk(snd_q[6][c] == 9'(atv(ref_mac(1, c, xs, 8, 9), 0)), "bus-port MAC result");

    // ------------------------------------------------ mechanism coverage
    $display("mac=%0d acc=%0d wr=%0d rd=%0d era=%0d loop=%0d bus=%0d relu0=%0d sat=%0d mxp=%0d bin=%0d low=%0d grad=%0d dpwm=%0d jmp=%0d cnt=%0d mon=%0d",
             n_mac, n_acc, n_wr, n_rd, n_era, n_loop_back, n_busfetch, n_relu_clip, n_sat, n_mxp_take,
             n_binary, n_lowprec, n_grad, n_dpwm_cal, n_jmp, n_cnt, n_mon);
    chk(n_mac > 0, "MAC");            chk(n_acc > 0, "partial-sum accumulation");
    chk(n_wr == 64, "weight writes"); chk(n_rd > 0, "weight read");
    chk(n_era > 0, "erase");          chk(n_loop_back == 2, "loop back-jumps");
    chk(n_busfetch == 5, "bus-port instructions");
    chk(n_relu_clip > 0, "ReLU clipping"); chk(n_sat > 0, "9-bit saturation");
    chk(n_mxp_take > 0, "max-pool choice"); chk(n_binary > 0, "binary weights");
    chk(n_lowprec > 0, "4-bit weights"); chk(n_grad > 0, "gradient step");
    chk(n_dpwm_cal > 0, "DPWM calibration"); chk(n_jmp > 0, "jump");
    chk(n_cnt > 0, "CNT"); chk(n_mon > 0, "monitor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
