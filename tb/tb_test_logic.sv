// Self-checking testbench of the test logic alone, with the computation
// core replaced by simple responses driven here (fixed read data, partial
// sums and DOUT values). A program loaded in the programming phase exercises
// every instruction: register transfers (RCV, SND, SRR, SRW, ADD, ATV, LDA,
// MXP), configuration (SSA, SSB, SFT, CFC, CFD, UPD, ERA), the MUL control
// sequence, nested loops with address increments, CNT, JMP and the SFS
// monitor; then instructions are fed through the bus port.
module tb_test_logic;
  import mpe_pkg::*;
  import tl_pkg::*;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0;
  logic prg_en, prg_we, run, inst_src, bus_inst_valid, bus_inst_ready, busy;
  logic [8:0] prg_addr, pc;
  logic [15:0] prg_data, bus_inst;
  logic [R-1:0] bus_in;
  logic [C-1:0] bus_out;
  core_ctrl_t ctrl;
  logic signed [8:0] x_out [R];
  logic [8:0] wr_data [C];
  logic signed [13:0] dout [C];
  logic signed [15:0] psum [C];
  logic [8:0] rdata [C];
  logic cal_busy;
  int checks = 0, failures = 0;

  test_logic dut (.clk, .rst_n, .prg_en, .prg_we, .prg_addr, .prg_data, .run, .inst_src,
                  .bus_inst, .bus_inst_valid, .bus_inst_ready, .bus_in, .bus_out, .ctrl, .x_out,
                  .wr_data, .dout, .psum, .rdata, .dpwm_cal_busy(cal_busy), .pc, .busy);

  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- core stand-in
  int cal_cnt = 0;
  always_ff @(posedge clk) begin
    if (ctrl.dpwm_cal) cal_cnt <= 5; else if (cal_cnt > 0) cal_cnt <= cal_cnt - 1;
  end
  assign cal_busy = (cal_cnt > 0);
  always_comb for (int c = 0; c < C; c++) begin
    rdata[c] = 9'(c * 7 + 1);
    psum[c]  = 16'(c * 100 - 800);
    dout[c]  = 14'(c * 3);
  end

  // ---------------- serial input data: row r sends value 16*r+3 (MSB first)
  int rcv_bit = 0;
  always_comb for (int r = 0; r < R; r++) bus_in[r] = 1'(((16 * r + 3) >> (8 - rcv_bit)) & 1);
  always_ff @(posedge clk)
    if (dut.st == dut.S_EXEC && dut.op == OP_RCV) rcv_bit <= (rcv_bit == 8) ? 0 : rcv_bit + 1;

  // ---------------- monitors
  logic [8:0] snd_sh [C];
  logic [8:0] snd_q [$][C];
  int mul_cnt = 0, era_cnt = 0, mac_cyc = 0, cnt_cyc = 0;
  int mul_addr [$];
  logic [127:0] erased;
  logic [8:0] snd_word [C];
  always @(posedge clk) begin
    if (dut.st == dut.S_EXEC) begin
      if (dut.op == OP_SND) begin
        for (int c = 0; c < C; c++) snd_sh[c] = {snd_sh[c][7:0], bus_out[c]};
        if (dut.last) begin
          for (int c = 0; c < C; c++) snd_word[c] = snd_sh[c];
          snd_q.push_back(snd_word);
        end
      end
      if (dut.op == OP_ERA) begin chk(ctrl.mode == CM_ERASE, "erase mode"); erased[ctrl.sram_addr] = 1'b1; era_cnt++; end
      if (dut.op == OP_CNT) cnt_cyc++;
      if (dut.op == OP_MUL) begin
        int s;
        s = int'(dut.stc);
        mac_cyc++;
        chk(ctrl.mode == CM_MAC, "MUL mode");
        if (s == 0) begin
          chk(ctrl.sign_ld && ctrl.mac_clr && ctrl.sign_pos == 4'd8, "MUL first cycle loads the sign");
          mul_addr.push_back(int'(ctrl.sram_addr));
        end
        if (s < 8) begin
          chk(ctrl.mac_step && (ctrl.mac_first == (s == 0)) && (ctrl.sign_ld == (s == 0))
              && ctrl.bit_pos == 4'(7 - s), "MUL step");
          chk(ctrl.mac_en == (s <= 2) && ctrl.dpwm_en == ctrl.mac_en, "MUL enable for 4-bit weights");
        end else begin
          chk(ctrl.mac_fin && !ctrl.mac_step, "MUL combine cycle");
          mul_cnt++;
        end
      end
    end
  end

  task automatic load(input logic [15:0] prog [$]);
    prg_en = 1;
    foreach (prog[i]) begin
      @(negedge clk); prg_we = 1; prg_addr = 9'(i); prg_data = prog[i];
    end
    @(negedge clk); prg_we = 0; prg_en = 0;
  endtask

  function automatic int s2_of(int c);
    int p, a;
    p = c * 100 - 800; a = (p < 0) ? 0 : ((p >> 2) > 255 ? 255 : p >> 2);
    return (c * 7 + 1 + a > 255) ? 255 : c * 7 + 1 + a;
  endfunction

  logic [15:0] prog [$];
  initial begin
    int end_pc;
    prg_en = 0; prg_we = 0; prg_addr = 0; prg_data = 0; run = 0; inst_src = 0;
    bus_inst = 0; bus_inst_valid = 0; erased = '0;
    #12 rst_n = 1;
    prog = {
      inst(OP_SSB, 11'h048),          // sign at bit 8, width 4
      inst(OP_RCV, 11'd0),            // row reg 0 <- bus_in
      inst(OP_SRR, 11'd1),            // col reg 1 <- rdata
      inst(OP_ATV, 11'b0010_11),      // col reg 3 <- relu(psum) >>> 2
      inst(OP_ADD, 11'b11_01_10),     // col reg 2 <- col1 + col3
      inst(OP_SND, 11'd3),
      inst(OP_MXP, 11'b01_11),        // col reg 3 <- max(col3, col1)
      inst(OP_SND, 11'd3),
      inst(OP_SND, 11'd2),
      inst(OP_LDA, 11'b01_10),        // row reg 1 <- col reg 2
      inst(OP_SSA, 11'd20),
      inst(OP_LPS, {8'd3, 3'd2}),     // 3 iterations, loop 2
      inst(OP_LPS, {8'd2, 3'd5}),     //   2 iterations, loop 5
      inst(OP_MUL, 11'd1),
      inst(OP_LPE, 11'b0_1_101),  // loop 5 end, SRAM address +1
      inst(OP_LPE, 11'd2),            // loop 2 end
      inst(OP_ERA, 11'd0),
      inst(OP_CNT, 11'd6),
      inst(OP_CFC, 11'd40),
      inst(OP_CFD, 11'd1),
      inst(OP_SFT, 11'd9),
      inst(OP_UPD, 11'h400),          // gradient step with row reg 0
      inst(OP_SFS, 11'd2),
      inst(OP_JMP, 11'd24),
      inst(OP_JMP, 11'd24)            // stop here
    };
    end_pc = 24;
    load(prog);
    @(negedge clk); run = 1;
    while (!(pc == 9'(end_pc) && dut.st == dut.S_EXEC)) begin
      @(negedge clk);
      if (dut.st == dut.S_EXEC && dut.op == OP_MUL)
        for (int r = 0; r < R; r++) chk(x_out[r] == 9'(s2_of(r)), "LDA moved col reg to row reg");
      if (dut.st == dut.S_EXEC && dut.op == OP_UPD) begin
        int t;
        t = 0;
        for (int r = 0; r < R; r++) t += 16 * r + 3;
        chk(ctrl.mode == CM_CALG, "UPD gradient mode");
        for (int c = 0; c < C; c++) chk(wr_data[c] == 9'b0_0000_0111, "UPD clipped negative error");
        for (int r = 0; r < R; r++) chk(x_out[r] == 9'(16 * r + 3), "RCV row register");
      end
      if (dut.st == dut.S_EXEC && dut.op == OP_CFD && dut.stc == 0) chk(ctrl.dpwm_cal, "CFD starts calibration");
    end
    repeat (3) @(negedge clk);
    // results
    chk(snd_q.size() == 3, "three SND words");
    for (int c = 0; c < C; c++) begin
      int p, a, m, s2;
      p  = c * 100 - 800; a = (p < 0) ? 0 : ((p >> 2) > 255 ? 255 : p >> 2);
      m  = (a > c * 7 + 1) ? a : c * 7 + 1;
      s2 = s2_of(c);
      chk(snd_q[0][c] == 9'(a),  $sformatf("ATV/SND c=%0d got %0d exp %0d", c, snd_q[0][c], a));
      chk(snd_q[1][c] == 9'(m),  $sformatf("MXP c=%0d", c));
      chk(snd_q[2][c] == 9'(s2), $sformatf("ADD c=%0d", c));
    end
    chk(mul_cnt == 6 && mac_cyc == 54, $sformatf("nested loops ran MUL %0d times in %0d cycles", mul_cnt, mac_cyc));
    chk(mul_addr.size() == 6 && mul_addr[0] == 20 && mul_addr[1] == 21 && mul_addr[5] == 25, "address increments in loop");
    chk(era_cnt == 128 && erased == '1, "ERA covers all addresses");
    chk(cnt_cyc == 7, $sformatf("CNT holds %0d cycles", cnt_cyc));
    chk(ctrl.cb_code == 6'd40 && ctrl.row_sel == 4'd9, "CFC/SFT");
    chk(bus_out == {ctrl.sram_addr, ctrl.bit_pos, ctrl.row_sel, 1'b0}, "SFS monitor on bus_out");
    // bus port instructions
    run = 0; @(negedge clk); @(negedge clk);
    inst_src = 1; run = 1;
    bus_inst = inst(OP_SSA, 11'd77); bus_inst_valid = 1;
    while (!bus_inst_ready) @(negedge clk);
    @(negedge clk); bus_inst_valid = 0;
    repeat (3) @(negedge clk);
    chk(ctrl.sram_addr == 7'd77, "instruction from bus port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
