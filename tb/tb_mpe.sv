// Self-checking testbench of one MPE: SRAM write/read/erase through the
// column bus and the data line, bit-serial digital MAC contribution with the
// sign taken in the first bit cycle and held in the sign register, WL logic outputs, and the calibration register (direct
// write and clipped gradient steps with saturation).
module tb_mpe;
  import mpe_pkg::*;
  logic clk = 0, rst_n = 0;
  core_ctrl_t ctrl;
  logic [3:0] ml;
  logic signed [8:0] dl_in, dl_out;
  logic [8:0] col_wr;
  logic wl_en, wl_pol, en_dac;
  logic [4:0] code;
  int checks = 0, failures = 0;

  mpe dut (.clk, .rst_n, .ctrl, .ml, .dl_in, .dl_out, .col_wr, .wl_en, .wl_pol, .en_dac, .isrc_code(code));

  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  logic [8:0] words [128];
  initial begin
    ctrl = '0; ml = '0; dl_in = '0; col_wr = '0;
    #12 rst_n = 1; #1;
    chk(code == 5'd16, "calibration reset value");
    // fill all words with random data through the write path
    for (int a = 0; a < 128; a++) begin
      words[a] = 9'($urandom);
      ctrl.mode = CM_WRITE; ctrl.sram_addr = 7'(a); ml = 4'b0001; col_wr = words[a];
      step();
    end
    // an unselected write must not change anything
    ctrl.mode = CM_WRITE; ctrl.sram_addr = 7'd3; ml = 4'b0000; col_wr = ~words[3]; step();
    // read back
    for (int a = 0; a < 128; a++) begin
      ctrl.mode = CM_READ; ctrl.sram_addr = 7'(a); ml = 4'b0001; dl_in = 9'sd17; #1;
      chk(dl_out == words[a], $sformatf("read addr %0d", a));
    end
    ctrl.mode = CM_READ; ml = 4'b0000; dl_in = 9'sd17; #1;
    chk(dl_out == 9'sd17, "unselected read passes the data line");
    // bit-serial MAC contributions
    for (int t = 0; t < 300; t++) begin
      int a, hi, din, exp_v;
      logic s;
      a = $urandom_range(0, 127);
      ctrl = '0; ctrl.mode = CM_MAC; ctrl.sram_addr = 7'(a);
      ctrl.sign_pos = 4'd8;
      s = words[a][8];
      // the first bit cycle uses the sign bit directly and latches it
      for (int b = 7; b >= 0; b--) begin
        ctrl.sign_ld = (b == 7);
        hi  = $urandom_range(0, 15) - 8;
        din = $urandom_range(0, 200) - 100;
        ctrl.bit_pos = 4'(b); ctrl.mac_en = ($urandom_range(0, 3) != 0);
        ml = 4'(hi); dl_in = 9'(din); #1;
        exp_v = din + ((ctrl.mac_en && words[a][b]) ? (s ? -hi : hi) : 0);
        chk(dl_out == 9'(exp_v), $sformatf("mac contribution a=%0d b=%0d", a, b));
        chk(wl_en == (ctrl.mac_en && words[a][b]) && wl_pol == s && en_dac, "WL logic");
        step();
      end
    end
    // binary weights: force_one
    ctrl = '0; ctrl.mode = CM_MAC; ctrl.mac_en = 1'b1; ctrl.force_one = 1'b1;
    ctrl.bit_pos = 4'd0; ctrl.sram_addr = 7'd0; ml = 4'd5; dl_in = '0; #1;
    chk(dl_out == (wl_pol ? -9'sd5 : 9'sd5), "binary weight");
    // erase
    ctrl = '0; ctrl.mode = CM_ERASE; ctrl.sram_addr = 7'd9; step();
    ctrl.mode = CM_READ; ml = 4'b0001; #1;
    chk(dl_out == 9'd0, "erase");
    ctrl.sram_addr = 7'd10; #1; chk(dl_out == words[10], "erase touches one word");
    // calibration register
    ctrl = '0; ctrl.mode = CM_CALW; ml = 4'b0001; col_wr = 9'h0f8; step();
    chk(code == 5'd31, "calibration write");
    ctrl.mode = CM_CALG; ml = 4'b0011; col_wr = 9'b0_0000_0011; step();  // e=+3, x=3 -> grad 7
    chk(dut.cal_q == 8'hf1, "gradient step clipped to 7 (down)");
    ml = 4'b0010; col_wr = 9'b0_0000_0101; step();                     // e=-1, x=2 -> +2
    chk(dut.cal_q == 8'hf3, "gradient step up");
    repeat (3) begin ml = 4'b0011; col_wr = 9'b0_0000_0111; step(); end // saturate at 255
    chk(dut.cal_q == 8'hff, "gradient saturates high");
    ctrl.mode = CM_CALW; ml = 4'b0001; col_wr = 9'h003; step();
    ctrl.mode = CM_CALG; ml = 4'b0011; col_wr = 9'b0_0000_0011; step();
    chk(dut.cal_q == 8'h00 && code == 5'd0, "gradient saturates low");
    ctrl.mode = CM_CALW; ml = 4'b0000; col_wr = 9'h0aa; step();
    chk(dut.cal_q == 8'h00, "unselected calibration write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
