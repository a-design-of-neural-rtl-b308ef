// Self-checking testbench of the logic module: DDIG shift-and-add over eight
// random data-line sums, DOUT = (DDIG + 8*DANA) >>> 3 at the combine cycle,
// partial-sum load/accumulate with saturation, read capture and write bus.
module tb_lm;
  import mpe_pkg::*;
  logic clk = 0, rst_n = 0;
  core_ctrl_t ctrl;
  logic signed [8:0] dl_bot;
  logic signed [9:0] dana;
  logic [8:0] wr_data, col_wr, rdata;
  logic signed [15:0] ddig, psum;
  logic signed [13:0] dout;
  int checks = 0, failures = 0, sat_seen = 0;

  lm dut (.clk, .rst_n, .ctrl, .dl_bot, .dana, .wr_data, .col_wr, .rdata, .ddig, .dout, .psum);

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
  initial begin
    int ps;
    ctrl = '0; dl_bot = 0; dana = 0; wr_data = 0; ps = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int dd, dm, exp_out, cyc;
      dd = 0;
      @(negedge clk); ctrl = '0; ctrl.mode = CM_MAC; ctrl.mac_clr = 1;
      @(negedge clk); ctrl.mac_clr = 0;
      for (int k = 0; k < 8; k++) begin
        int s;
        s = $urandom_range(0, 256) - 128;
        dl_bot = 9'(s); ctrl.mac_step = 1; dd = 2 * dd + s;
        @(negedge clk);
      end
      ctrl.mac_step = 0;
      chk(int'(ddig) == dd, "ddig");
      dana = 10'($urandom_range(0, 1022) - 511);
      ctrl.mac_fin = 1; ctrl.psum_load = (t % 5 == 0);
      @(negedge clk); ctrl.mac_fin = 0;
      dm = dd + 8 * int'(dana);
      exp_out = dm >>> 3;
      chk(int'(dout) == exp_out, $sformatf("dout %0d vs %0d", dout, exp_out));
      ps = ((t % 5 == 0) ? 0 : ps) + exp_out;
      if (ps > 32767) begin ps = 32767; sat_seen++; end
      if (ps < -32768) begin ps = -32768; sat_seen++; end
      chk(int'(psum) == ps, "partial sum");
    end
    // weight path
    for (int t = 0; t < 50; t++) begin
      wr_data = 9'($urandom); #1; chk(col_wr == wr_data, "write bus");
      @(negedge clk); ctrl = '0; ctrl.mode = CM_READ; dl_bot = 9'($urandom);
      @(negedge clk); chk(rdata == 9'(dl_bot), "read capture"); ctrl.mode = CM_IDLE;
    end
    $display("saturations %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
