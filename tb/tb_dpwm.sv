// Self-checking testbench of the DPWM control logic: 5-bit code to 31-bit
// thermometer code for every code, and the firing calibration: a cell that
// needs trim T is found at trim T after T+1 three-cycle attempts; a cell
// that never fires ends at the maximum trim with cal_fail.
module tb_dpwm;
  logic clk = 0, rst_n = 0;
  logic [4:0] code;
  logic en, cal_req, fired_max;
  logic [30:0] therm;
  logic fire_en, cal_test, cal_busy, cal_done, cal_fail;
  logic [2:0] trim;
  int checks = 0, failures = 0;
  int need;

  dpwm dut (.clk, .rst_n, .code, .en, .cal_req, .fired_max, .therm, .fire_en, .cal_test,
            .trim, .cal_busy, .cal_done, .cal_fail);

  // cell model: fires in the maximum-capacitance test once trim >= need
  assign fired_max = fire_en && cal_test && (int'(trim) >= need);

  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    code = 0; en = 0; cal_req = 0; need = 0;
    #12 rst_n = 1;
    for (int c = 0; c < 32; c++) begin
      code = 5'(c); en = 1; #1;
      chk($countones(therm) == c && therm == 31'((64'd1 << c) - 1), $sformatf("thermometer %0d", c));
      chk(fire_en && !cal_test, "fire enable");
      en = 0; #1; chk(!fire_en, "no pulse when disabled");
    end
    for (int n = 0; n <= 8; n++) begin
      int cyc;
      need = n;
      @(negedge clk); cal_req = 1; @(negedge clk); cal_req = 0;
      cyc = 1;
      while (!cal_done) begin
        if (cal_test) chk(therm == '1, "calibration selects all capacitors");
        @(negedge clk); cyc++;
      end
      chk(int'(trim) == ((n > 7) ? 7 : n), $sformatf("trim for need %0d: %0d", n, trim));
      chk(cal_fail == (n > 7), "fail flag");
      chk(cyc == 3 * (((n > 7) ? 7 : n) + 1) + 1, $sformatf("calibration cycles %0d", cyc));
      @(negedge clk); chk(!cal_busy, "idle after calibration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
