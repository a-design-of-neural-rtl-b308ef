// Self-checking testbench of the input driver: split of every signed 9-bit
// activation into ML (signed upper 4 bits) and x_lo (lower 5 bits) with
// x = 32*hi + lo, row select in access modes and 2-bit clipping for
// calibration steps.
module tb_input_driver;
  import mpe_pkg::*;
  core_ctrl_t ctrl;
  logic signed [8:0] x;
  logic [3:0] ml;
  logic [4:0] x_lo;
  int checks = 0, failures = 0;

  input_driver #(.ROW(5)) dut (.ctrl, .x, .ml, .x_lo);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ctrl = '0;
    for (int v = -256; v < 256; v++) begin
      ctrl.mode = CM_MAC; x = 9'(v); #1;
      chk(32 * int'(signed'(ml)) + int'(x_lo) == v, $sformatf("split %0d", v));
      ctrl.mode = CM_CALG; #1;
      chk(ml == 4'((v < 0) ? 0 : (v > 3) ? 3 : v), $sformatf("clip %0d", v));
      ctrl.mode = CM_IDLE; #1;
      chk(ml == 0 && x_lo == 0, "idle");
    end
    for (int r = 0; r < 16; r++) begin
      ctrl.mode = CM_WRITE; ctrl.row_sel = 4'(r); #1;
      chk(ml == {3'b0, r == 5} && x_lo == 0, "row select");
      ctrl.mode = CM_READ; #1;  chk(ml == {3'b0, r == 5}, "row select read");
      ctrl.mode = CM_CALW; #1;  chk(ml == {3'b0, r == 5}, "row select cal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
