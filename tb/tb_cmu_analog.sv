// Self-checking testbench of the cyclic-accumulator model: random bit-line
// charge sequences of eight cycles; each cycle's ADC code is compared with
// a reference recurrence (V = V_BL + 2 R, thresholds 0 and +/-V_M/2,
// R = V - q V_M/4), the residue bound |R| <= V_M/4 is checked, and the
// shift-and-add of the codes must equal sum(V_BL_k 2^(7-k))/256 within one.
// Also checks capacitor-bank scaling and precharge.
module tb_cmu_analog;
  import mpe_pkg::*;
  logic clk = 0, rst_n = 0;
  real q_p, q_n, v_out;
  logic bl_prch, mac_clr, mac_step, mac_first;
  logic [5:0] cb_code;
  logic signed [2:0] qtzd;
  int checks = 0, failures = 0;

  cmu_analog dut (.clk, .rst_n, .q_p, .q_n, .bl_prch, .cb_code, .mac_clr, .mac_step,
                  .mac_first, .qtzd, .v_out);

  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    q_p = 0; q_n = 0; bl_prch = 0; mac_clr = 0; mac_step = 0; mac_first = 0; cb_code = 6'd32;
    #12 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int r, qref, d, a;
      int vbl;
      r = 0; d = 0; a = 0;
      cb_code = (t % 4 == 0) ? 6'd16 : 6'd32;
      @(negedge clk); mac_clr = 1; @(negedge clk); mac_clr = 0;
      for (int k = 0; k < 8; k++) begin
        int v;
        vbl = $urandom_range(0, 496) - (t % 3 == 0 ? 0 : 248);
        if (cb_code == 6'd16) vbl = vbl / 2;
        if (vbl >= 0) begin q_n = (cb_code == 6'd16) ? real'(vbl) / 2.0 : real'(vbl); q_p = 0; end
        else          begin q_p = (cb_code == 6'd16) ? real'(-vbl) / 2.0 : real'(-vbl); q_n = 0; end
        v = (k == 0) ? vbl : vbl + 2 * r;
        qref = (v >= 512) ? 3 : (v >= 0) ? 1 : (v >= -512) ? -1 : -3;
        mac_step = 1; mac_first = (k == 0); #1;
        chk(int'(qtzd) == qref, $sformatf("adc code t=%0d k=%0d v=%0d", t, k, v));
        chk(v_out == real'(v), "accumulator voltage");
        r = v - qref * 256;
        chk(r <= 256 && r >= -256, "residue bound");
        d = 2 * d + qref;
        a = 2 * a + vbl;
        @(negedge clk);
      end
      mac_step = 0; mac_first = 0;
      chk(a - 256 * d <= 256 && a - 256 * d >= -256, "eight-cycle result within one LSB");
    end
    bl_prch = 1; q_n = 100.0; mac_step = 1; mac_first = 1; #1;
    chk(v_out == 0.0 && qtzd == 3'sd1, "precharged lines read zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
