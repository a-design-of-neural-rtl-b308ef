// Self-checking testbench of the I&F pair model: pulse width equals the
// number of selected unit capacitors for a nominal cell; a slow cell
// (140 %) does not fire the maximum-capacitance case in time without trim,
// clips its pulses, and fires from trim 3 on.
module tb_dpwm_if;
  logic [30:0] therm;
  logic fire_en;
  logic [2:0] trim;
  real pw_a, pw_b;
  logic fm_a, fm_b;
  int checks = 0, failures = 0;

  dpwm_if #(.RATIO_PCT(100)) dut_a (.therm, .fire_en, .trim, .pulse_w(pw_a), .fired_max(fm_a));
  dpwm_if #(.RATIO_PCT(140)) dut_b (.therm, .fire_en, .trim, .pulse_w(pw_b), .fired_max(fm_b));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int n = 0; n < 32; n++) begin
        therm = 31'((64'd1 << n) - 1); fire_en = 1; trim = 3'(t); #1;
        chk(pw_a == real'(n) && fm_a, "nominal cell pulse width");
        chk(fm_b == (t >= 3), $sformatf("slow cell fires at trim %0d", t));
        if (t >= 3) chk(pw_b == real'(n), "slow cell after trim");
        else        chk(n == 0 ? pw_b == 0.0 : pw_b < real'(n), "slow cell clipped");
        fire_en = 0; #1;
        chk(pw_a == 0.0 && !fm_a, "disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
