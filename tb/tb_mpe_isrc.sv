// Self-checking testbench of the current-source behavioural model: code to
// current law (300 nA + 600 nA x code/31, normalised to code 16), pulse
// width scaling, polarity steering, enables and the gain error parameter.
module tb_mpe_isrc;
  logic en_dac, wl_en, wl_pol;
  logic [4:0] code;
  real pulse_w, q_p, q_n, q2_p, q2_n;
  int checks = 0, failures = 0;

  mpe_isrc dut (.en_dac, .wl_en, .wl_pol, .code, .pulse_w, .q_p, .q_n);
  mpe_isrc #(.GAIN_PPM(100000)) dut2 (.en_dac, .wl_en, .wl_pol, .code, .pulse_w, .q_p(q2_p), .q_n(q2_n));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      for (int n = 0; n < 32; n += 5) begin
        for (int m = 0; m < 8; m++) begin
          real exp_q;
          code = 5'(c); pulse_w = real'(n);
          en_dac = m[0]; wl_en = m[1]; wl_pol = m[2];
          #1;
          exp_q = (en_dac && wl_en) ? real'(n) * (300.0 + 600.0 * c / 31.0) / (300.0 + 600.0 * 16.0 / 31.0) : 0.0;
          chk(near(wl_pol ? q_p : q_n, exp_q) && near(wl_pol ? q_n : q_p, 0.0),
              $sformatf("charge code=%0d n=%0d m=%0d", c, n, m));
          chk(near(wl_pol ? q2_p : q2_n, exp_q * 1.1), "gain error");
        end
      end
    end
    code = 5'd16; pulse_w = 31.0; en_dac = 1; wl_en = 1; wl_pol = 0; #1;
    chk(q_n == 31.0, "nominal code gives exactly one unit per time unit");
    code = 5'd0; #1;  chk(near(q_n, 31.0 * 300.0 / (300.0 + 600.0 * 16.0 / 31.0)), "300 nA floor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
