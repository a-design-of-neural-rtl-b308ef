// Self-checking testbench of the CMU accumulation logic: random sequences of
// eight ADC codes in {-3,-1,1,3}; DANA must equal the saturated
// shift-and-add sum(q_k 2^(7-k)); clearing between MACs.
module tb_cmu_acc;
  logic clk = 0, rst_n = 0;
  logic mac_clr, mac_step;
  logic signed [2:0] qtzd;
  logic signed [9:0] dana;
  int checks = 0, failures = 0, sat_seen = 0;

  cmu_acc dut (.clk, .rst_n, .mac_clr, .mac_step, .qtzd, .dana);

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
    mac_clr = 0; mac_step = 0; qtzd = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int s, e;
      s = 0;
      @(negedge clk); mac_clr = 1; @(negedge clk); mac_clr = 0;
      for (int k = 0; k < 8; k++) begin
        int q;
        q = (t % 10 == 0) ? 3 : (t % 10 == 1) ? -3 : 2 * $urandom_range(0, 3) - 3;
        qtzd = 3'(q); mac_step = 1; s = 2 * s + q;
        @(negedge clk);
        mac_step = ($urandom_range(0, 1) == 1) ? 0 : 0;
        chk(int'(dana) == ((s > 511 * (1 << (7 - k)) / (1 << (7 - k))) ? 511 : (s < -512) ? -512 : s),
            $sformatf("partial %0d", k));
      end
      e = (s > 511) ? 511 : (s < -512) ? -512 : s;
      if (e != s) sat_seen++;
      chk(int'(dana) == e, $sformatf("dana %0d vs %0d", dana, e));
    end
    chk(sat_seen > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
