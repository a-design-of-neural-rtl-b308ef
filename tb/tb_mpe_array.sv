// Self-checking testbench of the MPE array: random weights written row by
// row, then single MAC cycles at every bit position with random MSB-line
// values and pulse widths; each column's data-line sum and bit-line charges
// are compared with sums computed here. A second instance with process
// variation must give non-ideal but nearby charges.
module tb_mpe_array;
  import mpe_pkg::*;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0;
  core_ctrl_t ctrl;
  logic [3:0] ml [R];
  real pulse_w [R];
  logic [8:0] col_wr [C];
  logic signed [8:0] dl_bot [C], dl_bot2 [C];
  real bl_q_p [C], bl_q_n [C], v_p [C], v_n [C];
  logic [4:0] code [R][C], code2 [R][C];
  logic [8:0] w [R][C];
  int checks = 0, failures = 0, diff_seen = 0;

  mpe_array dut (.clk, .rst_n, .ctrl, .ml, .pulse_w, .col_wr, .dl_bot, .bl_q_p, .bl_q_n, .isrc_code(code));
  mpe_array #(.VAR_SEED(7)) dut_v (.clk, .rst_n, .ctrl, .ml, .pulse_w, .col_wr, .dl_bot(dl_bot2),
                                   .bl_q_p(v_p), .bl_q_n(v_n), .isrc_code(code2));

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
    ctrl = '0;
    foreach (ml[r]) begin ml[r] = 0; pulse_w[r] = 0.0; end
    foreach (col_wr[c]) col_wr[c] = 0;
    #12 rst_n = 1;
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      ctrl = '0; ctrl.mode = CM_WRITE; ctrl.sram_addr = 7'd42;
      foreach (ml[i]) ml[i] = {3'b0, i == r};
      for (int c = 0; c < C; c++) begin w[r][c] = 9'($urandom); col_wr[c] = w[r][c]; end
    end
    @(negedge clk); ctrl = '0; ctrl.mode = CM_MAC; ctrl.sram_addr = 7'd42; ctrl.sign_pos = 4'd8; ctrl.sign_ld = 1;
    @(negedge clk); ctrl.sign_ld = 0;
    for (int t = 0; t < 200; t++) begin
      int b;
      int his [R];
      b = t % 8;
      ctrl.bit_pos = 4'(b); ctrl.mac_en = 1;
      for (int r = 0; r < R; r++) begin
        his[r] = $urandom_range(0, 15) - 8; ml[r] = 4'(his[r]);
        pulse_w[r] = real'($urandom_range(0, 31));
      end
      #1;
      for (int c = 0; c < C; c++) begin
        int s;
        real qp, qn;
        s = 0; qp = 0.0; qn = 0.0;
        for (int r = 0; r < R; r++)
          if (w[r][c][b]) begin
            s += w[r][c][8] ? -his[r] : his[r];
            if (w[r][c][8]) qp += pulse_w[r]; else qn += pulse_w[r];
          end
        chk(int'(dl_bot[c]) == s && dl_bot2[c] == dl_bot[c], $sformatf("column sum c=%0d", c));
        chk(bl_q_p[c] == qp && bl_q_n[c] == qn, $sformatf("bit-line charge c=%0d", c));
        if (v_p[c] != qp || v_n[c] != qn) diff_seen++;
        chk(v_p[c] <= 1.21 * qp && v_p[c] >= 0.79 * qp, "variation within 20 %");
      end
      @(negedge clk);
    end
    chk(diff_seen > 0, "variation present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
