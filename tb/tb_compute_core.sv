// Self-checking testbench of the computation core (ideal analog models).
// The testbench plays the controller: it writes random sign-magnitude
// weights into every MPE through the LMs and data lines, reads some back,
// runs the DPWM firing calibration, and runs bit-serial MACs with random
// activations at weight widths 1..9. Each column's DOUT is compared with a
// reference built from the arithmetic alone (digital column sums, the
// cyclic-accumulator recurrence, DDIG + 8*DANA >>> 3) and with the exact
// weighted sum / 256 (error below two LSBs). A MAC must take 9 cycles
// (8 bit cycles, the first loading the sign, then the combine cycle).
module tb_compute_core;
  import mpe_pkg::*;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0;
  core_ctrl_t ctrl;
  logic signed [8:0]  x_in [R];
  logic [8:0]         wr_data [C];
  logic signed [13:0] dout [C];
  logic signed [15:0] psum [C];
  logic [8:0]         rdata [C];
  logic signed [9:0]  dana [C];
  logic signed [15:0] ddig [C];
  logic [4:0]         isrc_code [R][C];
  logic               cal_busy;
  logic [R-1:0]       cal_fail;
  int checks = 0, failures = 0;
  logic [8:0] w [128][R][C];

  compute_core dut (.clk, .rst_n, .ctrl, .x_in, .wr_data, .dout, .psum, .rdata, .dana, .ddig,
                    .isrc_code, .dpwm_cal_busy(cal_busy), .dpwm_cal_fail(cal_fail));

  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one MAC with the weight's sign at bit 8 and width wb
  task automatic mac(input int addr, input int wb, output int cycles);
    ctrl = '0; ctrl.cb_code = 6'd32; ctrl.mode = CM_MAC; ctrl.sram_addr = 7'(addr);
    ctrl.sign_pos = 4'd8;
    cycles = 0;
    for (int k = 0; k < 8; k++) begin
      ctrl.sign_ld = (k == 0); ctrl.mac_clr = (k == 0); ctrl.bl_prch = 0;
      ctrl.mac_step = 1; ctrl.mac_first = (k == 0);
      ctrl.bit_pos = 4'(7 - k); ctrl.force_one = (wb == 1);
      ctrl.mac_en = (k < wb - 1) || (wb == 1 && k == 0);
      ctrl.dpwm_en = ctrl.mac_en;
      cycles++; @(negedge clk);
    end
    ctrl.mac_step = 0; ctrl.mac_first = 0; ctrl.mac_en = 0; ctrl.dpwm_en = 0; ctrl.force_one = 0;
    ctrl.mac_fin = 1; ctrl.psum_load = 1; cycles++; @(negedge clk);
    ctrl = '0; ctrl.cb_code = 6'd32;
  endtask

  initial begin
    ctrl = '0; ctrl.cb_code = 6'd32;
    foreach (x_in[r]) x_in[r] = 0;
    foreach (wr_data[c]) wr_data[c] = 0;
    #12 rst_n = 1;
    // DPWM firing calibration (nominal cells fire at once)
    @(negedge clk); ctrl.dpwm_cal = 1; @(negedge clk); ctrl.dpwm_cal = 0;
    repeat (4) @(negedge clk);
    chk(!cal_busy && cal_fail == '0, "DPWM calibration");
    // weights for addresses 0..7, row by row
    for (int a = 0; a < 8; a++)
      for (int r = 0; r < R; r++) begin
        ctrl = '0; ctrl.cb_code = 6'd32; ctrl.mode = CM_WRITE; ctrl.sram_addr = 7'(a); ctrl.row_sel = 4'(r);
        for (int c = 0; c < C; c++) begin
          w[a][r][c] = (a == 7) ? 9'h0ff : 9'($urandom);
          wr_data[c] = w[a][r][c];
        end
        @(negedge clk);
      end
    for (int r = 0; r < R; r += 5) begin
      ctrl = '0; ctrl.cb_code = 6'd32; ctrl.mode = CM_READ; ctrl.sram_addr = 7'd3; ctrl.row_sel = 4'(r);
      @(negedge clk);
      for (int c = 0; c < C; c++) chk(rdata[c] == w[3][r][c], "weight read-back");
    end
    // MACs
    for (int t = 0; t < 60; t++) begin
      int a, wb, cyc;
      int xs [R];
      a  = t % 8;
      wb = (t < 18) ? 9 : 1 + (t % 9);
      for (int r = 0; r < R; r++) begin
        xs[r] = (t % 6 == 0) ? ((t % 12 == 0) ? 255 : -256) : $urandom_range(0, 511) - 256;
        x_in[r] = 9'(xs[r]);
      end
      mac(a, wb, cyc);
      chk(cyc == 9, "MAC takes 9 cycles");
      for (int c = 0; c < C; c++) begin
        int dd, d, rr, exact, ref_out;
        dd = 0; d = 0; rr = 0; exact = 0;
        for (int k = 0; k < 8; k++) begin
          int ch, an, v, q;
          ch = 0; an = 0;
          for (int r = 0; r < R; r++) begin
            logic b;
            int hi, lo, sg;
            b  = (wb == 1) ? (k == 0) : ((k < wb - 1) ? w[a][r][c][7 - k] : 1'b0);
            hi = xs[r] >>> 5; lo = xs[r] & 31; sg = w[a][r][c][8] ? -1 : 1;
            if (b) begin ch += sg * hi; an += sg * lo; exact += sg * xs[r] * (1 << (7 - k)); end
          end
          v = (k == 0) ? an : an + 2 * rr;
          q = (v >= 512) ? 3 : (v >= 0) ? 1 : (v >= -512) ? -1 : -3;
          rr = v - 256 * q;
          d = 2 * d + q;
          dd = 2 * dd + ch;
        end
        d = (d > 511) ? 511 : (d < -512) ? -512 : d;
        ref_out = (dd + 8 * d) >>> 3;
        chk(int'(dout[c]) == ref_out, $sformatf("t=%0d c=%0d dout %0d ref %0d", t, c, dout[c], ref_out));
        chk(real'(dout[c]) - real'(exact) / 256.0 < 2.0 && real'(exact) / 256.0 - real'(dout[c]) < 2.0,
            $sformatf("t=%0d c=%0d dout %0d exact/256 %f", t, c, dout[c], real'(exact) / 256.0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
