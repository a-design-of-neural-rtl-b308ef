// Self-checking testbench of the instruction SRAM: write every word, read it
// back with one cycle of read latency, and check that reads see writes.
module tb_inst_sram;
  logic clk = 0, we;
  logic [8:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_m [512];
  int checks = 0, failures = 0;

  inst_sram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); we = 1; waddr = 9'(a); wdata = 16'($urandom); ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 511; a >= 0; a--) begin
      raddr = 9'(a); @(negedge clk);
      chk(rdata == ref_m[a], $sformatf("word %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
