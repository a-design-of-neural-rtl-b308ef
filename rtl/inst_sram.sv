// Instruction SRAM of the test logic: DEPTH words of WIDTH bits, one write
// port used in the programming phase and one synchronous read port used by
// the instruction fetch (data valid the cycle after the address).
module inst_sram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
