// Accumulation logic of the cyclic MAC unit.
//
// Collects the signed 3-bit ADC outputs (-3, -1, +1, +3) of the eight cycles
// of a MAC, most significant first, by shift-and-add: acc := 2*acc + q. The
// result (DANA) is the analog weighted sum of the column's lower 5-bit inputs
// scaled by 1/256, within one LSB. The document gives a signed 10-bit
// result; the raw sum can reach +/-765 when the analog input is out of range,
// so the output saturates to the 10-bit range (this design's choice).
// Timing: acc updates on each mac_step edge; mac_clr together with mac_step
// (the first cycle) restarts it from this cycle's q, mac_clr alone clears
// it. dana is valid the cycle after the eighth step.
module cmu_acc #(
  parameter int unsigned OUT_W = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mac_clr,
  input  logic                    mac_step,
  input  logic signed [2:0]       qtzd,
  output logic signed [OUT_W-1:0] dana
);
  logic signed [OUT_W+1:0] acc;
  localparam logic signed [OUT_W+1:0] MAXV = (OUT_W+2)'((1 << (OUT_W-1)) - 1);
  localparam logic signed [OUT_W+1:0] MINV = -(OUT_W+2)'(1 << (OUT_W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (mac_step) acc <= (mac_clr ? '0 : acc <<< 1) + (OUT_W+2)'(qtzd);
    else if (mac_clr)  acc <= '0;
  end
  always_comb begin
    if      (acc > MAXV) dana = MAXV[OUT_W-1:0];
    else if (acc < MINV) dana = MINV[OUT_W-1:0];
    else                 dana = acc[OUT_W-1:0];
  end
endmodule
