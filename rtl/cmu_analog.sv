// Behavioural model (not synthesizable logic): the analog half of the cyclic
// MAC unit (CMU) at the bottom of each column: bit-line precharger, capacitor
// bank, cyclic accumulator, 4-level flash ADC, reference DAC and resistor
// reference.
//
// Each cycle the column's MPE currents leave a differential bit-line voltage
// V_BL. The cyclic accumulator forms V = V_BL + 2 x V_RSD (on the first cycle
// of a MAC simply V = V_BL), the ADC quantises V with thresholds 0 and
// +/-V_M/2 into q in {-3,-1,+1,+3}, the DAC subtracts the level's midpoint
// q x V_M/4, and the remainder becomes the residue for the next cycle
// (|V_RSD| <= V_M/4). Eight such cycles give a signed 10-bit result after
// shift-and-add (cmu_acc), whatever the weight precision.
//
// Voltages are normalised: one unit is the bit-line swing of one input LSB x
// one unit current pulse, and V_M = 1024 units, so a full-scale column sum of
// 16 x 31 stays within the input range V_M/2 the three-comparator quantiser
// allows. The capacitor bank code scales V_BL by CB_NOM/cb_code (63 levels;
// CB_NOM is the setting that gives the nominal scale). With bl_prch high the
// lines are held at the precharge level (V_BL = 0).
// Timing: q is combinational from this cycle's bit-line value and the stored
// residue; the residue register updates on the clock edge of a mac_step
// cycle (mac_first ignores the stored residue) and clears with mac_clr
// outside a step. The switched-capacitor phases (sample,
// transfer, reset, double, subtract) are folded into one control cycle.
module cmu_analog
  import mpe_pkg::*;
#(
  parameter int CB_NOM = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  real             q_p,       // charge removed from BLp this cycle
  input  real             q_n,       // charge removed from BLn this cycle
  input  logic            bl_prch,
  input  logic [CB_W-1:0] cb_code,
  input  logic            mac_clr,
  input  logic            mac_step,
  input  logic            mac_first,
  output logic signed [2:0] qtzd,    // ADC output: -3, -1, +1, +3
  output real             v_out      // accumulator output voltage (observation)
);
  real v_rsd, v_bl, v_acc;

  always_comb begin
    if (bl_prch || cb_code == '0) v_bl = 0.0;
    else                          v_bl = (q_n - q_p) * real'(CB_NOM) / real'(cb_code);
    v_acc = mac_first ? v_bl : v_bl + 2.0 * v_rsd;
    if      (v_acc >= real'(VM) / 2.0)  qtzd = 3'sd3;
    else if (v_acc >= 0.0)              qtzd = 3'sd1;
    else if (v_acc >= -real'(VM) / 2.0) qtzd = -3'sd1;
    else                                qtzd = -3'sd3;
    v_out = v_acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        v_rsd <= 0.0;
    else if (mac_step) v_rsd <= v_acc - real'(qtzd) * real'(VM) / 4.0;
    else if (mac_clr)  v_rsd <= 0.0;
  end
endmodule
