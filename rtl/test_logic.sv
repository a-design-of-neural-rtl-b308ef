// Test logic: the on-chip controller that turns instruction codes into the
// cycle-by-cycle control of the computation core (the IC has too few pads to
// drive the core's control signals from outside).
//
// Instruction loading: with prg_en high, words on the programming port are
// written into the instruction SRAM. With prg_en low and run high the
// controller executes, fetching either from the instruction SRAM at the
// program counter (inst_src = 0) or from the instruction bus port with a
// valid/ready handshake (inst_src = 1).
// Execution: each instruction takes a fetch cycle (two from the SRAM, whose
// read is synchronous; one from the bus port), then a state counter
// steps through its states while combinational instruction logic produces
// the core controls for each state (MUL: 8 cyclic-MAC cycles, the first also
// loading the weight sign, and a combine cycle, 9 in all as in the document; ERA: 128 erase cycles; RCV/SND: 9 serial bit cycles).
// Data: four 9-bit registers per array row (inputs) and per column (outputs),
// serial bus ports (one line per row in, one per column out), an offset
// register that renames register indices in loops, eight nested loop
// counters, and a monitor selector that puts internal control signals on
// bus_out. The ISA is listed in tl_pkg.
// The structure (instruction SRAM, state counter, combinational instruction
// logic, register files, 21 instructions, two loading phases, monitor) is the
// document's; the encoding, operand layouts and cycle counts are this
// design's choices.
module test_logic
  import mpe_pkg::*;
  import tl_pkg::*;
#(
  parameter int unsigned ROWS       = ROWS_DEF,
  parameter int unsigned COLS       = COLS_DEF,
  parameter int unsigned IMEM_DEPTH = 512,
  parameter int unsigned NREG       = 4,
  parameter int unsigned NLOOP      = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // instruction loading
  input  logic                      prg_en,
  input  logic                      prg_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prg_addr,
  input  logic [15:0]               prg_data,
  input  logic                      run,
  input  logic                      inst_src,
  input  logic [15:0]               bus_inst,
  input  logic                      bus_inst_valid,
  output logic                      bus_inst_ready,
  // serial data ports
  input  logic [ROWS-1:0]           bus_in,
  output logic [COLS-1:0]           bus_out,
  // computation core
  output core_ctrl_t                ctrl,
  output logic signed [DATA_W-1:0]  x_out   [ROWS],
  output logic        [WORD_W-1:0]  wr_data [COLS],
  input  logic signed [DOUT_W-1:0]  dout    [COLS],
  input  logic signed [PSUM_W-1:0]  psum    [COLS],
  input  logic        [WORD_W-1:0]  rdata   [COLS],
  input  logic                      dpwm_cal_busy,
  // status
  output logic [$clog2(IMEM_DEPTH)-1:0] pc,
  output logic                      busy
);
  localparam int unsigned PCW = $clog2(IMEM_DEPTH);
  localparam int unsigned RW  = $clog2(NREG);
  localparam int unsigned LW  = $clog2(NLOOP);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_LOAD, S_EXEC} st_e;
  st_e st;

  logic [15:0]       imem_q, ir;
  opcode_e           op;
  logic [10:0]       arg;
  logic [7:0]        stc;          // state counter
  logic              last;         // last state of the current instruction

  // configuration state
  logic [ADDR_W-1:0] sram_addr;
  logic [3:0]        sign_pos, wbits, row_sel;
  logic [CB_W-1:0]   cb_code;
  logic [2:0]        mon_sel;
  logic [RW-1:0]     reg_ofs;
  logic [PCW-1:0]    loop_pc  [NLOOP];
  logic [7:0]        loop_cnt [NLOOP];

  // register files
  logic [DATA_W-1:0] rreg [NREG][ROWS];
  logic [DATA_W-1:0] creg [NREG][COLS];

  inst_sram #(.DEPTH(IMEM_DEPTH), .WIDTH(16)) u_imem (
    .clk, .we(prg_en && prg_we), .waddr(prg_addr), .wdata(prg_data),
    .raddr(pc), .rdata(imem_q)
  );

  assign op  = opcode_e'(ir[15:11]);
  assign arg = ir[10:0];

  // register indices after the loop offset
  logic [RW-1:0] ra, rb, rc;
  assign ra = RW'(arg[1:0]) + reg_ofs;
  assign rb = RW'(arg[3:2]) + reg_ofs;
  assign rc = RW'(arg[5:4]) + reg_ofs;

  // ------------------------------------------------------------------ length
  always_comb begin
    unique case (op)
      OP_ERA:  last = (stc == 8'(2**ADDR_W - 1));
      OP_CFD:  last = !arg[0] || (stc >= 8'd2 && !dpwm_cal_busy);
      OP_SRR:  last = (stc == 8'd1);
      OP_RCV, OP_SND: last = (stc == 8'(DATA_W - 1));
      OP_MUL:  last = (stc == 8'(NCYC));
      OP_CNT:  last = (stc >= arg[7:0]);
      default: last = 1'b1;
    endcase
  end

  // ------------------------------------------------------ core control
  logic [3:0] k;      // MAC cycle index 0..7
  logic [3:0] nmag;   // number of magnitude bits
  logic signed [DOUT_W+1:0] err [COLS];
  always_comb begin
    k    = 4'(stc);
    nmag = (wbits == 4'd0) ? 4'd0 : wbits - 4'd1;
    ctrl = '0;
    ctrl.sram_addr = sram_addr;
    ctrl.row_sel   = row_sel;
    ctrl.cb_code   = cb_code;
    ctrl.bit_pos   = sign_pos;
    ctrl.sign_pos  = sign_pos;
    ctrl.bl_prch   = 1'b1;
    if (st == S_EXEC) begin
      unique case (op)
        OP_ERA: begin ctrl.mode = CM_ERASE; ctrl.sram_addr = ADDR_W'(stc); end
        OP_CFD: ctrl.dpwm_cal = arg[0] && (stc == 8'd0);
        OP_SRR: if (stc == 8'd0) ctrl.mode = CM_READ;
        OP_SRW: ctrl.mode = CM_WRITE;
        OP_UPD: ctrl.mode = arg[10] ? CM_CALG : CM_CALW;
        OP_MUL: begin
          ctrl.mode = CM_MAC;
          if (stc < 8'(NCYC)) begin
            ctrl.sign_ld   = (k == 4'd0);
            ctrl.mac_clr   = (k == 4'd0);
            ctrl.bl_prch   = 1'b0;
            ctrl.mac_step  = 1'b1;
            ctrl.mac_first = (k == 4'd0);
            ctrl.bit_pos   = sign_pos - 4'd1 - k;
            ctrl.force_one = (wbits == 4'd1);
            ctrl.mac_en    = (k < nmag) || (wbits == 4'd1 && k == 4'd0);
            ctrl.dpwm_en   = ctrl.mac_en;
          end else begin
            ctrl.mac_fin   = 1'b1;
            ctrl.psum_load = arg[2];
          end
        end
        default: ;
      endcase
    end
  end

  // data towards the core
  always_comb begin
    for (int r = 0; r < ROWS; r++) x_out[r] = signed'(rreg[ra][r]);
    for (int c = 0; c < COLS; c++) begin
      logic signed [DOUT_W+1:0] t;
      logic [DOUT_W+1:0] mag;
      t = '0;
      for (int r = 0; r < ROWS; r++) t += (DOUT_W+2)'(signed'(rreg[ra][r]));
      err[c] = (DOUT_W+2)'(dout[c]) - t;
      mag    = (err[c] < 0) ? (DOUT_W+2)'(-err[c]) : (DOUT_W+2)'(err[c]);
      if (op == OP_UPD && arg[10])
        wr_data[c] = {6'b0, err[c] < 0, (mag > 3) ? 2'd3 : mag[1:0]};
      else
        wr_data[c] = creg[ra][c];
    end
  end

  // ------------------------------------------------------ sequencing
  assign bus_inst_ready = (st == S_FETCH) && inst_src;
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; ir <= '0; stc <= '0;
      sram_addr <= '0; sign_pos <= 4'd8; wbits <= 4'd9; row_sel <= '0;
      cb_code <= CB_W'(32); mon_sel <= '0; reg_ofs <= '0;
      for (int i = 0; i < NLOOP; i++) begin loop_pc[i] <= '0; loop_cnt[i] <= '0; end
    end else begin
      unique case (st)
        S_IDLE:  if (run && !prg_en) st <= S_FETCH;
        S_FETCH: begin
          if (!run || prg_en) st <= S_IDLE;
          else if (!inst_src) st <= S_LOAD;
          else if (bus_inst_valid) begin ir <= bus_inst; st <= S_EXEC; stc <= '0; end
        end
        S_LOAD: begin ir <= imem_q; st <= S_EXEC; stc <= '0; end
        S_EXEC: begin
          stc <= stc + 8'd1;
          if (last) begin
            st <= S_FETCH;
            pc <= pc + PCW'(1);
            unique case (op)
              OP_SSA: sram_addr <= arg[ADDR_W-1:0];
              OP_CFC: cb_code   <= arg[CB_W-1:0];
              OP_SFT: row_sel   <= arg[3:0];
              OP_SSB: begin sign_pos <= arg[3:0]; wbits <= arg[7:4]; end
              OP_SFS: mon_sel   <= arg[2:0];
              OP_JMP: pc        <= arg[PCW-1:0];
              OP_LPS: begin
                loop_pc[arg[LW-1:0]]  <= pc + PCW'(1);
                loop_cnt[arg[LW-1:0]] <= (arg[10:3] == 8'd0) ? 8'd0 : arg[10:3] - 8'd1;
              end
              OP_LPE: begin
                if (arg[3]) sram_addr <= sram_addr + 1'b1;
                if (arg[4]) sign_pos  <= sign_pos - wbits;
                if (arg[5]) reg_ofs   <= reg_ofs + 1'b1;
                if (loop_cnt[arg[LW-1:0]] != 8'd0) begin
                  loop_cnt[arg[LW-1:0]] <= loop_cnt[arg[LW-1:0]] - 8'd1;
                  pc <= loop_pc[arg[LW-1:0]];
                end
              end
              default: ;
            endcase
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // register files
  always_ff @(posedge clk) begin
    if (st == S_EXEC) begin
      unique case (op)
        OP_RCV: if (arg[2]) begin
                  for (int i = 0; i < ROWS && i < COLS; i++) creg[ra][i] <= {creg[ra][i][DATA_W-2:0], bus_in[i]};
                end else begin
                  for (int r = 0; r < ROWS; r++) rreg[ra][r] <= {rreg[ra][r][DATA_W-2:0], bus_in[r]};
                end
        OP_SRR: if (stc == 8'd1) for (int c = 0; c < COLS; c++) creg[ra][c] <= rdata[c];
        OP_ADD: for (int c = 0; c < COLS; c++) creg[ra][c] <= sat9(18'(signed'(creg[rb][c])) + 18'(signed'(creg[rc][c])));
        OP_ATV: for (int c = 0; c < COLS; c++)
                  creg[ra][c] <= (psum[c] < 0) ? '0 : sat9(18'(psum[c] >>> arg[5:2]));
        OP_LDA: for (int i = 0; i < ROWS && i < COLS; i++) rreg[rb][i] <= creg[ra][i];
        OP_MXP: for (int c = 0; c < COLS; c++)
                  if (signed'(creg[rb][c]) > signed'(creg[ra][c])) creg[ra][c] <= creg[rb][c];
        default: ;
      endcase
    end
  end

  function automatic logic [DATA_W-1:0] sat9(logic signed [17:0] v);
    if (v > 18'sd255)  return 9'h0ff;
    if (v < -18'sd256) return 9'h100;
    return v[DATA_W-1:0];
  endfunction

  // serial output and monitor
  logic [15:0] mon;
  always_comb begin
    unique case (mon_sel)
      3'd1: mon = {ctrl.mode, ctrl.sign_ld, ctrl.mac_en, ctrl.mac_step, ctrl.mac_first,
                   ctrl.mac_fin, ctrl.mac_clr, ctrl.dpwm_en, ctrl.bl_prch, ctrl.psum_load,
                   ctrl.force_one, ctrl.dpwm_cal, 2'b00};
      3'd2: mon = {ctrl.sram_addr, ctrl.bit_pos, ctrl.row_sel, 1'b0};
      3'd3: mon = {7'(pc), 1'b0, stc};
      default: mon = '0;
    endcase
    for (int c = 0; c < COLS; c++) begin
      if (st == S_EXEC && op == OP_SND) bus_out[c] = creg[ra][c][DATA_W - 1 - int'(stc)];
      else                              bus_out[c] = (c < 16) ? mon[c % 16] : 1'b0;
    end
  end

  // a MAC never starts with an invalid weight format
  a_wbits: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_EXEC && op == OP_MUL) |-> (wbits >= 4'd1 && wbits <= 4'd9 && sign_pos >= wbits - 4'd1));
endmodule
