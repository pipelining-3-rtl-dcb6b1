// y86_pipe: five-stage pipelined Y86-64 processor with branch prediction,
// forwarding and stalling.
//
// Stages: fetch, decode, execute, memory, writeback, separated by pipeline
// registers F (predicted PC), D, E, M and W, each a stall/bubble register
// bank (pipe_reg). Condition codes change in execute, data memory in memory,
// registers and status in writeback; fetch and decode change nothing outside
// the pipeline registers, so squashing an instruction there only means
// overwriting its register with a bubble.
//
// Control flow: fetch predicts every jump and call taken (next PC = valC),
// everything else falls through (valP). The PC register is replaced by a
// predicted-PC register; at the start of each cycle pc_select corrects it:
// with M.valA when the jump now in memory was not taken, with W.valM when a
// ret is in writeback. Data hazards: operands are forwarded to the end of
// decode from execute, memory and writeback; a load followed directly by a
// user of its result costs one stall cycle.
//
// Cycles per instruction (no data hazards): 1 for a taken jump, 3 for a
// not-taken jump, 4 for ret, 1 for everything else, plus 1 per load/use pair.
//
// Interface: the instruction memory is loaded through imem_* (one byte per
// clock) while rst is held; the data memory can be preloaded and read
// through dmem_dbg_*, registers read through dbg_reg. stat is the status of
// the instruction in writeback; halted goes high when a halt (or an error)
// reaches writeback, after which no state changes. events flags, per cycle,
// each stall, bubble and forwarding event and each retired instruction.
// Supported instructions: halt, nop, rrmovq, irmovq, rmmovq, mrmovq, OPq
// (add/sub/and/xor), jXX, call, ret. Memory sizes are this design's choice.
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       imem_we,
  input  word_t      imem_waddr,
  input  logic [7:0] imem_wdata,
  input  logic       dmem_dbg_we,
  input  word_t      dmem_dbg_addr,
  input  logic [7:0] dmem_dbg_wdata,
  output logic [7:0] dmem_dbg_rdata,
  input  regid_t     dbg_reg,
  output word_t      dbg_reg_val,
  output word_t      fetch_pc,
  output cc_t        cc,
  output stat_t      stat,
  output logic       halted,
  output events_t    events
);

  f_reg_t F, f_next;
  d_reg_t D, d_next;
  e_reg_t E, e_next;
  m_reg_t M, m_next;
  w_reg_t W, w_next;

  logic f_stall, d_stall, d_bubble, e_bubble, m_bubble, w_stall, cc_enable;
  logic load_use, ret_wait, mispredict;

  // ---------------------------------------------------------------- fetch
  word_t       f_pc;
  logic [79:0] ibytes;

  pc_select u_pc_select (
    .pred_pc (F.pred_pc),
    .m_icode (M.icode), .m_cnd (M.cnd), .m_valA (M.valA),
    .w_icode (W.icode), .w_valM (W.valM),
    .f_pc    (f_pc)
  );

  instr_mem #(.IMEM_BYTES(IMEM_BYTES)) u_imem (
    .clk (clk), .we (imem_we), .waddr (imem_waddr), .wdata (imem_wdata),
    .pc (f_pc), .ibytes (ibytes)
  );

  fetch_predict #(.IMEM_BYTES(IMEM_BYTES)) u_fetch (
    .pc (f_pc), .ibytes (ibytes),
    .stat (d_next.stat), .icode (d_next.icode), .ifun (d_next.ifun),
    .rA (d_next.rA), .rB (d_next.rB), .valC (d_next.valC), .valP (d_next.valP),
    .pred_pc (f_next.pred_pc)
  );

  pipe_reg #(.T(f_reg_t), .DEFAULT(F_RESET)) u_F (
    .clk (clk), .rst (rst), .stall (f_stall), .bubble (1'b0), .d (f_next), .q (F));

  pipe_reg #(.T(d_reg_t), .DEFAULT(D_BUBBLE)) u_D (
    .clk (clk), .rst (rst), .stall (d_stall), .bubble (d_bubble), .d (d_next), .q (D));

  // --------------------------------------------------------------- decode
  regid_t d_srcA, d_srcB, d_dstE, d_dstM;
  word_t  rvalA, rvalB, d_valA, d_valB;
  logic   fwd_e, fwd_m, fwd_w;
  word_t  e_valE, m_valM;
  regid_t w_dstE_wr, w_dstM_wr;

  always_comb begin
    unique case (D.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ: d_srcA = D.rA;
      I_RET:                     d_srcA = R_RSP;
      default:                   d_srcA = R_NONE;
    endcase
    unique case (D.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ: d_srcB = D.rB;
      I_CALL, I_RET:             d_srcB = R_RSP;
      default:                   d_srcB = R_NONE;
    endcase
    unique case (D.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ: d_dstE = D.rB;
      I_CALL, I_RET:             d_dstE = R_RSP;
      default:                   d_dstE = R_NONE;
    endcase
    d_dstM = (D.icode == I_MRMOVQ) ? D.rA : R_NONE;
  end

  // A writeback with a bad status changes no register.
  assign w_dstE_wr = (W.stat == S_AOK) ? W.dstE : R_NONE;
  assign w_dstM_wr = (W.stat == S_AOK) ? W.dstM : R_NONE;

  regfile u_rf (
    .clk (clk), .rst (rst),
    .srcA (d_srcA), .srcB (d_srcB), .rvalA (rvalA), .rvalB (rvalB),
    .dstE (w_dstE_wr), .valE (W.valE), .dstM (w_dstM_wr), .valM (W.valM),
    .dbg_reg (dbg_reg), .dbg_val (dbg_reg_val)
  );

  fwd_unit u_fwd (
    .d_icode (D.icode), .d_valP (D.valP),
    .srcA (d_srcA), .srcB (d_srcB), .rvalA (rvalA), .rvalB (rvalB),
    .e_dstE (E.dstE), .e_valE (e_valE),
    .m_dstM (M.dstM), .m_valM (m_valM),
    .m_dstE (M.dstE), .m_valE (M.valE),
    .w_dstM (W.dstM), .w_valM (W.valM),
    .w_dstE (W.dstE), .w_valE (W.valE),
    .valA (d_valA), .valB (d_valB),
    .fwd_e (fwd_e), .fwd_m (fwd_m), .fwd_w (fwd_w)
  );

  assign e_next = '{stat: D.stat, icode: D.icode, ifun: D.ifun, valC: D.valC,
                    valA: d_valA, valB: d_valB, dstE: d_dstE, dstM: d_dstM};

  pipe_reg #(.T(e_reg_t), .DEFAULT(E_BUBBLE)) u_E (
    .clk (clk), .rst (rst), .stall (1'b0), .bubble (e_bubble), .d (e_next), .q (E));

  // -------------------------------------------------------------- execute
  word_t      alu_a, alu_b;
  logic [3:0] alu_fun;
  cc_t        cc_new;
  logic       e_cnd;

  always_comb begin
    unique case (E.icode)
      I_RRMOVQ, I_OPQ:               alu_a = E.valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:  alu_a = E.valC;
      I_CALL:                        alu_a = -64'sd8;
      I_RET:                         alu_a = 64'd8;
      default:                       alu_a = '0;
    endcase
    unique case (E.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_RET: alu_b = E.valB;
      default:                                  alu_b = '0;
    endcase
    alu_fun = (E.icode == I_OPQ) ? E.ifun : A_ADD;
  end

  alu u_alu (.a (alu_a), .b (alu_b), .fun (alu_fun), .result (e_valE), .cc_new (cc_new));

  cond_unit u_cc (
    .clk (clk), .rst (rst),
    .set_cc (E.icode == I_OPQ && cc_enable), .cc_new (cc_new),
    .ifun (E.ifun), .cc (cc), .cnd (e_cnd)
  );

  assign m_next = '{stat: E.stat, icode: E.icode, cnd: e_cnd, valE: e_valE,
                    valA: E.valA, dstE: E.dstE, dstM: E.dstM};

  pipe_reg #(.T(m_reg_t), .DEFAULT(M_BUBBLE)) u_M (
    .clk (clk), .rst (rst), .stall (1'b0), .bubble (m_bubble), .d (m_next), .q (M));

  // --------------------------------------------------------------- memory
  word_t mem_addr;
  logic  mem_rd, mem_wr, dmem_err;
  stat_t m_stat;

  always_comb begin
    unique case (M.icode)
      I_RMMOVQ, I_MRMOVQ, I_CALL: mem_addr = M.valE;
      I_RET:                      mem_addr = M.valA;
      default:                    mem_addr = '0;
    endcase
  end
  assign mem_rd = (M.icode == I_MRMOVQ) || (M.icode == I_RET);
  assign mem_wr = (M.icode == I_RMMOVQ) || (M.icode == I_CALL);

  data_mem #(.DMEM_BYTES(DMEM_BYTES)) u_dmem (
    .clk (clk), .rd (mem_rd), .wr (mem_wr), .addr (mem_addr), .wdata (M.valA),
    .rdata (m_valM), .err (dmem_err),
    .dbg_we (dmem_dbg_we), .dbg_addr (dmem_dbg_addr),
    .dbg_wdata (dmem_dbg_wdata), .dbg_rdata (dmem_dbg_rdata)
  );

  assign m_stat = dmem_err ? S_ADR : M.stat;

  assign w_next = '{stat: m_stat, icode: M.icode, valE: M.valE, valM: m_valM,
                    dstE: M.dstE, dstM: M.dstM};

  pipe_reg #(.T(w_reg_t), .DEFAULT(W_BUBBLE)) u_W (
    .clk (clk), .rst (rst), .stall (w_stall), .bubble (1'b0), .d (w_next), .q (W));

  // -------------------------------------------------------------- control
  hazard_ctrl u_hz (
    .d_icode (D.icode), .d_srcA (d_srcA), .d_srcB (d_srcB),
    .e_icode (E.icode), .e_dstM (E.dstM), .e_cnd (e_cnd),
    .m_icode (M.icode), .m_stat (m_stat), .w_stat (W.stat),
    .f_stall (f_stall), .d_stall (d_stall), .d_bubble (d_bubble),
    .e_bubble (e_bubble), .m_bubble (m_bubble), .w_stall (w_stall),
    .cc_enable (cc_enable),
    .load_use (load_use), .ret_wait (ret_wait), .mispredict (mispredict)
  );

  // -------------------------------------------------------------- outputs
  assign fetch_pc = f_pc;
  assign stat     = W.stat;
  assign halted   = (W.stat != S_AOK);

  always_comb begin
    events.load_use   = load_use;
    events.ret_wait   = ret_wait;
    events.mispredict = mispredict;
    events.fwd_e      = fwd_e;
    events.fwd_m      = fwd_m;
    events.fwd_w      = fwd_w;
    events.retire     = (W.icode != I_NOP) && (W.stat == S_AOK) && !w_stall;
  end

endmodule
