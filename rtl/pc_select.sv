// pc_select: chooses the address sent to instruction memory this cycle.
//
// The register in front of fetch holds only the predicted PC. This MUX
// corrects it with information from later in the pipeline, one cycle after
// the deciding instruction has left execute:
//   - a conditional jump now in memory whose condition said "not taken"
//     (it was predicted taken): fetch its fall-through address, carried in
//     M.valA;
//   - a ret now in writeback: fetch the return address it loaded (W.valM);
//   - otherwise: the predicted PC.
// Purely combinational. Order of priority between the two corrections is this
// design's choice; they cannot both apply in the same cycle in this pipeline.
module pc_select
  import y86_pkg::*;
(
  input  word_t  pred_pc,
  input  icode_t m_icode,
  input  logic   m_cnd,
  input  word_t  m_valA,
  input  icode_t w_icode,
  input  word_t  w_valM,
  output word_t  f_pc
);

  always_comb begin
    if (m_icode == I_JXX && !m_cnd) f_pc = m_valA;
    else if (w_icode == I_RET)      f_pc = w_valM;
    else                            f_pc = pred_pc;
  end

endmodule
