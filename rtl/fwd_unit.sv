// fwd_unit: operand forwarding MUXes at the end of the decode stage.
//
// Decode reads srcA/srcB from the register file, but a value an older
// instruction has computed may not be stored yet. Each operand therefore
// takes, in order of priority (youngest producer first):
//   e_valE  if execute will write it     (srcX == e_dstE)
//   m_valM  if memory has just loaded it (srcX == M.dstM)
//   M.valE  if memory carries it         (srcX == M.dstE)
//   W.valM  if writeback will load it    (srcX == W.dstM)
//   W.valE  if writeback will write it   (srcX == W.dstE)
//   the register file value otherwise.
// Forwarding goes only to the end of decode. A value still being loaded by
// an instruction in execute (E.dstM) cannot be forwarded: the hazard control
// stalls decode one cycle instead. For jXX and call, operand A is valP (the
// fall-through / return address), which travels down the pipe in valA.
// "No register" (0xF) never matches. Purely combinational. The fwd_* outputs
// tell which stage supplied an operand this cycle (for counting).
module fwd_unit
  import y86_pkg::*;
(
  input  icode_t d_icode,
  input  word_t  d_valP,
  input  regid_t srcA,
  input  regid_t srcB,
  input  word_t  rvalA,
  input  word_t  rvalB,
  input  regid_t e_dstE,
  input  word_t  e_valE,
  input  regid_t m_dstM,
  input  word_t  m_valM,
  input  regid_t m_dstE,
  input  word_t  m_valE,
  input  regid_t w_dstM,
  input  word_t  w_valM,
  input  regid_t w_dstE,
  input  word_t  w_valE,
  output word_t  valA,
  output word_t  valB,
  output logic   fwd_e,
  output logic   fwd_m,
  output logic   fwd_w
);

  typedef enum logic [2:0] {FROM_RF, FROM_E, FROM_MM, FROM_ME, FROM_WM, FROM_WE} src_t;

  function automatic src_t pick(regid_t s);
    if (s == R_NONE)      return FROM_RF;
    else if (s == e_dstE) return FROM_E;
    else if (s == m_dstM) return FROM_MM;
    else if (s == m_dstE) return FROM_ME;
    else if (s == w_dstM) return FROM_WM;
    else if (s == w_dstE) return FROM_WE;
    else                  return FROM_RF;
  endfunction

  function automatic word_t value(src_t p, word_t rv);
    unique case (p)
      FROM_E:  return e_valE;
      FROM_MM: return m_valM;
      FROM_ME: return m_valE;
      FROM_WM: return w_valM;
      FROM_WE: return w_valE;
      default: return rv;
    endcase
  endfunction

  src_t pa, pb;
  logic use_valP;

  assign use_valP = (d_icode == I_JXX || d_icode == I_CALL);
  assign pa = use_valP ? FROM_RF : pick(srcA);
  assign pb = pick(srcB);

  assign valA = use_valP ? d_valP : value(pa, rvalA);
  assign valB = value(pb, rvalB);

  assign fwd_e = (pa == FROM_E) || (pb == FROM_E);
  assign fwd_m = (pa == FROM_MM || pa == FROM_ME) || (pb == FROM_MM || pb == FROM_ME);
  assign fwd_w = (pa == FROM_WM || pa == FROM_WE) || (pb == FROM_WM || pb == FROM_WE);

endmodule
