// hazard_ctrl: stall and bubble control for the five pipeline registers.
//
// Three hazards are resolved by holding or squashing instructions:
//   load/use   - the instruction in execute is mrmovq and the instruction in
//                decode reads its destination. Forwarding cannot help (the
//                value comes out of memory a cycle too late), so fetch and
//                decode are stalled one cycle and a bubble enters execute;
//                afterwards the value is forwarded from memory.
//   ret        - the return address is known only when ret has loaded it.
//                While a ret is in decode, execute or memory, fetch is held
//                and decode receives bubbles; the fetch PC is taken from the
//                ret in writeback (3 extra cycles, 4 in total per ret).
//   mispredict - jumps are predicted taken. When a jump in execute finds its
//                condition false, the two instructions fetched from the
//                target (now in decode and fetch) are squashed by bubbling
//                decode and execute (2 extra cycles); the next fetch uses the
//                fall-through address.
// Beyond that, once an instruction with a non-AOK status reaches memory or
// writeback, later instructions are kept from changing state: the memory
// register gets bubbles, condition codes are not set, and writeback holds
// the excepting instruction. This exception handling is this design's
// choice. Purely combinational.
module hazard_ctrl
  import y86_pkg::*;
(
  input  icode_t d_icode,
  input  regid_t d_srcA,
  input  regid_t d_srcB,
  input  icode_t e_icode,
  input  regid_t e_dstM,
  input  logic   e_cnd,
  input  icode_t m_icode,
  input  stat_t  m_stat,      // status leaving the memory stage this cycle
  input  stat_t  w_stat,
  output logic   f_stall,
  output logic   d_stall,
  output logic   d_bubble,
  output logic   e_bubble,
  output logic   m_bubble,
  output logic   w_stall,
  output logic   cc_enable,
  output logic   load_use,
  output logic   ret_wait,
  output logic   mispredict
);

  logic later_exc;

  assign load_use   = (e_icode == I_MRMOVQ) && (e_dstM != R_NONE) &&
                      (e_dstM == d_srcA || e_dstM == d_srcB);
  assign ret_wait   = (d_icode == I_RET) || (e_icode == I_RET) || (m_icode == I_RET);
  assign mispredict = (e_icode == I_JXX) && !e_cnd;

  assign later_exc  = (m_stat != S_AOK) || (w_stat != S_AOK);

  assign f_stall   = load_use || ret_wait;
  assign d_stall   = load_use;
  assign d_bubble  = mispredict || (!load_use && ret_wait);
  assign e_bubble  = mispredict || load_use;
  assign m_bubble  = later_exc;
  assign w_stall   = (w_stat != S_AOK);
  assign cc_enable = !later_exc;

endmodule
