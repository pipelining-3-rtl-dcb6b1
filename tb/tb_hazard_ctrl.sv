// tb_hazard_ctrl: random pipeline contents checked against the control rules:
// a load in execute whose destination decode reads stalls fetch and decode
// and bubbles execute; a ret in decode, execute or memory holds fetch and
// bubbles decode (unless decode is stalled by a load); a not-taken jump in
// execute bubbles decode and execute; a bad status in memory or writeback
// bubbles memory and blocks the condition codes, and in writeback stalls it.
// Stall and bubble are never both asserted for one register.
`timescale 1ns/1ps
module tb_hazard_ctrl;
  import y86_pkg::*;
  icode_t d_icode, e_icode, m_icode;
  regid_t d_srcA, d_srcB, e_dstM;
  logic   e_cnd;
  stat_t  m_stat, w_stat;
  logic   f_stall, d_stall, d_bubble, e_bubble, m_bubble, w_stall, cc_enable;
  logic   load_use, ret_wait, mispredict;
  int checks = 0, failures = 0;
  int n_lu = 0, n_ret = 0, n_mp = 0;

  hazard_ctrl dut (.d_icode, .d_srcA, .d_srcB, .e_icode, .e_dstM, .e_cnd, .m_icode,
                   .m_stat, .w_stat, .f_stall, .d_stall, .d_bubble, .e_bubble, .m_bubble,
                   .w_stall, .cc_enable, .load_use, .ret_wait, .mispredict);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic icode_t pick_icode();
    int p = $urandom_range(9);
    if (p < 3) return I_MRMOVQ;
    if (p < 5) return I_RET;
    if (p < 7) return I_JXX;
    return icode_t'($urandom_range(9));
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      bit lu, rt, mp, exc;
      d_icode = pick_icode(); e_icode = pick_icode(); m_icode = pick_icode();
      d_srcA = regid_t'($urandom_range(3) == 0 ? 15 : $urandom_range(3));
      d_srcB = regid_t'($urandom_range(3) == 0 ? 15 : $urandom_range(3));
      e_dstM = regid_t'($urandom_range(3) == 0 ? 15 : $urandom_range(3));
      e_cnd  = 1'($urandom);
      m_stat = ($urandom_range(7) == 0) ? stat_t'($urandom_range(3)) : S_AOK;
      w_stat = ($urandom_range(7) == 0) ? stat_t'($urandom_range(3)) : S_AOK;
      #1;
      lu  = (e_icode == I_MRMOVQ) && e_dstM != 15 && (e_dstM == d_srcA || e_dstM == d_srcB);
      rt  = (d_icode == I_RET) || (e_icode == I_RET) || (m_icode == I_RET);
      mp  = (e_icode == I_JXX) && !e_cnd;
      exc = (m_stat != S_AOK) || (w_stat != S_AOK);
      checks++;
      if (load_use != lu || ret_wait != rt || mispredict != mp ||
          f_stall != (lu || rt) || d_stall != lu ||
          d_bubble != (mp || (rt && !lu)) || e_bubble != (mp || lu) ||
          m_bubble != exc || w_stall != (w_stat != S_AOK) || cc_enable != !exc ||
          (d_stall && d_bubble)) begin
        failures++;
        $display("FAIL d=%0d e=%0d m=%0d srcA=%0d srcB=%0d dstM=%0d cnd=%0d", d_icode, e_icode,
                 m_icode, d_srcA, d_srcB, e_dstM, e_cnd);
      end
      n_lu += int'(lu); n_ret += int'(rt); n_mp += int'(mp);
    end
    checks++;
    if (n_lu == 0 || n_ret == 0 || n_mp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
