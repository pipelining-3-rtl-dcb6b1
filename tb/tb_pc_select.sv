// tb_pc_select: checks the fetch-address MUX on random inputs: a not-taken
// jump in memory selects M.valA, a ret in writeback selects W.valM, anything
// else selects the predicted PC.
`timescale 1ns/1ps
module tb_pc_select;
  import y86_pkg::*;
  word_t  pred_pc, m_valA, w_valM, f_pc;
  icode_t m_icode, w_icode;
  logic   m_cnd;
  int checks = 0, failures = 0;

  pc_select dut (.pred_pc, .m_icode, .m_cnd, .m_valA, .w_icode, .w_valM, .f_pc);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      word_t exp;
      pred_pc = {$urandom, $urandom}; m_valA = {$urandom, $urandom}; w_valM = {$urandom, $urandom};
      m_icode = ($urandom_range(2) == 0) ? I_JXX : icode_t'($urandom_range(9));
      w_icode = ($urandom_range(2) == 0) ? I_RET : icode_t'($urandom_range(9));
      if (m_icode == I_JXX) w_icode = ($urandom_range(1) == 0) ? I_NOP : w_icode;
      m_cnd = 1'($urandom);
      #1;
      if (m_icode == I_JXX && m_cnd == 0) exp = m_valA;
      else if (w_icode == I_RET)          exp = w_valM;
      else                                exp = pred_pc;
      checks++;
      if (f_pc !== exp) begin
        failures++;
        $display("FAIL m_icode=%0d cnd=%0d w_icode=%0d f_pc=%h exp=%h", m_icode, m_cnd, w_icode, f_pc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
