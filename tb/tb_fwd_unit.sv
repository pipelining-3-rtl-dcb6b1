// tb_fwd_unit: random register numbers drawn from a small set, so that
// sources often match several in-flight destinations, checked against the
// forwarding priority execute > memory (loaded) > memory (computed) >
// writeback (loaded) > writeback (computed) > register file, with valP
// replacing operand A for jXX and call and 0xF never matching.
`timescale 1ns/1ps
module tb_fwd_unit;
  import y86_pkg::*;
  icode_t d_icode;
  word_t  d_valP, rvalA, rvalB, e_valE, m_valM, m_valE, w_valM, w_valE, valA, valB;
  regid_t srcA, srcB, e_dstE, m_dstM, m_dstE, w_dstM, w_dstE;
  logic   fwd_e, fwd_m, fwd_w;
  int checks = 0, failures = 0;
  int n_e = 0, n_m = 0, n_w = 0;

  fwd_unit dut (.d_icode, .d_valP, .srcA, .srcB, .rvalA, .rvalB, .e_dstE, .e_valE,
                .m_dstM, .m_valM, .m_dstE, .m_valE, .w_dstM, .w_valM, .w_dstE, .w_valE,
                .valA, .valB, .fwd_e, .fwd_m, .fwd_w);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic regid_t pick_reg();
    int r = $urandom_range(4);
    return (r == 4) ? R_NONE : regid_t'(r);
  endfunction

  // Returns the expected value and which stage (0 rf, 1 E, 2 M, 3 W).
  function automatic word_t expect_val(regid_t s, word_t rv, output int from);
    from = 0;
    if (s == R_NONE)  return rv;
    if (s == e_dstE) begin from = 1; return e_valE; end
    if (s == m_dstM) begin from = 2; return m_valM; end
    if (s == m_dstE) begin from = 2; return m_valE; end
    if (s == w_dstM) begin from = 3; return w_valM; end
    if (s == w_dstE) begin from = 3; return w_valE; end
    return rv;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      word_t ea, eb;
      int fa, fb;
      d_icode = icode_t'($urandom_range(9));
      {d_valP, rvalA, rvalB} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      {e_valE, m_valM, m_valE} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      {w_valM, w_valE} = {$urandom, $urandom, $urandom, $urandom};
      srcA = pick_reg(); srcB = pick_reg();
      e_dstE = pick_reg(); m_dstM = pick_reg(); m_dstE = pick_reg();
      w_dstM = pick_reg(); w_dstE = pick_reg();
      #1;
      if (d_icode == I_JXX || d_icode == I_CALL) begin ea = d_valP; fa = 0; end
      else ea = expect_val(srcA, rvalA, fa);
      eb = expect_val(srcB, rvalB, fb);
      checks++;
      if (valA !== ea || valB !== eb) begin
        failures++;
        $display("FAIL srcA=%0d srcB=%0d E=%0d Mm=%0d Me=%0d Wm=%0d We=%0d", srcA, srcB,
                 e_dstE, m_dstM, m_dstE, w_dstM, w_dstE);
      end
      checks++;
      if (fwd_e != (fa == 1 || fb == 1) || fwd_m != (fa == 2 || fb == 2) ||
          fwd_w != (fa == 3 || fb == 3)) begin
        failures++;
        $display("FAIL forwarding flags");
      end
      n_e += int'(fwd_e); n_m += int'(fwd_m); n_w += int'(fwd_w);
    end
    checks++;
    if (n_e == 0 || n_m == 0 || n_w == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
