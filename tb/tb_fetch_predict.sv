// tb_fetch_predict: checks field extraction, instruction length, valP,
// next-PC prediction and fetch status.
//
// Random instruction bytes at random PCs (including PCs near and beyond the
// end of a 1 KiB instruction memory) are compared with a reference that uses
// a table of Y86-64 instruction lengths: 1 for halt/nop/ret, 2 for
// rrmovq/OPq, 9 for jXX/call, 10 for irmovq/rmmovq/mrmovq.
`timescale 1ns/1ps
module tb_fetch_predict;
  import y86_pkg::*;
  word_t       pc;
  logic [79:0] ibytes;
  stat_t       stat;
  icode_t      icode;
  logic [3:0]  ifun;
  regid_t      rA, rB;
  word_t       valC, valP, pred_pc;
  int checks = 0, failures = 0;

  fetch_predict dut (.pc, .ibytes, .stat, .icode, .ifun, .rA, .rB, .valC, .valP, .pred_pc);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int len_tab [16] = '{1, 1, 2, 10, 10, 10, 2, 9, 9, 1, 0, 0, 0, 0, 0, 0};
  int fmax    [16] = '{0, 0, 0, 0, 0, 0, 3, 6, 0, 0, 0, 0, 0, 0, 0, 0};

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int ic, fn, len;
      bit valid, fits;
      word_t c;
      ic = $urandom_range(15);
      fn = ($urandom_range(3) == 0) ? $urandom_range(15) : $urandom_range(fmax[ic]);
      ibytes = {$urandom, $urandom, $urandom};
      ibytes[7:0] = {4'(ic), 4'(fn)};
      pc = ($urandom_range(9) == 0) ? word_t'(1000 + $urandom_range(40)) : word_t'($urandom_range(1000));
      #1;
      len   = len_tab[ic];
      valid = (len != 0) && (fn <= fmax[ic]);
      fits = (int'(pc) + (len == 0 ? 1 : len) <= 1024);
      if (!fits)    check(stat == S_ADR, $sformatf("ADR at pc %0d icode %0d", pc, ic));
      else if (!valid) check(stat == S_INS, $sformatf("INS icode %0d ifun %0d", ic, fn));
      else if (ic == 0) check(stat == S_HLT, "HLT");
      else             check(stat == S_AOK, $sformatf("AOK icode %0d", ic));
      if (len != 0) check(valP == pc + word_t'(len), $sformatf("valP icode %0d", ic));
      if (fits && valid) begin
        check(icode == icode_t'(ic) && ifun == 4'(fn), "icode/ifun");
        c = (len == 10) ? ibytes[79:16] : ibytes[71:8];
        if (len == 10 || len == 9) check(valC == c, "valC");
        if (len == 2 || len == 10) check(rA == ibytes[15:12] && rB == ibytes[11:8], "rA/rB");
        else                       check(rA == R_NONE && rB == R_NONE, "no register byte");
        if (ic == 7 || ic == 8) check(pred_pc == c, "predicted taken");
        else                    check(pred_pc == valP, "predicted fall-through");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
