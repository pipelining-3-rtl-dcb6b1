// alu: execute-stage arithmetic of the Y86-64 pipeline.
//
// Computes result = b OP a for OP in {add, sub, and, xor} (so subq %rA,%rB
// gives rB - rA), and the condition codes that result would set: ZF (zero),
// SF (negative) and OF (signed overflow; zero for and/xor). Whether the codes
// are actually stored is decided outside (only OPq sets them). The same unit
// forms memory addresses (valC + valB) and moves the stack pointer for call
// and ret (valB - 8 / valB + 8) using add. Purely combinational; the function
// encoding is the Y86-64 ifun of OPq.
module alu
  import y86_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [3:0] fun,
  output word_t      result,
  output cc_t        cc_new
);

  always_comb begin
    unique case (fun)
      A_SUB:   result = b - a;
      A_AND:   result = b & a;
      A_XOR:   result = b ^ a;
      default: result = b + a;
    endcase
  end

  always_comb begin
    cc_new.zf = (result == '0);
    cc_new.sf = result[WORD-1];
    unique case (fun)
      A_ADD:   cc_new.of = (a[WORD-1] == b[WORD-1]) && (result[WORD-1] != a[WORD-1]);
      A_SUB:   cc_new.of = (a[WORD-1] != b[WORD-1]) && (result[WORD-1] != b[WORD-1]);
      default: cc_new.of = 1'b0;
    endcase
  end

endmodule
