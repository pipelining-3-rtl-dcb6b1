// fetch_predict: fetch-stage decoding of one instruction and next-PC prediction.
//
// From the ten bytes read at the fetch PC it extracts icode/ifun, the register
// byte (rA, rB) and the constant valC, computes the instruction length and
// valP = pc + length (the "+1/+2/+9/+10" adders), and predicts the next PC
// ("convert icode" MUX): jumps and calls are predicted taken, so their target
// valC is chosen; every other instruction continues at valP. A ret has no
// prediction; the pipeline control holds fetch until its address is known.
//
// It also gives the fetch status: S_ADR when the instruction does not lie
// wholly inside instruction memory, S_INS for an unknown icode or ifun, S_HLT
// for halt. The Y86-64 byte encoding is the standard one; only the
// instructions this pipeline supports (halt, nop, rrmovq, irmovq, rmmovq,
// mrmovq, OPq, jXX, call, ret) are valid here. Purely combinational.
module fetch_predict
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  word_t       pc,
  input  logic [79:0] ibytes,     // byte k of the instruction in bits [8k+7:8k]
  output stat_t       stat,
  output icode_t      icode,
  output logic [3:0]  ifun,
  output regid_t      rA,
  output regid_t      rB,
  output word_t       valC,
  output word_t       valP,
  output word_t       pred_pc
);

  localparam word_t SIZE = word_t'(IMEM_BYTES);

  logic [3:0] raw_icode, raw_ifun;
  logic       known, need_regids, need_valC, fun_ok;
  word_t      len;

  assign raw_icode = ibytes[7:4];
  assign raw_ifun  = ibytes[3:0];

  always_comb begin
    known       = 1'b1;
    need_regids = 1'b0;
    need_valC   = 1'b0;
    fun_ok      = (raw_ifun == 4'h0);
    unique case (raw_icode)
      4'h0, 4'h1, 4'h9: ;
      4'h2:             need_regids = 1'b1;
      4'h3, 4'h4, 4'h5: begin need_regids = 1'b1; need_valC = 1'b1; end
      4'h6:             begin need_regids = 1'b1; fun_ok = (raw_ifun <= A_XOR); end
      4'h7:             begin need_valC = 1'b1;   fun_ok = (raw_ifun <= C_G); end
      4'h8:             need_valC = 1'b1;
      default:          known = 1'b0;
    endcase
  end

  assign len  = 64'd1 + {63'd0, need_regids} + (need_valC ? 64'd8 : 64'd0);
  assign valP = pc + len;

  assign rA   = need_regids ? ibytes[15:12] : R_NONE;
  assign rB   = need_regids ? ibytes[11:8]  : R_NONE;
  assign valC = need_regids ? ibytes[79:16] : ibytes[71:8];

  always_comb begin
    if (pc >= SIZE || valP > SIZE)  stat = S_ADR;
    else if (!known || !fun_ok)                 stat = S_INS;
    else if (raw_icode == 4'h0)                 stat = S_HLT;
    else                                        stat = S_AOK;
  end

  // An instruction that is not valid travels as a nop carrying its status.
  assign icode = (stat == S_ADR || stat == S_INS) ? I_NOP : icode_t'(raw_icode);
  assign ifun  = (stat == S_ADR || stat == S_INS) ? 4'h0  : raw_ifun;

  // Next-PC prediction: jump/call target, otherwise the fall-through address.
  assign pred_pc = (icode == I_JXX || icode == I_CALL) ? valC : valP;

endmodule
