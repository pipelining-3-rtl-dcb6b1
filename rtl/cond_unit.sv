// cond_unit: condition-code register and jump-condition evaluation.
//
// The register holds ZF, SF and OF. It is written at the rising clock edge
// with cc_new when set_cc is 1 (an OPq in execute); reset gives SF=0, ZF=1,
// OF=0, the starting flags of the pipeline traces this design follows.
// cnd is combinational from the stored flags and the jump condition ifun:
//   0 always, 1 le, 2 l, 3 e, 4 ne, 5 ge, 6 g (Y86-64 encoding).
// cnd is the "taken" signal that execute sends towards fetch. Because
// condition codes change in execute, an OPq immediately before a jump sets
// the flags at the edge that moves the jump into execute, so the jump sees
// them without any stall.
module cond_unit
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       set_cc,
  input  cc_t        cc_new,
  input  logic [3:0] ifun,
  output cc_t        cc,
  output logic       cnd
);

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= cc_new;
  end

  always_comb begin
    unique case (ifun)
      C_YES:   cnd = 1'b1;
      C_LE:    cnd = (cc.sf ^ cc.of) | cc.zf;
      C_L:     cnd = cc.sf ^ cc.of;
      C_E:     cnd = cc.zf;
      C_NE:    cnd = !cc.zf;
      C_GE:    cnd = !(cc.sf ^ cc.of);
      C_G:     cnd = !(cc.sf ^ cc.of) && !cc.zf;
      default: cnd = 1'b0;
    endcase
  end

endmodule
