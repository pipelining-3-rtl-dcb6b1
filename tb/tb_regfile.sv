// tb_regfile: random writes through both writeback ports and reads through
// both decode ports and the debug port, compared with an array model.
// Register 0xF must read as zero and ignore writes; when both ports write the
// same register the memory-port value must win. Also checks reset clears.
`timescale 1ns/1ps
module tb_regfile;
  import y86_pkg::*;
  logic   clk = 0, rst = 1;
  regid_t srcA = '0, srcB = '0, dstE = R_NONE, dstM = R_NONE, dbg_reg = '0;
  word_t  rvalA, rvalB, valE = '0, valM = '0, dbg_val;
  word_t  ref_r [16];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .srcA, .srcB, .rvalA, .rvalB, .dstE, .valE, .dstM, .valM,
               .dbg_reg, .dbg_val);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) ref_r[i] = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      srcA = regid_t'($urandom); srcB = regid_t'($urandom); dbg_reg = regid_t'($urandom);
      dstE = regid_t'($urandom); dstM = ($urandom_range(3) == 0) ? dstE : regid_t'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      #1;
      check(rvalA == ref_r[srcA] && rvalB == ref_r[srcB] && dbg_val == ref_r[dbg_reg],
            $sformatf("read %0d/%0d/%0d", srcA, srcB, dbg_reg));
      if (dstE != R_NONE) ref_r[dstE] = valE;
      if (dstM != R_NONE) ref_r[dstM] = valM;
      @(negedge clk);
    end
    rst = 1;
    @(negedge clk);
    for (int r = 0; r < 16; r++) begin
      dbg_reg = regid_t'(r);
      #1;
      check(dbg_val == '0, "reset clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
