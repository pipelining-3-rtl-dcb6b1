// tb_cond_unit: loads the condition codes produced by subq of two random
// numbers (flags computed here from 64-bit arithmetic) and checks each jump
// condition against the signed comparison it stands for: le is b <= a, l is
// b < a, e is b == a, ne, ge, g, and always. Also checks the reset flags
// (ZF=1, SF=0) and that the codes hold while set_cc is 0.
`timescale 1ns/1ps
module tb_cond_unit;
  import y86_pkg::*;
  logic       clk = 0, rst = 1, set_cc = 0, cnd;
  cc_t        cc_new = '0, cc;
  logic [3:0] ifun = '0;
  int checks = 0, failures = 0;
  logic signed [63:0] a, b;
  logic [63:0]        r;
  bit                 exp [7];

  cond_unit dut (.clk, .rst, .set_cc, .cc_new, .ifun, .cc, .cnd);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    check(cc.zf == 1 && cc.sf == 0 && cc.of == 0, "reset flags");
    ifun = C_E; #1; check(cnd == 1, "je after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = ($urandom_range(3) == 0) ? 64'(signed'($urandom_range(6)) - 3) : {$urandom, $urandom};
      b = ($urandom_range(2) == 0) ? a : {$urandom, $urandom};
      if ($urandom_range(5) == 0) b = 64'h8000_0000_0000_0000;
      r = b - a;
      cc_new.zf = (r == 0);
      cc_new.sf = r[63];
      cc_new.of = (a[63] != b[63]) && (r[63] != b[63]);
      set_cc = 1;
      @(negedge clk);
      set_cc = 0;
      cc_new = ~cc_new;        // must not be loaded
      @(negedge clk);
      exp = '{1'b1, b <= a, b < a, b == a, b != a, b >= a, b > a};
      for (int f = 0; f < 7; f++) begin
        ifun = 4'(f);
        #1;
        check(cnd == exp[f], $sformatf("ifun %0d a=%0d b=%0d cc=%b cnd=%b", f, a, b, cc, cnd));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
