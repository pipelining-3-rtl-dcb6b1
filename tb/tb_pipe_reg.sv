// tb_pipe_reg: checks the stall/bubble pipeline register.
//
// First replays a worked sequence for an 8-bit register whose default value
// is 0xFF: the input counts 0x01, 0x02, ... and stall/bubble are applied in
// a fixed pattern; the expected register contents after each edge are
// 01, 01, 03, FF, 05, 06, 06, 06. Then 500 random cycles are compared with a
// one-line model (stall keeps, bubble loads 0xFF, otherwise load input),
// and reset is checked to load the default.
`timescale 1ns/1ps
module tb_pipe_reg;
  logic       clk = 0, rst = 1, stall = 0, bubble = 0;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;

  pipe_reg dut (.clk, .rst, .stall, .bubble, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  logic [7:0] a_seq  [8] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08};
  logic       st_seq [8] = '{0, 1, 0, 0, 0, 0, 1, 1};
  logic       bu_seq [8] = '{0, 0, 0, 1, 0, 0, 0, 0};
  logic [7:0] b_exp  [9] = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};

  initial begin
    @(negedge clk);
    @(negedge clk);
    check(8'hFF, "reset value");
    rst = 0;
    for (int t = 0; t < 8; t++) begin
      check(b_exp[t], $sformatf("table time %0d", t));
      d = a_seq[t]; stall = st_seq[t]; bubble = bu_seq[t];
      @(negedge clk);
    end
    check(b_exp[8], "table time 8");
    // Random sequence against a model.
    for (int i = 0; i < 500; i++) begin
      logic [7:0] exp;
      d = 8'($urandom);
      case ($urandom_range(3))
        0: begin stall = 1; bubble = 0; end
        1: begin stall = 0; bubble = 1; end
        default: begin stall = 0; bubble = 0; end
      endcase
      exp = stall ? q : (bubble ? 8'hFF : d);
      @(negedge clk);
      check(exp, "random");
    end
    stall = 0; bubble = 0; d = 8'h5A;
    @(negedge clk);
    rst = 1;
    @(negedge clk);
    check(8'hFF, "reset after run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
