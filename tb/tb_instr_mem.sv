// tb_instr_mem: fills the 1 KiB instruction memory with random bytes through
// the write port, then reads ten-byte windows at random PCs (including ones
// that run past the end, whose missing bytes must read as zero).
`timescale 1ns/1ps
module tb_instr_mem;
  import y86_pkg::*;
  logic        clk = 0, we = 0;
  word_t       waddr = '0, pc = '0;
  logic [7:0]  wdata = '0;
  logic [79:0] ibytes;
  logic [7:0]  ref_mem [1024];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .we, .waddr, .wdata, .pc, .ibytes);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      we = 1; waddr = word_t'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
      @(negedge clk);
    end
    // A write beyond the end must be ignored.
    waddr = 64'd1024 + 64'd3; wdata = 8'hAA;
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      pc = (i < 20) ? word_t'(1014 + i) : word_t'($urandom_range(1023));
      #1;
      for (int k = 0; k < 10; k++) begin
        logic [7:0] exp;
        exp = (int'(pc) + k < 1024) ? ref_mem[int'(pc) + k] : 8'h00;
        checks++;
        if (ibytes[8*k +: 8] !== exp) begin
          failures++;
          $display("FAIL pc=%0d byte %0d: %h expected %h", pc, k, ibytes[8*k +: 8], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
